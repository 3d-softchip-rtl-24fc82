// unit_chip: one of the four unit chips of the 3D-SoftChip - an ICS chip
// stacked on a CAP chip.
//
// ICS side: the control processor (ics_risc) with its I/O unit (ics_io),
// banked program memory, data memory, the two ping-pong frame buffers, the
// DMA controller and one switch block per quad.  CAP side: the 16-PE array
// (cap_array).  The vertical bump connections between the two chips are
// plain wires here: per PE an instruction, its valid strobe and a data-bus
// lane going down, and the PE outputs coming up.
//
// Processor address map: 0x0000-0x3FFF data memory (byte, half or word
// access), 0x4000-0x7FFF frame buffer (processor side, word address in bits
// 7..2 for the default depth), 0x8000-0xBFFF I/O unit.
// Host port: while run is low the processor is held in reset and the host
// may write program memory (host_pm_*) and read or write data memory words
// (host_dm_*).  When run goes high the processor starts at address 0 of
// program bank 0.
// Link: link_out_* sends words to the next unit chip, link_in_* receives
// them from the previous one (one-word mailbox, ready = mailbox free).
// PE-array edges are brought out for joining with neighbouring unit chips.
module unit_chip
  import pe_pkg::*;
#(
  parameter int DW       = PE_DW,
  parameter int PM_BANKS = 2,
  parameter int PM_DEPTH = 256,
  parameter int DM_DEPTH = 1024,
  parameter int FB_DEPTH = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  // host access
  input  logic                        host_pm_we,
  input  logic [$clog2(PM_BANKS)-1:0] host_pm_bank,
  input  logic [$clog2(PM_DEPTH)-1:0] host_pm_addr,
  input  logic [31:0]                 host_pm_wdata,
  input  logic                        host_dm_we,
  input  logic [$clog2(DM_DEPTH)-1:0] host_dm_addr,
  input  logic [31:0]                 host_dm_wdata,
  output logic [31:0]                 host_dm_rdata,
  // status
  output logic                        halted,
  output logic                        imem_fetch,
  output logic                        ics_stall,
  output logic                        pe_busy,
  output logic                        dma_busy,
  // inter-unit link
  output logic                        link_out_valid,
  output logic [31:0]                 link_out_data,
  input  logic                        link_out_ready,
  input  logic                        link_in_valid,
  input  logic [31:0]                 link_in_data,
  output logic                        link_in_ready,
  // PE array edges
  input  logic [DW-1:0]               edge_w_in  [4],
  input  logic [DW-1:0]               edge_e_in  [4],
  input  logic [DW-1:0]               edge_n_in  [4],
  input  logic [DW-1:0]               edge_s_in  [4],
  output logic [DW-1:0]               edge_w_out [4],
  output logic [DW-1:0]               edge_e_out [4],
  output logic [DW-1:0]               edge_n_out [4],
  output logic [DW-1:0]               edge_s_out [4]
);

  localparam int DM_AW = $clog2(DM_DEPTH);
  localparam int FB_AW = $clog2(FB_DEPTH);

  logic ics_rst_n;
  assign ics_rst_n = rst_n && run;

  // processor buses
  logic [31:0] imem_addr, imem_rdata;
  logic        dbus_req, dbus_we;
  logic [1:0]  dbus_size;
  logic [31:0] dbus_addr, dbus_wdata, dbus_rdata;
  logic        pei_valid, bus_we, cfg_we;
  logic [3:0]  pei_quads, bus_quads, cfg_quads;
  logic [1:0]  pei_types, rd_quad;
  logic [18:0] pei_instr;
  pei_mode_e   pei_mode;
  logic [1:0]  pei_slot;
  logic [15:0] bus_wdata;
  logic [4:0]  cfg_wdata;
  logic [31:0] rd_word;
  logic [31:0] sb_rd [4];

  // I/O
  logic [$clog2(PM_BANKS)-1:0] pbank;
  logic        dma_start, dma_dir, fb_swap, fb_sel;
  logic [15:0] dma_src, dma_dst, dma_len;
  logic [1:0]  wl_mode;
  logic [3:0]  sh16;
  logic [31:0] io_rdata, dm_a_rdata, fb_p_rdata;

  ics_risc u_risc (
    .clk, .rst_n(ics_rst_n),
    .imem_addr, .imem_fetch, .imem_rdata,
    .dbus_req, .dbus_we, .dbus_size, .dbus_addr, .dbus_wdata, .dbus_rdata,
    .pei_valid, .pei_quads, .pei_types, .pei_instr, .pei_mode, .pei_slot,
    .bus_we, .bus_quads, .bus_wdata, .cfg_we, .cfg_quads, .cfg_wdata,
    .rd_quad, .rd_word, .pe_busy,
    .halted, .stall(ics_stall)
  );

  prog_mem #(.NBANK(PM_BANKS), .DEPTH(PM_DEPTH)) u_pmem (
    .clk, .we(host_pm_we), .wbank(host_pm_bank), .waddr(host_pm_addr), .wdata(host_pm_wdata),
    .rbank(pbank), .raddr(imem_addr[$clog2(PM_DEPTH)-1:0]), .rdata(imem_rdata)
  );

  // address decode
  logic sel_dm, sel_fb, sel_io;
  assign sel_dm = dbus_addr[15:14] == 2'b00;
  assign sel_fb = dbus_addr[15:14] == 2'b01;
  assign sel_io = dbus_addr[15:14] == 2'b10;
  always_comb begin
    if (sel_dm)      dbus_rdata = dm_a_rdata;
    else if (sel_fb) dbus_rdata = fb_p_rdata;
    else if (sel_io) dbus_rdata = io_rdata;
    else             dbus_rdata = '0;
  end

  ics_io #(.NBANK(PM_BANKS)) u_io (
    .clk, .rst_n(ics_rst_n),
    .we(dbus_req && dbus_we && sel_io), .re(dbus_req && !dbus_we && sel_io),
    .idx(dbus_addr[5:2]), .wdata(dbus_wdata), .rdata(io_rdata),
    .dma_start, .dma_dir, .dma_src, .dma_dst, .dma_len, .dma_busy,
    .fb_swap, .fb_sel, .pbank,
    .link_out_valid, .link_out_data, .link_out_ready,
    .link_in_valid, .link_in_data, .link_in_ready,
    .wl_mode, .sh16
  );

  // data memory: port A shared by processor (run) and host (!run), port B DMA
  logic             dm_a_we;
  logic [1:0]       dm_a_size;
  logic [DM_AW+1:0] dm_a_addr;
  logic [31:0]      dm_a_wdata;
  logic [DM_AW-1:0] dma_dm_addr;
  logic             dma_dm_we;
  logic [31:0]      dma_dm_wdata, dma_dm_rdata;
  logic [FB_AW-1:0] dma_fb_addr;
  logic             dma_fb_we;
  logic [31:0]      dma_fb_wdata, dma_fb_rdata;

  always_comb begin
    if (run) begin
      dm_a_we    = dbus_req && dbus_we && sel_dm;
      dm_a_size  = dbus_size;
      dm_a_addr  = dbus_addr[DM_AW+1:0];
      dm_a_wdata = dbus_wdata;
    end else begin
      dm_a_we    = host_dm_we;
      dm_a_size  = 2'd2;
      dm_a_addr  = {host_dm_addr, 2'b00};
      dm_a_wdata = host_dm_wdata;
    end
  end
  assign host_dm_rdata = dm_a_rdata;

  data_mem #(.DEPTH(DM_DEPTH)) u_dmem (
    .clk, .a_we(dm_a_we), .a_size(dm_a_size), .a_addr(dm_a_addr), .a_wdata(dm_a_wdata),
    .a_rdata(dm_a_rdata),
    .b_we(dma_dm_we), .b_addr(dma_dm_addr), .b_wdata(dma_dm_wdata), .b_rdata(dma_dm_rdata)
  );

  frame_buffer #(.DEPTH(FB_DEPTH)) u_fb (
    .clk, .rst_n, .swap(fb_swap), .sel(fb_sel),
    .p_we(dbus_req && dbus_we && sel_fb), .p_addr(dbus_addr[FB_AW+1:2]), .p_wdata(dbus_wdata),
    .p_rdata(fb_p_rdata),
    .d_we(dma_fb_we), .d_addr(dma_fb_addr), .d_wdata(dma_fb_wdata), .d_rdata(dma_fb_rdata)
  );

  dma #(.DM_AW(DM_AW), .FB_AW(FB_AW)) u_dma (
    .clk, .rst_n, .start(dma_start), .dir(dma_dir), .src(dma_src), .dst(dma_dst), .len(dma_len),
    .busy(dma_busy), .done(),
    .dm_addr(dma_dm_addr), .dm_we(dma_dm_we), .dm_wdata(dma_dm_wdata), .dm_rdata(dma_dm_rdata),
    .fb_addr(dma_fb_addr), .fb_we(dma_fb_we), .fb_wdata(dma_fb_wdata), .fb_rdata(dma_fb_rdata)
  );

  // switch blocks and PE array
  logic [PE_IW-1:0] pe_ins    [16];
  logic             pe_valid  [16];
  logic [DW-1:0]    pe_din    [16];
  logic [DW-1:0]    dout_s    [8];
  logic [2*DW-1:0]  dout_pa   [8];
  logic [DW-1:0]    mul_hi    [8];
  logic             sh16_en   [4];

  for (genvar q = 0; q < 4; q++) begin : g_sb
    switch_block #(.DW(DW)) u_sb (
      .clk, .rst_n,
      .pei_valid, .pei_hit(pei_quads[q]), .pei_types, .pei_instr, .pei_mode, .pei_slot,
      .cfg_we(cfg_we && cfg_quads[q]), .cfg_wdata,
      .bus_we(bus_we && bus_quads[q]), .bus_wdata(bus_wdata[4*DW-1:0]),
      .rd_word(sb_rd[q]), .cfg(),
      .instr(pe_ins[4*q +: 4]), .instr_valid(pe_valid[4*q +: 4]), .din_bus(pe_din[4*q +: 4]),
      .dout_s(dout_s[2*q +: 2]), .dout_pa(dout_pa[2*q +: 2])
    );
    assign sh16_en[q] = sh16[q];
  end
  assign rd_word = sb_rd[rd_quad];

  cap_array #(.DW(DW)) u_cap (
    .clk, .rst_n,
    .instr(pe_ins), .instr_valid(pe_valid), .din_bus(pe_din),
    .dout_s, .dout_pa, .mul_hi, .busy(pe_busy),
    .edge_w_in, .edge_e_in, .edge_n_in, .edge_s_in,
    .edge_w_out, .edge_e_out, .edge_n_out, .edge_s_out,
    .wl_mode(wl_mode_e'(wl_mode)), .sh16_en
  );

endmodule
