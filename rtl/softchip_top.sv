// softchip_top: the 3D-SoftChip - four unit chips side by side, each an ICS
// control chip stacked on a 16-PE array chip.
//
// Placement (as drawn):   unit 1  unit 2        index 0  1
//                         unit 4  unit 3        index 3  2
// The PE arrays of neighbouring unit chips are joined along their sides,
// so the inter-PE mesh runs across unit chips; the outer sides of the
// whole 8x8 PE mesh are ports (edge_*: west/east lanes 0-3 belong to the
// upper unit chip, 4-7 to the lower one; north/south lanes 0-3 to the left
// one, 4-7 to the right one).  A one-word mailbox link runs 1 -> 2 -> 3 -> 4
// -> 1, used when the unit chips form a pipeline.
//
// Computation models are chosen by what the host loads: the same program
// into every unit chip (one write reaches all chips set in host_pm_units)
// gives the massively parallel model, different programs the multithreaded
// model, different programs passing data over the link the pipelined
// model.  Host ports: while run[u] is low unit chip u is held in reset and
// its program and data memories can be written; host_dm_rdata returns the
// data-memory word of unit chip host_dm_rsel at host_dm_addr.
module softchip_top
  import pe_pkg::*;
#(
  parameter int DW       = PE_DW,
  parameter int NUNIT    = 4,
  parameter int PM_BANKS = 2,
  parameter int PM_DEPTH = 256,
  parameter int DM_DEPTH = 1024,
  parameter int FB_DEPTH = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NUNIT-1:0]            run,
  input  logic                        host_pm_we,
  input  logic [NUNIT-1:0]            host_pm_units,
  input  logic [$clog2(PM_BANKS)-1:0] host_pm_bank,
  input  logic [$clog2(PM_DEPTH)-1:0] host_pm_addr,
  input  logic [31:0]                 host_pm_wdata,
  input  logic                        host_dm_we,
  input  logic [NUNIT-1:0]            host_dm_units,
  input  logic [$clog2(DM_DEPTH)-1:0] host_dm_addr,
  input  logic [31:0]                 host_dm_wdata,
  input  logic [1:0]                  host_dm_rsel,
  output logic [31:0]                 host_dm_rdata,
  output logic [NUNIT-1:0]            halted,
  output logic [NUNIT-1:0]            imem_fetch,
  output logic [NUNIT-1:0]            ics_stall,
  output logic [NUNIT-1:0]            pe_busy,
  output logic [NUNIT-1:0]            dma_busy,
  input  logic [DW-1:0]               edge_w_in  [8],
  input  logic [DW-1:0]               edge_e_in  [8],
  input  logic [DW-1:0]               edge_n_in  [8],
  input  logic [DW-1:0]               edge_s_in  [8],
  output logic [DW-1:0]               edge_w_out [8],
  output logic [DW-1:0]               edge_e_out [8],
  output logic [DW-1:0]               edge_n_out [8],
  output logic [DW-1:0]               edge_s_out [8]
);

  // the placement and the link ring assume four unit chips
  if (NUNIT != 4) begin : g_bad_nunit
    $error("softchip_top: NUNIT must be 4");
  end

  logic [DW-1:0] w_in [4][4], e_in [4][4], n_in [4][4], s_in [4][4];
  logic [DW-1:0] w_out[4][4], e_out[4][4], n_out[4][4], s_out[4][4];
  logic          lk_valid [4];
  logic [31:0]   lk_data  [4];
  logic          in_ready [4];
  logic [31:0]   dm_rdata [4];

  // array sides: unit 0 top-left, 1 top-right, 2 bottom-right, 3 bottom-left
  for (genvar i = 0; i < 4; i++) begin : g_edge
    // inner joins
    assign e_in[0][i] = w_out[1][i];
    assign w_in[1][i] = e_out[0][i];
    assign e_in[3][i] = w_out[2][i];
    assign w_in[2][i] = e_out[3][i];
    assign s_in[0][i] = n_out[3][i];
    assign n_in[3][i] = s_out[0][i];
    assign s_in[1][i] = n_out[2][i];
    assign n_in[2][i] = s_out[1][i];
    // outer sides
    assign w_in[0][i] = edge_w_in[i];
    assign w_in[3][i] = edge_w_in[4+i];
    assign e_in[1][i] = edge_e_in[i];
    assign e_in[2][i] = edge_e_in[4+i];
    assign n_in[0][i] = edge_n_in[i];
    assign n_in[1][i] = edge_n_in[4+i];
    assign s_in[3][i] = edge_s_in[i];
    assign s_in[2][i] = edge_s_in[4+i];
    assign edge_w_out[i]   = w_out[0][i];
    assign edge_w_out[4+i] = w_out[3][i];
    assign edge_e_out[i]   = e_out[1][i];
    assign edge_e_out[4+i] = e_out[2][i];
    assign edge_n_out[i]   = n_out[0][i];
    assign edge_n_out[4+i] = n_out[1][i];
    assign edge_s_out[i]   = s_out[3][i];
    assign edge_s_out[4+i] = s_out[2][i];
  end

  for (genvar u = 0; u < 4; u++) begin : g_unit
    localparam int PREV = (u + 3) % 4;
    localparam int NEXT = (u + 1) % 4;
    unit_chip #(
      .DW(DW), .PM_BANKS(PM_BANKS), .PM_DEPTH(PM_DEPTH), .DM_DEPTH(DM_DEPTH), .FB_DEPTH(FB_DEPTH)
    ) u_unit (
      .clk, .rst_n, .run(run[u]),
      .host_pm_we(host_pm_we && host_pm_units[u]), .host_pm_bank, .host_pm_addr, .host_pm_wdata,
      .host_dm_we(host_dm_we && host_dm_units[u]), .host_dm_addr, .host_dm_wdata,
      .host_dm_rdata(dm_rdata[u]),
      .halted(halted[u]), .imem_fetch(imem_fetch[u]), .ics_stall(ics_stall[u]),
      .pe_busy(pe_busy[u]), .dma_busy(dma_busy[u]),
      .link_out_valid(lk_valid[u]), .link_out_data(lk_data[u]), .link_out_ready(in_ready[NEXT]),
      .link_in_valid(lk_valid[PREV]), .link_in_data(lk_data[PREV]), .link_in_ready(in_ready[u]),
      .edge_w_in(w_in[u]), .edge_e_in(e_in[u]), .edge_n_in(n_in[u]), .edge_s_in(s_in[u]),
      .edge_w_out(w_out[u]), .edge_e_out(e_out[u]), .edge_n_out(n_out[u]), .edge_s_out(s_out[u])
    );
  end

  assign host_dm_rdata = dm_rdata[host_dm_rsel];

endmodule
