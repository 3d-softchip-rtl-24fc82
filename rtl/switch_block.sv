// switch_block: the ICS-side switch of one quad.  It passes PE instructions
// and data from the control processor to the four PEs of its quad and brings
// their results back.
//
// PE instructions: when pei_valid and pei_hit (this quad is addressed) are
// high, the command acts on every PE that is enabled in the configuration
// and whose type is selected in pei_types (bit 0 = standard PEs, bit 1 =
// accelerator PEs).  pei_mode selects what happens (pe_pkg::pei_mode_e):
// PEI_DIRECT latches pei_instr for those PEs, PEI_STORE writes pei_instr
// into instruction register pei_slot of each of them without executing it,
// PEI_EXEC latches the contents of each PE's own register pei_slot.  PEs
// given an instruction (DIRECT or EXEC) see instr_valid high for exactly
// the following clock.  Each PE has PE_NISET (4) 19-bit instruction
// registers, cleared by reset, so one EXEC can start a different stored
// instruction in every PE.  Sending different instructions to different quads
// or PE types, or the same one to all, gives SISD, SIMD, MISD or MIMD use.
// Data bus: bus_we loads the four 4-bit data-bus lanes of the quad from
// bus_wdata (lane k = bits 4k+3..4k), or all lanes from bits 3..0 when the
// broadcast bit is set; the lanes hold their value until the next load.
// Configuration word (cfg_we): bits 3..0 PE enable mask, bit 4 broadcast.
// Reset enables all PEs, broadcast off.
// Read-back: rd_word = {8'b0, PA-PE 3, S-PE 2, PA-PE 1, S-PE 0}, wired
// straight from the PE outputs.
//
// The four 19-bit instruction registers per PE are published as part of the
// PE ("4 sets of 19-bit registers for ... instruction decoding"); they sit
// here, one set per PE, which gives the same behaviour without widening the
// PE interface.  The store/execute commands are choices of this design.
// The published switch is a pass-transistor crossbar in 6-, 7- and 8-sided
// variants; this logical version, its registering and its configuration word
// are choices of this design.
module switch_block
  import pe_pkg::*;
#(
  parameter int DW = PE_DW
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the control processor
  input  logic             pei_valid,
  input  logic             pei_hit,
  input  logic [1:0]       pei_types,
  input  logic [PE_IW-1:0] pei_instr,
  input  pei_mode_e        pei_mode,
  input  logic [1:0]       pei_slot,
  input  logic             cfg_we,
  input  logic [4:0]       cfg_wdata,
  input  logic             bus_we,
  input  logic [4*DW-1:0]  bus_wdata,
  output logic [31:0]      rd_word,
  output logic [4:0]       cfg,
  // to / from the quad
  output logic [PE_IW-1:0] instr       [4],
  output logic             instr_valid [4],
  output logic [DW-1:0]    din_bus     [4],
  input  logic [DW-1:0]    dout_s      [2],
  input  logic [2*DW-1:0]  dout_pa     [2]
);

  logic [3:0] en_q;
  logic       bcast_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q    <= 4'hf;
      bcast_q <= 1'b0;
    end else if (cfg_we) begin
      en_q    <= cfg_wdata[3:0];
      bcast_q <= cfg_wdata[4];
    end
  end
  assign cfg = {bcast_q, en_q};

  for (genvar k = 0; k < 4; k++) begin : g_pe
    localparam int TYPE = k % 2;  // 0 = standard PE, 1 = accelerator PE
    logic [PE_IW-1:0] iset [PE_NISET];
    logic             sel, go;
    assign sel = pei_valid && pei_hit && en_q[k] && pei_types[TYPE];
    assign go  = sel && (pei_mode != PEI_STORE);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        instr[k]       <= '0;
        instr_valid[k] <= 1'b0;
        din_bus[k]     <= '0;
        for (int j = 0; j < PE_NISET; j++) iset[j] <= '0;
      end else begin
        instr_valid[k] <= go;
        if (go)
          instr[k] <= (pei_mode == PEI_EXEC) ? iset[pei_slot] : pei_instr;
        if (sel && pei_mode == PEI_STORE)
          iset[pei_slot] <= pei_instr;
        if (bus_we)
          din_bus[k] <= bcast_q ? bus_wdata[DW-1:0] : bus_wdata[DW*k +: DW];
      end
    end
  end

  assign rd_word = 32'({dout_pa[1], dout_s[1], dout_pa[0], dout_s[0]});

endmodule
