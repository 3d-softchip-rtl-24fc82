// pape: processing-accelerator PE (PA-PE) of the configurable array processor.
//
// The PA-PE serves DSP kernels.  Operands A and B (DW bits, two's complement)
// are selected like in the standard PE.  A signed DW x DW parallel multiplier
// feeds an accumulator/subtractor whose other input is the output register
// out(t), so one instruction gives in one clock:
//   PAMUL  out <= A*B          MAC  out <= A*B + out(t)
//   MAS    out <= A*B - out(t) ABS  out <= |A|
// The barrel shifter works on out(t) (2*DW = 8 bits) by the amount in B:
// LSL, LSR, ASR and ROR.  With sh16_en set, the shifters of the two PA-PEs of
// a quad act as one 4*DW = 16-bit shifter: each PE sees its partner's output
// register on `partner`, shifts the joined value {upper, lower} and keeps its
// own half (sh16_upper tells which half it holds).  Both PEs must receive the
// shift in the same cycle.
//
// Results are written at the clock edge that ends the issue cycle: to the
// output register (bit 9), to the selected register (bit 17) and/or to the
// selected SRAM word (bits 18 and 16).  Registers and SRAM words are 2*DW wide;
// used as operands they give their low DW bits.  The neighbour output is the
// low DW bits of dout.
//
// The function list, the single-cycle MAC/MAS and the 8-bit / paired 16-bit
// shifter follow the published PA-PE; MAS is computed as A*B - out(t), in the
// order the function table prints it.  The use of out(t) as shifter input,
// the shift amount taken from B and the register widths are choices of this
// design.
module pape
  import pe_pkg::*;
#(
  parameter int DW         = PE_DW,
  parameter int NREG       = PE_NREG,
  parameter int SRAM_DEPTH = PE_SRAM_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PE_IW-1:0] instr,
  input  logic             instr_valid,
  input  logic [DW-1:0]    din_bus,
  input  logic [DW-1:0]    din_w,
  input  logic [DW-1:0]    din_e,
  input  logic [DW-1:0]    din_n,
  input  logic [DW-1:0]    din_s,
  output logic [2*DW-1:0]  dout,
  // paired 16-bit shifter
  input  logic             sh16_en,
  input  logic             sh16_upper,
  input  logic [2*DW-1:0]  partner
);

  localparam int AW  = 2 * DW;  // accumulator / shifter width
  localparam int SH1 = $clog2(AW);
  localparam int SH2 = $clog2(2 * AW);

  pe_instr_t ir;
  logic [AW-1:0] regs [NREG];
  logic [AW-1:0] sram [SRAM_DEPTH];
  logic [AW-1:0] out_q;
  logic [DW-1:0] a, b;
  logic [AW-1:0] prod, res;

  assign ir = pe_instr_t'(instr);

  function automatic logic [DW-1:0] pick(input logic [2:0] src, input pe_instr_t i);
    logic [AW-1:0] r, s;
    r = regs[i.reg_sel[$clog2(NREG)-1:0]];
    s = sram[i.sram_sel[$clog2(SRAM_DEPTH)-1:0]];
    case (mux_src_e'(src))
      SRC_BUS:  return din_bus;
      SRC_W:    return din_w;
      SRC_E:    return din_e;
      SRC_N:    return din_n;
      SRC_S:    return din_s;
      SRC_REG:  return r[DW-1:0];
      SRC_SRAM: return s[DW-1:0];
      default:  return out_q[DW-1:0];
    endcase
  endfunction

  assign a    = pick(ir.mux_a, ir);
  assign b    = pick(ir.mux_b, ir);
  assign prod = AW'($signed(a) * $signed(b));

  // barrel shifter, single (AW bits) or paired (2*AW bits)
  logic [2*AW-1:0] joined, sh_wide;
  logic [AW-1:0]   sh_single, sh_out;
  logic [SH1-1:0]  amt1;
  logic [SH2-1:0]  amt2;
  assign joined = sh16_upper ? {out_q, partner} : {partner, out_q};
  assign amt1   = SH1'(b);
  assign amt2   = SH2'(b);

  always_comb begin
    sh_single = out_q;
    sh_wide   = joined;
    case (pape_op_e'(ir.op))
      PA_LSL: begin
        sh_single = out_q << amt1;
        sh_wide   = joined << amt2;
      end
      PA_LSR: begin
        sh_single = out_q >> amt1;
        sh_wide   = joined >> amt2;
      end
      PA_ASR: begin
        sh_single = AW'($signed(out_q) >>> amt1);
        sh_wide   = (2*AW)'($signed(joined) >>> amt2);
      end
      PA_ROR: begin
        sh_single = AW'({out_q, out_q} >> amt1);
        sh_wide   = (2*AW)'({joined, joined} >> amt2);
      end
      default: ;
    endcase
    if (!sh16_en)        sh_out = sh_single;
    else if (sh16_upper) sh_out = sh_wide[2*AW-1:AW];
    else                 sh_out = sh_wide[AW-1:0];
  end

  always_comb begin
    case (pape_op_e'(ir.op))
      PA_PAMUL: res = prod;
      PA_MAC:   res = prod + out_q;
      PA_MAS:   res = prod - out_q;
      PA_ABS:   res = a[DW-1] ? AW'(-$signed(a)) : AW'(a);
      default:  res = sh_out;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      for (int k = 0; k < NREG; k++) regs[k] <= '0;
    end else if (instr_valid) begin
      if (ir.dout_ld) out_q <= res;
      if (ir.wr_en) regs[ir.reg_sel[$clog2(NREG)-1:0]] <= res;
    end
  end

  always_ff @(posedge clk) begin
    if (instr_valid && ir.sram_en && ir.ws_en)
      sram[ir.sram_sel[$clog2(SRAM_DEPTH)-1:0]] <= res;
  end

  assign dout = out_q;

endmodule
