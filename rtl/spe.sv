// spe: standard processing element (S-PE) of the configurable array processor.
//
// Each cycle in which instr_valid is high the S-PE decodes the 19-bit
// instruction, selects operands A and B through two 8-input multiplexers
// (data bus, the four mesh neighbours, the selected register, the selected
// local SRAM word, or its own output register) and computes one of AND, OR,
// XOR, ADD, SUB, SPMUL, COMP or ABS on a DW-bit slice.  At the next clock edge
// the result goes to the output register (bit 9), the selected register
// (bit 17) and/or the selected SRAM word (bits 18 and 16 both set).
//
// Word-length configuration: ADD, SUB, ABS and COMP work on one slice of a
// wider word.  carry_in/carry_out ripple the carry from the least significant
// slice (wl_lsb = 1) upward, cmp_in/cmp_out ripple the {gt,lt,eq} flags, and
// sign_in carries the sign bit of the word's most significant slice, which
// ABS needs in every slice.  The result of COMP is {0,gt,lt,eq} (unsigned);
// the most significant slice holds the whole word's answer.  A lone S-PE has
// wl_lsb = 1 and sign_in tied to its own sign_out.
//
// SPMUL uses a bit-serial multiplier: operands are captured when the
// instruction is issued, one multiplier bit is added per clock, and DW clocks
// later the low half of the unsigned product is written like any other
// result while the high half appears on mul_hi.  busy is high from the issue
// clock to the clock that writes the product (DW+1 clocks), so a controller
// one register away still sees it in time; no instruction may be issued
// while the multiplier runs (asserted).  Single-cycle
// operations write at the edge that ends their issue cycle.
//
// The instruction layout and the function list follow the published PE; the
// opcode numbering, the multiplexer source codes, the COMP result format, the
// multiplier timing and the slice-chaining signals are choices of this design.
module spe
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
  output logic [DW-1:0]    dout,
  output logic [DW-1:0]    mul_hi,
  output logic             busy,
  // word-length chain
  input  logic             wl_lsb,
  input  logic             carry_in,
  output logic             carry_out,
  input  cmp_t             cmp_in,
  output cmp_t             cmp_out,
  input  logic             sign_in,
  output logic             sign_out
);

  pe_instr_t ir, ir_q;
  logic [DW-1:0] regs [NREG];
  logic [DW-1:0] sram [SRAM_DEPTH];
  logic [DW-1:0] out_q;
  logic [DW-1:0] a, b, alu_r;
  logic          alu_c;

  // bit-serial multiplier state
  logic            mbusy;
  logic [$clog2(DW)-1:0] mcnt;
  logic [DW-1:0]   ma, mb;
  logic [2*DW-1:0] macc, macc_next;

  assign ir = pe_instr_t'(instr);

  function automatic logic [DW-1:0] pick(input logic [2:0] src, input pe_instr_t i);
    case (mux_src_e'(src))
      SRC_BUS:  return din_bus;
      SRC_W:    return din_w;
      SRC_E:    return din_e;
      SRC_N:    return din_n;
      SRC_S:    return din_s;
      SRC_REG:  return regs[i.reg_sel[$clog2(NREG)-1:0]];
      SRC_SRAM: return sram[i.sram_sel[$clog2(SRAM_DEPTH)-1:0]];
      default:  return out_q;
    endcase
  endfunction

  assign a        = pick(ir.mux_a, ir);
  assign b        = pick(ir.mux_b, ir);
  assign sign_out = a[DW-1];

  // slice compare with the flags of the less significant slices
  cmp_t cmp_lo;
  assign cmp_lo  = wl_lsb ? cmp_t'{gt: 1'b0, lt: 1'b0, eq: 1'b1} : cmp_in;
  assign cmp_out = '{gt: (a > b) | ((a == b) & cmp_lo.gt),
                     lt: (a < b) | ((a == b) & cmp_lo.lt),
                     eq: (a == b) & cmp_lo.eq};

  logic cin_add, cin_sub;
  assign cin_add = wl_lsb ? 1'b0 : carry_in;
  assign cin_sub = wl_lsb ? 1'b1 : carry_in;

  always_comb begin
    alu_c = 1'b0;
    alu_r = '0;
    case (spe_op_e'(ir.op))
      SPE_AND:  alu_r = a & b;
      SPE_OR:   alu_r = a | b;
      SPE_XOR:  alu_r = a ^ b;
      SPE_ADD:  {alu_c, alu_r} = {1'b0, a} + {1'b0, b} + {{DW{1'b0}}, cin_add};
      SPE_SUB:  {alu_c, alu_r} = {1'b0, a} + {1'b0, ~b} + {{DW{1'b0}}, cin_sub};
      SPE_COMP: alu_r = {{(DW-3){1'b0}}, cmp_out.gt, cmp_out.lt, cmp_out.eq};
      SPE_ABS:  if (sign_in) {alu_c, alu_r} = {1'b0, ~a} + {{DW{1'b0}}, cin_sub};
                else alu_r = a;
      default:  alu_r = '0;  // SPMUL result comes from the serial multiplier
    endcase
  end
  assign carry_out = alu_c;

  // one multiplier bit per clock
  assign macc_next = macc + (mb[mcnt] ? ({{DW{1'b0}}, ma} << mcnt) : '0);

  logic      start_mul, last_mul, commit;
  pe_instr_t wi;
  logic [DW-1:0] wdata;
  assign start_mul = instr_valid && !mbusy && (spe_op_e'(ir.op) == SPE_SPMUL);
  assign last_mul  = mbusy && (mcnt == $clog2(DW)'(DW-1));
  assign commit    = (instr_valid && !mbusy && (spe_op_e'(ir.op) != SPE_SPMUL)) || last_mul;
  assign wi        = last_mul ? ir_q : ir;
  assign wdata     = last_mul ? macc_next[DW-1:0] : alu_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mbusy  <= 1'b0;
      mcnt   <= '0;
      ma     <= '0;
      mb     <= '0;
      macc   <= '0;
      ir_q   <= '0;
      mul_hi <= '0;
    end else if (start_mul) begin
      mbusy <= 1'b1;
      mcnt  <= '0;
      ma    <= a;
      mb    <= b;
      macc  <= '0;
      ir_q  <= ir;
    end else if (mbusy) begin
      macc <= macc_next;
      mcnt <= mcnt + 1'b1;
      if (last_mul) begin
        mbusy  <= 1'b0;
        mul_hi <= macc_next[2*DW-1:DW];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      for (int k = 0; k < NREG; k++) regs[k] <= '0;
    end else if (commit) begin
      if (wi.dout_ld) out_q <= wdata;
      if (wi.wr_en) regs[wi.reg_sel[$clog2(NREG)-1:0]] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (commit && wi.sram_en && wi.ws_en)
      sram[wi.sram_sel[$clog2(SRAM_DEPTH)-1:0]] <= wdata;
  end

  assign dout = out_q;
  assign busy = mbusy | start_mul;

  // An instruction must not be issued while the serial multiplier runs.
  a_no_issue_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(instr_valid && mbusy));

endmodule
