// tb_spe: self-checking test of the standard PE.  Loads registers over the
// data bus, then runs every operation on random operands and compares the
// output register with a reference computed here; also checks SRAM write and
// read-back, the neighbour inputs, the carry / compare / sign chain inputs
// and the bit-serial multiply (result, high half and its DW-clock busy time).
module tb_spe;
  import pe_pkg::*;
  localparam int DW = 4;
  logic clk = 0, rst_n = 0;
  logic [PE_IW-1:0] instr;
  logic instr_valid;
  logic [DW-1:0] din_bus, din_w, din_e, din_n, din_s, dout, mul_hi;
  logic busy, wl_lsb, carry_in, carry_out, sign_in, sign_out, use_own_sign;
  cmp_t cmp_in, cmp_out;
  int checks = 0, failures = 0;

  spe dut (.*);
  assign sign_in = use_own_sign ? sign_out : 1'b0;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic issue(input logic [PE_IW-1:0] i);
    @(negedge clk);
    instr = i;
    instr_valid = 1'b1;
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  // register k <= bus value v
  task automatic load_reg(input int k, input logic [DW-1:0] v);
    din_bus = v;
    issue(pe_instr(0, 1, 0, 0, 2'(k), 0, SPE_OR, SRC_BUS, SRC_BUS));
  endtask

  function automatic logic [DW-1:0] ref_op(input spe_op_e op, input logic [DW-1:0] a, input logic [DW-1:0] b);
    case (op)
      SPE_AND:  return a & b;
      SPE_OR:   return a | b;
      SPE_XOR:  return a ^ b;
      SPE_ADD:  return DW'(a + b);
      SPE_SUB:  return DW'(a - b);
      SPE_COMP: return {1'b0, a > b, a < b, a == b};
      SPE_ABS:  return a[DW-1] ? DW'(-a) : a;
      default:  return DW'(a * b);
    endcase
  endfunction

  initial begin
    logic [DW-1:0] a, b, r;
    int cyc;
    instr = '0; instr_valid = 0; din_bus = 0; din_w = 4'h1; din_e = 4'h2; din_n = 4'h3; din_s = 4'h4;
    wl_lsb = 1; carry_in = 0; cmp_in = '0; use_own_sign = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // every single-cycle operation on random operands: A from bus, B from register 2
    for (int t = 0; t < 200; t++) begin
      spe_op_e op;
      op = spe_op_e'($urandom_range(0, 7));
      if (op == SPE_SPMUL) op = SPE_ADD;
      a = DW'($urandom); b = DW'($urandom);
      load_reg(2, b);
      din_bus = a;
      issue(pe_instr(0, 0, 0, 0, 2'd2, 1, op, SRC_REG, SRC_BUS));
      check(dout, ref_op(op, a, b), op.name());
    end

    // SRAM write then read back through the multiplexer
    for (int k = 0; k < 16; k++) begin
      din_bus = DW'(k ^ 5);
      issue(pe_instr(1, 0, 1, 4'(k), 0, 0, SPE_OR, SRC_BUS, SRC_BUS));
    end
    for (int k = 0; k < 16; k++) begin
      issue(pe_instr(0, 0, 1, 4'(k), 0, 1, SPE_OR, SRC_SRAM, SRC_SRAM));
      r = DW'(k ^ 5); check(dout, r, "sram readback");
    end
    // output feedback and neighbours
    issue(pe_instr(0, 0, 0, 0, 0, 1, SPE_ADD, SRC_E, SRC_W));
    check(dout, 4'h3, "west+east");
    issue(pe_instr(0, 0, 0, 0, 0, 1, SPE_ADD, SRC_S, SRC_N));
    check(dout, 4'h7, "north+south");
    issue(pe_instr(0, 0, 0, 0, 0, 1, SPE_ADD, SRC_OUT, SRC_OUT));
    check(dout, 4'he, "out+out");

    // chained slice: not least significant, carry in = 1
    wl_lsb = 0; carry_in = 1;
    din_bus = 4'hf; load_reg(1, 4'h0);
    wl_lsb = 0; carry_in = 1; din_bus = 4'hf;
    issue(pe_instr(0, 0, 0, 0, 2'd1, 1, SPE_ADD, SRC_REG, SRC_BUS));
    check(dout, 4'h0, "chained add sum");
    @(negedge clk); instr_valid = 0;
    check(carry_out, 1, "chained add carry");
    carry_in = 0;
    issue(pe_instr(0, 0, 0, 0, 2'd1, 1, SPE_SUB, SRC_REG, SRC_BUS));
    check(dout, 4'he, "chained sub with borrow");
    // compare chain: equal slices pass the lower flags
    load_reg(3, 4'h9); din_bus = 4'h9; cmp_in = '{gt: 1, lt: 0, eq: 0};
    issue(pe_instr(0, 0, 0, 0, 2'd3, 1, SPE_COMP, SRC_REG, SRC_BUS));
    check(dout, 4'b0100, "compare chain gt from lower slice");
    // ABS of a non-top slice follows the word sign, not its own
    use_own_sign = 0; din_bus = 4'hc;
    issue(pe_instr(0, 0, 0, 0, 0, 1, SPE_ABS, SRC_BUS, SRC_BUS));
    check(dout, 4'hc, "abs slice with positive word");
    use_own_sign = 1; wl_lsb = 1;

    // bit-serial multiply: DW clocks busy
    for (int t = 0; t < 20; t++) begin
      a = DW'($urandom); b = DW'($urandom);
      load_reg(0, b);
      din_bus = a;
      @(negedge clk);
      instr = pe_instr(0, 1, 0, 0, 2'd0, 1, SPE_SPMUL, SRC_REG, SRC_BUS);
      instr_valid = 1;
      @(negedge clk);
      instr_valid = 0;
      cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc, DW, "spmul busy clocks");
      check({mul_hi, dout}, 8'(a * b), "spmul product");
      issue(pe_instr(0, 0, 0, 0, 2'd0, 1, SPE_OR, SRC_REG, SRC_REG));
      check(dout, DW'(a * b), "spmul register write");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
