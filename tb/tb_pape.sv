// tb_pape: self-checking test of the processing-accelerator PE.  Random
// PAMUL / MAC / MAS / ABS sequences are compared with a reference
// accumulator kept here; every shift (LSL, LSR, ASR, ROR) is checked on the
// 8-bit output register, and a second PA-PE is paired with the first to
// check the 16-bit shifter.  Each operation must complete in one clock.
module tb_pape;
  import pe_pkg::*;
  localparam int DW = 4;
  logic clk = 0, rst_n = 0;
  logic [PE_IW-1:0] instr, instr2;
  logic instr_valid, valid2;
  logic [DW-1:0] din_bus, din_w, din_e, din_n, din_s;
  logic [2*DW-1:0] dout, dout2;
  logic sh16_en;
  int checks = 0, failures = 0;

  pape dut (.clk, .rst_n, .instr, .instr_valid, .din_bus, .din_w, .din_e, .din_n, .din_s,
            .dout, .sh16_en, .sh16_upper(1'b0), .partner(dout2));
  pape hi (.clk, .rst_n, .instr(instr2), .instr_valid(valid2), .din_bus, .din_w, .din_e, .din_n,
           .din_s, .dout(dout2), .sh16_en, .sh16_upper(1'b1), .partner(dout));

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

  // one instruction, to the first PE only or to both
  task automatic issue(input logic [PE_IW-1:0] i, input logic both = 0);
    @(negedge clk);
    instr = i; instr_valid = 1;
    instr2 = i; valid2 = both;
    @(negedge clk);
    instr_valid = 0; valid2 = 0;
  endtask

  initial begin
    logic signed [DW-1:0] a, b;
    logic [7:0] acc, v;
    logic [15:0] w;
    logic [2:0] n;
    instr = '0; instr2 = '0; instr_valid = 0; valid2 = 0; sh16_en = 0;
    din_bus = 0; din_w = 0; din_e = 0; din_n = 0; din_s = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    acc = 0;
    // multiply / accumulate: A from data bus, B from west neighbour
    for (int t = 0; t < 300; t++) begin
      pape_op_e op;
      int k;
      k = $urandom_range(0, 3);
      op = (k == 0) ? PA_PAMUL : (k == 1) ? PA_MAC : (k == 2) ? PA_MAS : PA_ABS;
      a = DW'($urandom); b = DW'($urandom);
      din_bus = a; din_w = b;
      issue(pe_instr(0, 0, 0, 0, 0, 1, op, SRC_W, SRC_BUS));
      case (op)
        PA_PAMUL: acc = 8'(a * b);
        PA_MAC:   acc = 8'(a * b) + acc;
        PA_MAS:   acc = 8'(a * b) - acc;
        default:  acc = a < 0 ? 8'(-a) : 8'(a);
      endcase
      check(dout, acc, op.name());
    end
    // register and SRAM keep the 8-bit result
    din_bus = 4'h7; din_w = 4'h6;
    issue(pe_instr(1, 1, 1, 4'd9, 2'd3, 0, PA_PAMUL, SRC_W, SRC_BUS));
    issue(pe_instr(0, 0, 0, 0, 2'd3, 1, PA_PAMUL, SRC_BUS, SRC_REG));
    check(dout, 8'hd6, "register low nibble as operand");  // 0x2a -> low nibble -6, times 7
    issue(pe_instr(0, 0, 1, 4'd9, 0, 1, PA_PAMUL, SRC_BUS, SRC_SRAM));
    check(dout, 8'hd6, "sram low nibble as operand");

    // single 8-bit shifts of the output register by B
    for (int t = 0; t < 100; t++) begin
      pape_op_e op;
      op = pape_op_e'($urandom_range(3, 6));
      a = DW'($urandom); b = DW'($urandom);
      din_bus = a; din_w = b;
      issue(pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_W, SRC_BUS));
      v = 8'(a * b);
      n = 3'($urandom);
      din_w = {1'b0, n};
      issue(pe_instr(0, 0, 0, 0, 0, 1, op, SRC_W, SRC_BUS));
      case (op)
        PA_LSL:  v = v << n;
        PA_LSR:  v = v >> n;
        PA_ASR:  v = 8'($signed(v) >>> n);
        default: v = 8'({v, v} >> n);
      endcase
      check(dout, v, op.name());
    end

    // paired 16-bit shifter
    sh16_en = 1;
    for (int t = 0; t < 60; t++) begin
      pape_op_e op;
      logic [3:0] m;
      op = pape_op_e'($urandom_range(3, 6));
      din_bus = DW'($urandom); din_w = DW'($urandom);
      issue(pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_W, SRC_BUS), 1);
      w = {8'($signed(din_bus) * $signed(din_w)), 8'($signed(din_bus) * $signed(din_w))};
      m = 4'($urandom);
      din_w = m;
      issue(pe_instr(0, 0, 0, 0, 0, 1, op, SRC_W, SRC_BUS), 1);
      case (op)
        PA_LSL:  w = w << m;
        PA_LSR:  w = w >> m;
        PA_ASR:  w = 16'($signed(w) >>> m);
        default: w = 16'({w, w} >> m);
      endcase
      check({dout2, dout}, w, {"16-bit ", op.name()});
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
