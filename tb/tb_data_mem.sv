// tb_data_mem: random byte, half-word and word accesses on port A and word
// accesses on port B of the data memory, checked against a reference array.
module tb_data_mem;
  localparam int DEPTH = 64;
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [1:0] a_size = 2;
  logic [7:0] a_addr = 0;
  logic [5:0] b_addr = 0;
  logic [31:0] a_wdata = 0, a_rdata, b_wdata = 0, b_rdata;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  data_mem #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  initial begin
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); b_we = 1; b_addr = 6'(i); b_wdata = $urandom; ref_mem[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int t = 0; t < 2000; t++) begin
      int w, off, sz;
      logic [31:0] exp;
      w = $urandom_range(0, DEPTH - 1);
      sz = $urandom_range(0, 2);
      off = (sz == 0) ? $urandom_range(0, 3) : (sz == 1) ? 2 * $urandom_range(0, 1) : 0;
      @(negedge clk);
      a_size = 2'(sz); a_addr = 8'(4 * w + off);
      if ($urandom_range(0, 1) == 1) begin
        a_we = 1; a_wdata = $urandom;
        case (sz)
          0: ref_mem[w][8*off +: 8] = a_wdata[7:0];
          1: ref_mem[w][8*off +: 16] = a_wdata[15:0];
          default: ref_mem[w] = a_wdata;
        endcase
        @(negedge clk); a_we = 0;
      end else begin
        #1;
        case (sz)
          0: exp = {24'b0, ref_mem[w][8*off +: 8]};
          1: exp = {16'b0, ref_mem[w][8*off +: 16]};
          default: exp = ref_mem[w];
        endcase
        check(a_rdata, exp, "port A read");
      end
      b_addr = 6'(w); #1;
      check(b_rdata, ref_mem[w], "port B read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
