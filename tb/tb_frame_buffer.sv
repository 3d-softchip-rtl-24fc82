// tb_frame_buffer: fills one buffer from the DMA side while the processor
// side works on the other, swaps, and checks that each side now sees the
// other buffer's contents.
module tb_frame_buffer;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, swap = 0, sel;
  logic p_we = 0, d_we = 0;
  logic [5:0] p_addr = 0, d_addr = 0;
  logic [31:0] p_wdata = 0, d_wdata = 0, p_rdata, d_rdata;
  int checks = 0, failures = 0;
  frame_buffer #(.DEPTH(DEPTH)) dut (.*);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // both sides write their buffer in the same clocks
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk);
        p_we = 1; p_addr = 6'(i); p_wdata = 32'h1000 * round + 32'(i);
        d_we = 1; d_addr = 6'(i); d_wdata = 32'hf0000 + 32'h1000 * round + 32'(i);
      end
      @(negedge clk); p_we = 0; d_we = 0;
      check(32'(sel), 32'(round % 2), "selection before swap");
      @(negedge clk); swap = 1;
      @(negedge clk); swap = 0;
      check(32'(sel), 32'((round + 1) % 2), "selection after swap");
      for (int i = 0; i < DEPTH; i++) begin
        p_addr = 6'(i); d_addr = 6'(i); #1;
        check(p_rdata, 32'hf0000 + 32'h1000 * round + 32'(i), "processor sees DMA frame");
        check(d_rdata, 32'h1000 * round + 32'(i), "DMA sees processor frame");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
