// tb_prog_mem: writes distinct words into both banks of the program memory
// and reads them back, checking that the banks do not alias.
module tb_prog_mem;
  localparam int NBANK = 2, DEPTH = 256;
  logic clk = 0, we = 0;
  logic [0:0] wbank = 0, rbank = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  prog_mem #(.NBANK(NBANK), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [31:0] pat(input int b, input int a);
    return 32'(a * 32'h01010101) ^ (b == 1 ? 32'hdead0000 : 32'h0000beef);
  endfunction
  initial begin
    for (int b = 0; b < NBANK; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk); we = 1; wbank = 1'(b); waddr = 8'(a); wdata = pat(b, a);
      end
    @(negedge clk); we = 0;
    for (int b = 0; b < NBANK; b++)
      for (int a = 0; a < DEPTH; a++) begin
        rbank = 1'(b); raddr = 8'(a); #1;
        checks++;
        if (rdata !== pat(b, a)) begin
          failures++;
          $display("FAIL bank %0d addr %0d: %h", b, a, rdata);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
