// tb_dma: connects the DMA controller to a data memory and a frame buffer
// model, copies blocks both ways and checks the data, the untouched words
// around each block and the copy time of one word per clock.
module tb_dma;
  logic clk = 0, rst_n = 0, start = 0, dir = 0, busy, done;
  logic [15:0] src = 0, dst = 0, len = 0;
  logic [9:0] dm_addr;
  logic [5:0] fb_addr;
  logic dm_we, fb_we;
  logic [31:0] dm_wdata, dm_rdata, fb_wdata, fb_rdata;
  logic [31:0] dm [1024];
  logic [31:0] fb [64];
  int checks = 0, failures = 0;
  dma dut (.*);
  assign dm_rdata = dm[dm_addr];
  assign fb_rdata = fb[fb_addr];
  always_ff @(posedge clk) begin
    if (dm_we) dm[dm_addr] <= dm_wdata;
    if (fb_we) fb[fb_addr] <= fb_wdata;
  end
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
    for (int t = 0; t < 6; t++) begin
      int s, d, n, cyc;
      for (int i = 0; i < 1024; i++) dm[i] = 32'hd0000000 + 32'(i);
      for (int i = 0; i < 64; i++) fb[i] = 32'hf0000000 + 32'(i);
      n = $urandom_range(1, 20);
      dir = 1'(t % 2);
      s = dir ? $urandom_range(0, 63 - n) : $urandom_range(0, 1023 - n);
      d = dir ? $urandom_range(0, 1023 - n) : $urandom_range(0, 63 - n);
      @(negedge clk);
      src = 16'(s); dst = 16'(d); len = 16'(n); start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      check(32'(cyc), 32'(n), "copy clocks");
      for (int i = 0; i < n; i++)
        if (dir) check(dm[d + i], fb[s + i], "fb->dm word");
        else     check(fb[d + i], dm[s + i], "dm->fb word");
      if (!dir && d + n < 64) check(fb[d + n], 32'hf0000000 + 32'(d + n), "word after block untouched");
      if (dir && d + n < 1024) check(dm[d + n][31:28], 4'hd, "word after block untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
