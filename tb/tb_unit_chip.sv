// tb_unit_chip: one unit chip running a program end to end.  The host loads
// the program and two 32-bit operands (pre-split into data-bus lane words)
// into data memory; the program moves them by DMA into the frame buffer,
// swaps the buffers, reads the operands, puts the array into 32-bit word
// mode, adds them on the 8 chained standard PEs, reads the result back,
// runs a serial multiply that stalls the next PE instruction, counts with
// the loop buffer, exchanges words over the link and halts.  The host then
// checks data memory.
module tb_unit_chip;
  import pe_pkg::*;
  import ics_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic host_pm_we = 0, host_dm_we = 0;
  logic [0:0] host_pm_bank = 0;
  logic [7:0] host_pm_addr = 0;
  logic [9:0] host_dm_addr = 0;
  logic [31:0] host_pm_wdata = 0, host_dm_wdata = 0, host_dm_rdata;
  logic halted, imem_fetch, ics_stall, pe_busy, dma_busy;
  logic link_out_valid, link_out_ready, link_in_valid, link_in_ready;
  logic [31:0] link_out_data, link_in_data;
  logic [3:0] edge_w_in [4], edge_e_in [4], edge_n_in [4], edge_s_in [4];
  logic [3:0] edge_w_out [4], edge_e_out [4], edge_n_out [4], edge_s_out [4];
  logic [31:0] prog [128];
  int np = 0;
  int checks = 0, failures = 0, stalls = 0, dma_clocks = 0, sent = 0;
  logic [31:0] sent_word;

  unit_chip dut (.*);
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
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  function automatic void emit(input logic [31:0] w);
    prog[np] = w;
    np++;
  endfunction
  // lane word of quad q for a 32-bit word spread over the 8 S-PEs
  function automatic logic [31:0] lanes(input logic [31:0] v, input int q);
    return {16'b0, 4'b0, v[8*q+4 +: 4], 4'b0, v[8*q +: 4]};
  endfunction

  always @(posedge clk) begin
    if (ics_stall) stalls++;
    if (dma_busy) dma_clocks++;
    if (link_out_valid) begin sent++; sent_word <= link_out_data; end
  end
  for (genvar i = 0; i < 4; i++) begin : g_e
    assign edge_w_in[i] = 4'(i); assign edge_e_in[i] = 4'(i);
    assign edge_n_in[i] = 4'(i); assign edge_s_in[i] = 4'(i);
  end
  assign link_out_ready = 1'b1;

  initial begin
    logic [31:0] x, y, sum;
    x = 32'h89abcdef; y = 32'h7654fedc; sum = x + y;
    // program
    emit(enc_i(OP_ADDI, 1, 0, 16'h8000));      // I/O base
    emit(enc_i(OP_ADDI, 2, 0, 16'h4000));      // frame buffer base
    emit(enc_i(OP_ADDI, 3, 0, 16'd8));
    emit(enc_i(OP_SW, 0, 1, 16'd0));           // DMA src 0
    emit(enc_i(OP_SW, 0, 1, 16'd4));           // DMA dst 0
    emit(enc_i(OP_SW, 3, 1, 16'd8));           // DMA len 8
    emit(enc_i(OP_ADDI, 4, 0, 16'd1));
    emit(enc_i(OP_SW, 4, 1, 16'd12));          // start, memory -> frame buffer
    emit(enc_i(OP_LW, 5, 1, 16'd12));          // poll busy
    emit(enc_i(OP_BNE, 5, 0, -16'sd2));
    emit(enc_i(OP_SW, 0, 1, 16'd16));          // swap frame buffers
    emit(enc_i(OP_ADDI, 8, 0, 16'd3));
    emit(enc_i(OP_SW, 8, 1, 16'd36));          // 32-bit word mode
    for (int q = 0; q < 4; q++) begin
      emit(enc_i(OP_LW, 9, 2, 16'(4 * q)));
      emit(enc_i(OP_PEBUS, 0, 9, 16'(1 << q)));
    end
    emit(enc_pei(4'hf, 2'b01, pe_instr(0, 1, 0, 0, 2'd0, 0, SPE_OR, SRC_BUS, SRC_BUS)));
    for (int q = 0; q < 4; q++) begin
      emit(enc_i(OP_LW, 9, 2, 16'(16 + 4 * q)));
      emit(enc_i(OP_PEBUS, 0, 9, 16'(1 << q)));
    end
    emit(enc_pei(4'hf, 2'b01, pe_instr(0, 0, 0, 0, 2'd0, 1, SPE_ADD, SRC_REG, SRC_BUS)));
    for (int q = 0; q < 4; q++) emit(enc_i(OP_PERD, 5'(10 + q), 0, 16'(q)));
    for (int q = 0; q < 4; q++) emit(enc_i(OP_SW, 5'(10 + q), 0, 16'(32'h100 + 4 * q)));
    // serial multiply, then a PE instruction that must wait for it
    emit(enc_pei(4'h1, 2'b01, pe_instr(0, 0, 0, 0, 2'd0, 1, SPE_SPMUL, SRC_REG, SRC_OUT)));
    emit(enc_pei(4'h1, 2'b01, pe_instr(0, 1, 0, 0, 2'd1, 0, SPE_OR, SRC_OUT, SRC_OUT)));
    // loop buffer: count 8
    emit(enc_i(OP_LOOP, 0, 3, 16'd0));
    emit(enc_i(OP_ADDI, 14, 14, 16'd5));
    emit(enc_i(OP_SW, 14, 0, 16'h110));
    // link: send the low result word, receive one
    emit(enc_i(OP_SW, 10, 1, 16'd24));
    emit(enc_i(OP_LW, 15, 1, 16'd32));         // mailbox full?
    emit(enc_i(OP_BEQ, 15, 0, -16'sd2));
    emit(enc_i(OP_LW, 16, 1, 16'd28));
    emit(enc_i(OP_SW, 16, 0, 16'h114));
    emit(enc_i(OP_LW, 17, 1, 16'd32));
    emit(enc_i(OP_SW, 17, 0, 16'h118));
    emit(enc_i(OP_PERD, 18, 0, 16'd0));
    emit(enc_i(OP_SW, 18, 0, 16'h11c));
    emit(enc_i(OP_HALT, 0, 0, 16'd0));

    link_in_valid = 0; link_in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < np; i++) begin
      @(negedge clk); host_pm_we = 1; host_pm_addr = 8'(i); host_pm_wdata = prog[i];
    end
    for (int q = 0; q < 4; q++) begin
      @(negedge clk); host_pm_we = 0; host_dm_we = 1; host_dm_addr = 10'(q); host_dm_wdata = lanes(y, q);
      @(negedge clk); host_dm_addr = 10'(4 + q); host_dm_wdata = lanes(x, q);
    end
    @(negedge clk); host_dm_we = 0;
    run = 1;
    repeat (30) @(negedge clk);
    link_in_valid = 1; link_in_data = 32'hcafe0042;
    @(negedge clk); link_in_valid = 0;
    wait (halted);
    @(negedge clk); run = 0;
    begin
      logic [31:0] got;
      got = 0;
      for (int q = 0; q < 4; q++) begin
        host_dm_addr = 10'(32'h40 + q); #1;
        got[8*q +: 4]     = host_dm_rdata[3:0];
        got[8*q + 4 +: 4] = host_dm_rdata[15:12];
      end
      check(got, sum, "32-bit add on the chained S-PEs");
      host_dm_addr = 10'h44; #1 check(host_dm_rdata, 40, "loop buffer count");
      host_dm_addr = 10'h45; #1 check(host_dm_rdata, 32'hcafe0042, "link word received");
      host_dm_addr = 10'h46; #1 check(host_dm_rdata, 0, "mailbox empty after read");
      host_dm_addr = 10'h47; #1
      check(32'(host_dm_rdata[3:0]), 32'(4'(sum[3:0] * y[3:0])), "serial product in quad 0");
    end
    check(32'(sent), 1, "one link word sent");
    check(sent_word[3:0], sum[3:0], "link word");
    check(32'(dma_clocks), 8, "DMA busy for 8 words");
    // 1 clock for the read-back right after a PEI, 5 behind the serial multiply
    check(32'(stalls), 6, "PE instruction stalled by the serial multiply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
