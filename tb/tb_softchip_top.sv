// tb_softchip_top: end-to-end run of the whole 3D-SoftChip at its default
// sizes.  The host broadcasts two programs into program banks 0 and 1 of all
// four unit chips (the same program everywhere: massively parallel model)
// and gives each unit chip its own operands.  Program A: DMA the operands
// into the frame buffer, swap buffers, add two 32-bit words on the chained
// standard PEs (32-bit word mode), read the result back, pass it to the next
// unit chip over the link ring (pipelined model), run a serial multiply
// that stalls the following PE instruction, then switch to program bank 1
// at run time.  Program B: multiply-accumulate on all accelerator PEs inside
// a loop-buffer loop, a 16-bit paired shift, and a horizontal move in which
// PEs take data from the neighbouring unit chip's PE array, then different
// instructions stored in the PEs' instruction registers, started together.
// Every mechanism is counted and must occur at least once.
module tb_softchip_top;
  import pe_pkg::*;
  import ics_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] run = 0;
  logic host_pm_we = 0, host_dm_we = 0;
  logic [3:0] host_pm_units = 0, host_dm_units = 0;
  logic [0:0] host_pm_bank = 0;
  logic [7:0] host_pm_addr = 0;
  logic [9:0] host_dm_addr = 0;
  logic [31:0] host_pm_wdata = 0, host_dm_wdata = 0, host_dm_rdata;
  logic [1:0] host_dm_rsel = 0;
  logic [3:0] halted, imem_fetch, ics_stall, pe_busy, dma_busy;
  logic [3:0] edge_w_in [8], edge_e_in [8], edge_n_in [8], edge_s_in [8];
  logic [3:0] edge_w_out [8], edge_e_out [8], edge_n_out [8], edge_s_out [8];
  logic [31:0] pa [128];
  logic [31:0] pb [128];
  int na = 0, nb = 0;
  int checks = 0, failures = 0;
  int n_dma = 0, n_stall = 0, n_replay = 0, n_busy = 0, cycles = 0;

  softchip_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
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
  task automatic need(input int count, input string what);
    checks++;
    $display("mechanism %-34s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask
  function automatic void ea(input logic [31:0] w); pa[na] = w; na++; endfunction
  function automatic void eb(input logic [31:0] w); pb[nb] = w; nb++; endfunction
  function automatic logic [31:0] lanes(input logic [31:0] v, input int q);
    return {16'b0, 4'b0, v[8*q+4 +: 4], 4'b0, v[8*q +: 4]};
  endfunction

  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int u = 0; u < 4; u++) begin
      if (dma_busy[u]) n_dma++;
      if (ics_stall[u]) n_stall++;
      if (pe_busy[u]) n_busy++;
      if (run[u] && !halted[u] && !ics_stall[u] && !imem_fetch[u]) n_replay++;
    end
  end

  task automatic host_read(input int u, input int addr, output logic [31:0] v);
    host_dm_rsel = 2'(u); host_dm_addr = 10'(addr); #1;
    v = host_dm_rdata;
  endtask

  initial begin
    logic [31:0] x [4], y [4], v;
    // ---------------- program A (bank 0) ----------------
    ea(enc_i(OP_ADDI, 1, 0, 16'h8000));
    ea(enc_i(OP_ADDI, 2, 0, 16'h4000));
    ea(enc_i(OP_ADDI, 3, 0, 16'd8));
    ea(enc_i(OP_SW, 0, 1, 16'd0));
    ea(enc_i(OP_SW, 0, 1, 16'd4));
    ea(enc_i(OP_SW, 3, 1, 16'd8));
    ea(enc_i(OP_ADDI, 4, 0, 16'd1));
    ea(enc_i(OP_SW, 4, 1, 16'd12));               // DMA start
    ea(enc_i(OP_LW, 5, 1, 16'd12));
    ea(enc_i(OP_BNE, 5, 0, -16'sd2));             // wait for DMA
    ea(enc_i(OP_SW, 0, 1, 16'd16));               // swap frame buffers
    ea(enc_i(OP_ADDI, 8, 0, 16'd3));
    ea(enc_i(OP_SW, 8, 1, 16'd36));               // 32-bit words
    for (int q = 0; q < 4; q++) begin
      ea(enc_i(OP_LW, 9, 2, 16'(4 * q)));
      ea(enc_i(OP_PEBUS, 0, 9, 16'(1 << q)));
    end
    ea(enc_pei(4'hf, 2'b01, pe_instr(0, 1, 0, 0, 2'd0, 0, SPE_OR, SRC_BUS, SRC_BUS)));
    for (int q = 0; q < 4; q++) begin
      ea(enc_i(OP_LW, 9, 2, 16'(16 + 4 * q)));
      ea(enc_i(OP_PEBUS, 0, 9, 16'(1 << q)));
    end
    ea(enc_pei(4'hf, 2'b01, pe_instr(0, 0, 0, 0, 2'd0, 1, SPE_ADD, SRC_REG, SRC_BUS)));
    for (int q = 0; q < 4; q++) ea(enc_i(OP_PERD, 5'(10 + q), 0, 16'(q)));
    for (int q = 0; q < 4; q++) ea(enc_i(OP_SW, 5'(10 + q), 0, 16'(32'h100 + 4 * q)));
    ea(enc_i(OP_SW, 10, 1, 16'd24));              // send to next unit chip
    ea(enc_i(OP_LW, 15, 1, 16'd32));
    ea(enc_i(OP_BEQ, 15, 0, -16'sd2));            // wait for the previous one
    ea(enc_i(OP_LW, 16, 1, 16'd28));
    ea(enc_i(OP_SW, 16, 0, 16'h114));
    ea(enc_pei(4'h1, 2'b01, pe_instr(0, 0, 0, 0, 2'd0, 1, SPE_SPMUL, SRC_REG, SRC_OUT)));
    ea(enc_pei(4'h1, 2'b01, pe_instr(0, 1, 0, 0, 2'd1, 0, SPE_OR, SRC_OUT, SRC_OUT)));
    ea(enc_i(OP_ADDI, 20, 0, 16'd1));
    ea(enc_i(OP_SW, 20, 1, 16'd20));              // fetch from bank 1 ...
    ea(enc_i(OP_JMP, 0, 0, 16'd0));               // ... from its start
    // ---------------- program B (bank 1) ----------------
    eb(enc_i(OP_ADDI, 1, 0, 16'h8000));
    eb(enc_i(OP_SW, 0, 1, 16'd36));               // 4-bit words, no pairing
    eb(enc_i(OP_ADDI, 3, 0, 16'h3030));           // accelerator lanes = 3
    eb(enc_i(OP_PEBUS, 0, 3, 16'hf));
    eb(enc_pei(4'hf, 2'b10, pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, SRC_BUS)));
    eb(enc_i(OP_ADDI, 4, 0, 16'd5));
    eb(enc_i(OP_LOOP, 0, 4, 16'd0));
    eb(enc_pei(4'hf, 2'b10, pe_instr(0, 0, 0, 0, 0, 1, PA_MAC, SRC_BUS, SRC_BUS)));
    eb(enc_i(OP_PERD, 5, 0, 16'd0));
    eb(enc_i(OP_SW, 5, 0, 16'h120));
    eb(enc_i(OP_ADDI, 6, 0, 16'h3c));             // pair the shifters of all quads
    eb(enc_i(OP_SW, 6, 1, 16'd36));
    eb(enc_i(OP_ADDI, 7, 0, 16'h4040));           // shift amount 4
    eb(enc_i(OP_PEBUS, 0, 7, 16'hf));
    eb(enc_pei(4'hf, 2'b10, pe_instr(0, 0, 0, 0, 0, 1, PA_LSL, SRC_BUS, SRC_BUS)));
    eb(enc_i(OP_PERD, 8, 0, 16'd0));
    eb(enc_i(OP_SW, 8, 0, 16'h124));
    eb(enc_pei(4'hf, 2'b01, pe_instr(0, 0, 0, 0, 0, 1, SPE_OR, SRC_W, SRC_W)));
    eb(enc_i(OP_PERD, 9, 0, 16'd0));
    eb(enc_i(OP_SW, 9, 0, 16'h128));
    // stored instructions: OR in the standard PEs and PAMUL in the
    // accelerator PEs, both in slot 2, then started by one PEX
    eb(enc_i(OP_ADDI, 11, 0, 16'(pe_instr(0, 0, 0, 0, 0, 1, SPE_OR, SRC_BUS, SRC_BUS))));
    eb(enc_i(OP_PEST, 0, 11, pe_sel(4'hf, 2'b01, 2'd2)));
    eb(enc_i(OP_ADDI, 12, 0, 16'(pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, SRC_BUS))));
    eb(enc_i(OP_PEST, 0, 12, pe_sel(4'hf, 2'b10, 2'd2)));
    eb(enc_i(OP_ADDI, 13, 0, 16'h2525));
    eb(enc_i(OP_PEBUS, 0, 13, 16'hf));
    eb(enc_i(OP_PEX, 0, 0, pe_sel(4'hf, 2'b11, 2'd2)));
    eb(enc_i(OP_PERD, 14, 0, 16'd3));
    eb(enc_i(OP_SW, 14, 0, 16'h12c));
    eb(enc_i(OP_HALT, 0, 0, 16'd0));

    for (int i = 0; i < 8; i++) begin
      edge_w_in[i] = 4'(8 + i); edge_e_in[i] = 4'(i); edge_n_in[i] = 4'(i); edge_s_in[i] = 4'(i);
    end
    for (int u = 0; u < 4; u++) begin
      x[u] = $urandom; y[u] = $urandom;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // broadcast both programs, then the operands of each unit chip
    host_pm_units = 4'hf;
    for (int i = 0; i < na; i++) begin
      @(negedge clk); host_pm_we = 1; host_pm_bank = 0; host_pm_addr = 8'(i); host_pm_wdata = pa[i];
    end
    for (int i = 0; i < nb; i++) begin
      @(negedge clk); host_pm_we = 1; host_pm_bank = 1; host_pm_addr = 8'(i); host_pm_wdata = pb[i];
    end
    @(negedge clk); host_pm_we = 0;
    for (int u = 0; u < 4; u++)
      for (int q = 0; q < 4; q++) begin
        @(negedge clk); host_dm_we = 1; host_dm_units = 4'(1 << u);
        host_dm_addr = 10'(q); host_dm_wdata = lanes(y[u], q);
        @(negedge clk); host_dm_addr = 10'(4 + q); host_dm_wdata = lanes(x[u], q);
      end
    @(negedge clk); host_dm_we = 0;
    cycles = 0;
    run = 4'hf;
    wait (&halted);
    $display("all four unit chips halted after %0d clocks", cycles);
    @(negedge clk); run = 0;

    for (int u = 0; u < 4; u++) begin
      logic [31:0] s, sum, w0, prev0;
      sum = x[u] + y[u];
      s = 0;
      for (int q = 0; q < 4; q++) begin
        host_read(u, 32'h40 + q, v);
        s[8*q +: 4] = v[3:0];
        s[8*q + 4 +: 4] = v[15:12];
      end
      check(s, sum, $sformatf("unit %0d: 32-bit add", u + 1));
      host_read((u + 3) % 4, 32'h40, prev0);
      host_read(u, 32'h45, w0);
      check(w0, prev0, $sformatf("unit %0d: word from previous unit over the link", u + 1));
      host_read(u, 32'h48, v);
      check(32'(v[11:4]), 32'h36, $sformatf("unit %0d: 9 + 5 MACs of 3x3 (top)", u + 1));
      check(32'(v[23:16]), 32'h36, $sformatf("unit %0d: 9 + 5 MACs of 3x3 (bottom)", u + 1));
      host_read(u, 32'h49, v);
      check(32'({v[23:16], v[11:4]}), 32'h6360, $sformatf("unit %0d: 16-bit shift 0x3636 << 4", u + 1));
      host_read(u, 32'h4a, v);
      // west neighbours of quad 0's standard PEs: chip edge for units 1 and 4,
      // the accelerator PEs of the unit chip to the left for units 2 and 3
      case (u)
        0: begin check(32'(v[3:0]), 32'h8, "unit 1 row 0 from west edge");
                 check(32'(v[15:12]), 32'h9, "unit 1 row 1 from west edge"); end
        3: begin check(32'(v[3:0]), 32'hc, "unit 4 row 0 from west edge");
                 check(32'(v[15:12]), 32'hd, "unit 4 row 1 from west edge"); end
        default: begin
          check(32'(v[3:0]), 32'h0, $sformatf("unit %0d row 0 from unit to the left", u + 1));
          check(32'(v[15:12]), 32'h3, $sformatf("unit %0d row 1 from unit to the left", u + 1));
        end
      endcase
      host_read(u, 32'h4b, v);
      check(v, 32'h00045045, $sformatf("unit %0d: stored OR / PAMUL started by one PEX", u + 1));
    end
    need(n_dma, "DMA transfer clocks");
    need(n_stall, "processor stall clocks");
    need(n_busy, "serial-multiply busy clocks");
    need(n_replay, "loop-buffer replay clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
