// tb_ics_risc: runs a short program on the control processor against a
// program memory, data memory and PE-array model kept here.  It checks
// arithmetic with back-to-back dependences, load/store, a counted branch
// loop, a LOOP through the loop buffer (body fetched from program memory only
// during its first pass), the PE-array instructions (PEI fields, data-bus
// lanes, switch configuration, read-back), a PEI held in E for 3 clocks by a
// busy array, JMP, and HALT.
module tb_ics_risc;
  import ics_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] imem_addr, imem_rdata, dbus_addr, dbus_wdata, dbus_rdata, rd_word;
  logic imem_fetch, dbus_req, dbus_we, pei_valid, bus_we, cfg_we, pe_busy, halted, stall;
  logic [1:0] dbus_size, pei_types, rd_quad;
  logic [3:0] pei_quads, bus_quads, cfg_quads;
  logic [18:0] pei_instr;
  pe_pkg::pei_mode_e pei_mode;
  logic [1:0] pei_slot;
  logic [15:0] bus_wdata;
  logic [4:0] cfg_wdata;
  logic [31:0] pm [64];
  logic [31:0] dm [64];
  int checks = 0, failures = 0;
  int fetch13 = 0, stalls = 0, peis = 0, buses = 0, cfgs = 0, cycles = 0, busy_budget = 3;

  ics_risc dut (.*);
  assign imem_rdata = pm[imem_addr[5:0]];
  assign dbus_rdata = dm[dbus_addr[7:2]];
  assign rd_word    = 32'h00abcd00 + 32'(rd_quad);
  // the PEI at word 15 is in E while F fetches word 17
  assign pe_busy    = imem_addr == 32'd17 && busy_budget > 0;

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
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

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dbus_req && dbus_we) dm[dbus_addr[7:2]] <= dbus_wdata;
    if (imem_fetch && imem_addr == 32'd13) fetch13++;
    if (stall) begin stalls++; busy_budget--; end
    if (pei_valid) begin
      peis++;
      check(32'(pei_quads), 32'b0101, "PEI quad mask");
      check(32'(pei_types), 32'b01, "PEI type mask");
      check(32'(pei_mode), 32'(pe_pkg::PEI_DIRECT), "PEI executes its own instruction");
      check(32'(pei_instr), 32'h12345, "PEI instruction");
    end
    if (bus_we) begin
      buses++;
      check(32'(bus_quads), 32'b0011, "PEBUS quads");
      check(32'(bus_wdata), 32'd12, "PEBUS lanes");
    end
    if (cfg_we) begin
      cfgs++;
      check(32'(cfg_quads), 32'b1000, "SBCFG quads");
      check(32'(cfg_wdata), 32'd5, "SBCFG word");
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) begin pm[i] = '0; dm[i] = '0; end
    pm[0]  = enc_i(OP_ADDI, 1, 0, 16'd5);
    pm[1]  = enc_i(OP_ADDI, 2, 0, 16'd7);
    pm[2]  = enc_r(OP_ADD, 3, 1, 2);
    pm[3]  = enc_r(OP_SUB, 4, 3, 1);
    pm[4]  = enc_i(OP_SW, 3, 0, 16'h10);
    pm[5]  = enc_i(OP_LW, 5, 0, 16'h10);
    pm[6]  = enc_i(OP_LUI, 6, 0, 16'h1234);
    pm[7]  = enc_i(OP_ADDI, 7, 0, 16'd0);
    pm[8]  = enc_i(OP_ADDI, 8, 0, 16'd3);
    pm[9]  = enc_i(OP_ADDI, 7, 7, 16'd1);
    pm[10] = enc_i(OP_BNE, 7, 8, -16'sd2);
    pm[11] = enc_i(OP_ADDI, 9, 0, 16'd4);
    pm[12] = enc_i(OP_LOOP, 0, 9, 16'd1);       // two-word body, R9 = 4 times
    pm[13] = enc_i(OP_ADDI, 10, 10, 16'd2);
    pm[14] = enc_i(OP_ADDI, 11, 11, 16'd3);
    pm[15] = enc_pei(4'b0101, 2'b01, 19'h12345);
    pm[16] = enc_i(OP_PEBUS, 0, 3, 16'b0011);
    pm[17] = enc_i(OP_PERD, 12, 0, 16'd2);
    pm[18] = enc_i(OP_SBCFG, 0, 1, 16'b1000);
    pm[19] = enc_i(OP_JMP, 0, 0, 16'd21);
    pm[20] = enc_i(OP_ADDI, 13, 0, 16'd99);
    for (int r = 1; r < 15; r++) pm[20 + r] = enc_i(OP_SW, 5'(r), 0, 16'(32'h80 + 4 * r));
    pm[35] = enc_i(OP_SW, 10, 0, 16'h14);
    pm[36] = enc_i(OP_HALT, 0, 0, 16'd0);
    pm[37] = enc_i(OP_ADDI, 14, 0, 16'd1);
    pm[38] = enc_i(OP_SW, 14, 0, 16'h80 + 16'd56);
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (halted);
    repeat (5) @(negedge clk);
    check(dm[32 + 1], 5, "r1");
    check(dm[32 + 3], 12, "r3 = r1 + r2 (back to back)");
    check(dm[32 + 4], 7, "r4 = r3 - r1");
    check(dm[32 + 5], 12, "load after store");
    check(dm[32 + 6], 32'h12340000, "LUI");
    check(dm[32 + 7], 3, "branch loop count");
    check(dm[32 + 10], 8, "loop buffer body 1 x4");
    check(dm[32 + 11], 12, "loop buffer body 2 x4");
    check(dm[32 + 12], 32'h00abcd02, "PERD quad 2");
    check(dm[32 + 13], 0, "JMP skipped word");
    check(dm[32 + 14], 0, "nothing after HALT");
    check(dm[5], 8, "store of loop result");
    check(fetch13, 2, "loop body fetched once (plus one discarded fetch)");
    check(stalls, 3, "PEI stall clocks");
    check(peis, 1, "PEI issued once");
    check(buses, 1, "PEBUS once");
    check(cfgs, 1, "SBCFG once");
    $display("program took %0d clocks", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
