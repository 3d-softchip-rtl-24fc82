// tb_ics_risc_pe: checks the control processor's commands for the PE
// instruction registers.  PEST must store (mode STORE, instruction from a
// register, quads/types/slot from the immediate) without making a following
// PERD wait; PEX must start stored instructions (mode EXEC), wait in E while
// the PE array is busy, and make a directly following PERD wait one clock.
// The PE array is modelled here: the first PEX keeps the array busy for
// 4 clocks.
module tb_ics_risc_pe;
  import ics_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] imem_addr, imem_rdata, dbus_addr, dbus_wdata, dbus_rdata, rd_word;
  logic imem_fetch, dbus_req, dbus_we, pei_valid, bus_we, cfg_we, halted, stall;
  logic pe_busy;
  logic [1:0] dbus_size, pei_types, rd_quad;
  logic [3:0] pei_quads, bus_quads, cfg_quads;
  logic [18:0] pei_instr;
  pe_pkg::pei_mode_e pei_mode;
  logic [1:0] pei_slot;
  logic [15:0] bus_wdata;
  logic [4:0] cfg_wdata;
  logic [31:0] pm [16];
  logic [31:0] dm [16];
  int checks = 0, failures = 0, stalls = 0, events = 0, busy_cnt = 0;

  ics_risc dut (.*);
  assign imem_rdata = pm[imem_addr[3:0]];
  assign dbus_rdata = dm[dbus_addr[5:2]];
  assign rd_word    = 32'h00abcd00 + 32'(rd_quad);
  assign pe_busy    = busy_cnt > 0;

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
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
    if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (dbus_req && dbus_we) dm[dbus_addr[5:2]] <= dbus_wdata;
    if (stall) stalls++;
    if (pei_valid) begin
      case (events)
        0: begin
          check(32'(pei_mode), 32'(pe_pkg::PEI_STORE), "PEST mode");
          check(32'(pei_quads), 32'b1010, "PEST quads");
          check(32'(pei_types), 32'b10, "PEST types");
          check(32'(pei_slot), 32'd3, "PEST slot");
          check(32'(pei_instr), 32'h1a5, "PEST instruction from register");
        end
        1: begin
          check(32'(pei_mode), 32'(pe_pkg::PEI_EXEC), "first PEX mode");
          check(32'(pei_quads), 32'b0110, "first PEX quads");
          check(32'(pei_types), 32'b01, "first PEX types");
          check(32'(pei_slot), 32'd3, "first PEX slot");
          busy_cnt <= 4;
        end
        2: begin
          check(32'(pei_mode), 32'(pe_pkg::PEI_EXEC), "second PEX mode");
          check(32'(pei_quads), 32'b1111, "second PEX quads");
          check(32'(pei_types), 32'b11, "second PEX types");
          check(32'(pei_slot), 32'd1, "second PEX slot");
        end
        default: check(0, 1, "unexpected PE command");
      endcase
      events++;
    end
  end

  initial begin
    for (int i = 0; i < 16; i++) begin pm[i] = '0; dm[i] = '0; end
    pm[0] = enc_i(OP_ADDI, 1, 0, 16'h1a5);
    pm[1] = enc_i(OP_PEST, 0, 1, pe_sel(4'b1010, 2'b10, 2'd3));
    pm[2] = enc_i(OP_PERD, 3, 0, 16'd1);          // no wait after a store
    pm[3] = enc_i(OP_PEX, 0, 0, pe_sel(4'b0110, 2'b01, 2'd3));
    pm[4] = enc_i(OP_PEX, 0, 0, pe_sel(4'b1111, 2'b11, 2'd1));  // waits 4 clocks
    pm[5] = enc_i(OP_PERD, 2, 0, 16'd2);          // waits 1 clock
    pm[6] = enc_i(OP_SW, 2, 0, 16'h20);
    pm[7] = enc_i(OP_SW, 3, 0, 16'h24);
    pm[8] = enc_i(OP_HALT, 0, 0, 16'd0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (halted);
    repeat (2) @(negedge clk);
    check(32'(events), 3, "PE commands issued");
    check(32'(stalls), 5, "stall clocks: 4 for the busy array, 1 for PERD after PEX");
    check(dm[8], 32'h00abcd02, "PERD after PEX");
    check(dm[9], 32'h00abcd01, "PERD after PEST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
