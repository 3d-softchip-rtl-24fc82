// tb_switch_block: checks that PE instructions reach exactly the enabled PEs
// of the addressed type with a one-clock valid pulse one clock after issue,
// that unaddressed quads ignore them, that data-bus lanes load per lane or
// by broadcast, and that PE results are packed into the read-back word.
// Commands are random mixes of direct issue, storing into one of the four
// instruction registers of each selected PE, and executing a stored one;
// a model of the registers gives the expected instruction.
module tb_switch_block;
  import pe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pei_valid = 0, pei_hit = 0, cfg_we = 0, bus_we = 0;
  logic [1:0] pei_types = 0;
  logic [PE_IW-1:0] pei_instr = 0;
  pei_mode_e pei_mode = PEI_DIRECT;
  logic [1:0] pei_slot = 0;
  logic [PE_IW-1:0] model [4][4];
  int n_store = 0, n_exec = 0;
  logic [4:0] cfg_wdata = 0, cfg;
  logic [15:0] bus_wdata = 0;
  logic [31:0] rd_word;
  logic [PE_IW-1:0] instr [4];
  logic instr_valid [4];
  logic [3:0] din_bus [4];
  logic [3:0] dout_s [2];
  logic [7:0] dout_pa [2];
  int checks = 0, failures = 0;
  switch_block dut (.*);
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
    for (int k = 0; k < 4; k++) for (int j = 0; j < 4; j++) model[k][j] = '0;
    for (int t = 0; t < 300; t++) begin
      logic [3:0] en;
      logic [1:0] ty;
      logic hit, bc;
      pei_mode_e md;
      logic [1:0] sl;
      logic [PE_IW-1:0] ins;
      logic [PE_IW-1:0] prev_ins [4];
      en = 4'($urandom); bc = 1'($urandom); ty = 2'($urandom); hit = 1'($urandom);
      ins = PE_IW'($urandom);
      md = pei_mode_e'($urandom_range(2)); sl = 2'($urandom);
      @(negedge clk); cfg_we = 1; cfg_wdata = {bc, en};
      @(negedge clk); cfg_we = 0;
      check(32'(cfg), 32'({bc, en}), "config");
      for (int k = 0; k < 4; k++) prev_ins[k] = instr[k];
      pei_valid = 1; pei_hit = hit; pei_types = ty; pei_instr = ins;
      pei_mode = md; pei_slot = sl;
      bus_we = 1; bus_wdata = 16'($urandom);
      @(negedge clk); pei_valid = 0; bus_we = 0;
      for (int k = 0; k < 4; k++) begin
        logic sel, go;
        logic [PE_IW-1:0] exp_ins;
        sel = hit && en[k] && ty[k % 2];
        go = sel && md != PEI_STORE;
        exp_ins = !go ? prev_ins[k] : (md == PEI_EXEC) ? model[k][sl] : ins;
        if (sel && md == PEI_STORE) begin model[k][sl] = ins; n_store++; end
        if (sel && md == PEI_EXEC) n_exec++;
        check(32'(instr_valid[k]), 32'(go), "valid pulse");
        check(32'(instr[k]), 32'(exp_ins), "instruction latched");
        check(32'(din_bus[k]), 32'(bc ? bus_wdata[3:0] : bus_wdata[4*k +: 4]), "bus lane");
      end
      @(negedge clk);
      for (int k = 0; k < 4; k++) check(32'(instr_valid[k]), 0, "valid lasts one clock");
      dout_s[0] = 4'($urandom); dout_s[1] = 4'($urandom);
      dout_pa[0] = 8'($urandom); dout_pa[1] = 8'($urandom);
      #1 check(rd_word, {8'b0, dout_pa[1], dout_s[1], dout_pa[0], dout_s[0]}, "read-back word");
    end
    checks++;
    if (n_store == 0 || n_exec == 0) failures++;
    $display("stores %0d, executions of stored instructions %0d", n_store, n_exec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
