// tb_cap_array: checks the 16-PE array of one unit chip.
//  * word-length modes 4, 8, 16 and 32 bit: ADD, SUB, COMP and ABS on the
//    chained standard PEs against reference arithmetic on whole words;
//  * horizontal and vertical modes: every PE takes its west (or north)
//    neighbour's value in one step, across quad borders and from the edge
//    ports, compared with a model of the 4x4 grid;
//  * busy while a standard PE runs a serial multiply.
module tb_cap_array;
  import pe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PE_IW-1:0] instr [16];
  logic instr_valid [16];
  logic [3:0] din_bus [16];
  logic [3:0] dout_s [8], mul_hi [8];
  logic [7:0] dout_pa [8];
  logic busy;
  logic [3:0] edge_w_in [4], edge_e_in [4], edge_n_in [4], edge_s_in [4];
  logic [3:0] edge_w_out [4], edge_e_out [4], edge_n_out [4], edge_s_out [4];
  wl_mode_e wl_mode;
  logic sh16_en [4];
  int checks = 0, failures = 0;
  cap_array dut (.*);
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
  // PE id of S-PE slice k, and grid position of a PE id
  function automatic int spe_id(input int k); return 4 * (k / 2) + 2 * (k % 2); endfunction
  function automatic int row_of(input int id); return 2 * ((id / 4) / 2) + (id % 4) / 2; endfunction
  function automatic int col_of(input int id); return 2 * ((id / 4) % 2) + (id % 4) % 2; endfunction
  function automatic logic [3:0] val_of(input int id);
    return (id % 2 == 0) ? dout_s[2 * (id / 4) + (id % 4) / 2] : dout_pa[2 * (id / 4) + (id % 4) / 2][3:0];
  endfunction

  task automatic issue_all(input logic [PE_IW-1:0] is, input logic [PE_IW-1:0] ipa, input logic s_only);
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      instr[i] = (i % 2 == 0) ? is : ipa;
      instr_valid[i] = (i % 2 == 0) || !s_only;
    end
    @(negedge clk);
    for (int i = 0; i < 16; i++) instr_valid[i] = 0;
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin instr[i] = 0; instr_valid[i] = 0; din_bus[i] = 0; end
    for (int i = 0; i < 4; i++) begin
      edge_w_in[i] = 4'(i + 1); edge_e_in[i] = 4'(i + 5); edge_n_in[i] = 4'(i + 9); edge_s_in[i] = 4'(i + 12);
      sh16_en[i] = 0;
    end
    wl_mode = WL_4;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // word-length modes
    for (int t = 0; t < 160; t++) begin
      int g, nw;
      spe_op_e o;
      logic [31:0] x, y;
      wl_mode = wl_mode_e'(t % 4);
      g = 1 << (t % 4);
      nw = 8 / g;
      case ($urandom_range(0, 3))
        0: o = SPE_ADD;
        1: o = SPE_SUB;
        2: o = SPE_COMP;
        default: o = SPE_ABS;
      endcase
      x = $urandom; y = $urandom;
      // y into register 0 of every S-PE, x on the bus
      for (int k = 0; k < 8; k++) din_bus[spe_id(k)] = y[4*k +: 4];
      issue_all(pe_instr(0, 1, 0, 0, 2'd0, 0, SPE_OR, SRC_BUS, SRC_BUS), '0, 1);
      for (int k = 0; k < 8; k++) din_bus[spe_id(k)] = x[4*k +: 4];
      issue_all(pe_instr(0, 0, 0, 0, 2'd0, 1, o, SRC_REG, SRC_BUS), '0, 1);
      for (int w = 0; w < nw; w++) begin
        logic [31:0] xw, yw, rw, got;
        logic [31:0] msk;
        msk = (g == 8) ? 32'hffffffff : (32'h1 << (4 * g)) - 1;
        xw = (x >> (4 * g * w)) & msk;
        yw = (y >> (4 * g * w)) & msk;
        got = 0;
        for (int j = 0; j < g; j++) got |= 32'(dout_s[w * g + j]) << (4 * j);
        case (o)
          SPE_ADD: rw = (xw + yw) & msk;
          SPE_SUB: rw = (xw - yw) & msk;
          SPE_ABS: rw = (xw[4*g-1] ? -xw : xw) & msk;
          default: rw = 0;
        endcase
        if (o == SPE_COMP)
          check(32'(dout_s[w * g + g - 1]), {29'b0, xw > yw, xw < yw, xw == yw},
                $sformatf("COMP %0d-bit", 4 * g));
        else
          check(got, rw, $sformatf("%s %0d-bit word %0d", o.name(), 4 * g, w));
      end
    end

    // horizontal mode (take from west) then vertical mode (take from north)
    for (int dir = 0; dir < 2; dir++) begin
      for (int i = 0; i < 16; i++) din_bus[i] = 4'($urandom);
      issue_all(pe_instr(0, 0, 0, 0, 0, 1, SPE_OR, SRC_BUS, SRC_BUS), '0, 1);
      for (int i = 0; i < 16; i++) if (i % 2 == 1) din_bus[i] = 4'($urandom_range(1, 7));
      issue_all('0, pe_instr(0, 0, 0, 0, 0, 1, PA_ABS, SRC_BUS, SRC_BUS), 0);
      for (int i = 0; i < 16; i++) din_bus[i] = 4'h1;
      for (int step = 0; step < 4; step++) begin
        logic [3:0] grid [4][4];
        mux_src_e src;
        src = dir == 0 ? SRC_W : SRC_N;
        for (int i = 0; i < 16; i++) grid[row_of(i)][col_of(i)] = val_of(i);
        // S-PEs: OR with itself; PA-PEs: multiply by 1 (bus); keep values positive
        issue_all(pe_instr(0, 0, 0, 0, 0, 1, SPE_OR, src, src),
                  pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, src), 0);
        for (int i = 0; i < 16; i++) begin
          int r, c;
          logic [3:0] e;
          r = row_of(i); c = col_of(i);
          if (dir == 0) e = (c == 0) ? edge_w_in[r] : grid[r][c-1];
          else          e = (r == 0) ? edge_n_in[c] : grid[r-1][c];
          // a PA-PE holds sign-extended products; only the low nibble moves on
          check(32'(val_of(i)), 32'(e), dir == 0 ? "horizontal step" : "vertical step");
        end
        for (int r = 0; r < 4; r++) begin
          check(32'(edge_e_out[r]), 32'(val_of(r < 2 ? 4 + 2 * r + 1 : 12 + 2 * (r - 2) + 1)), "east edge out");
        end
      end
    end

    // serial multiply makes the array busy for 4 clocks
    begin
      int n;
      issue_all(pe_instr(0, 0, 0, 0, 0, 1, SPE_SPMUL, SRC_BUS, SRC_BUS), '0, 1);
      n = 0;
      while (busy) begin @(negedge clk); n++; end
      check(32'(n), 32'd4, "busy clocks of a serial multiply");
      check(32'(dout_s[0]), 32'd1, "1 x 1");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
