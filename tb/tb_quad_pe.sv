// tb_quad_pe: checks one quad: 8-bit words on the two chained standard PEs
// (ADD, SUB, COMP, ABS against reference arithmetic), a circular data
// rotation through all four PEs over the inter-PE links, the edge ports, and
// the paired 16-bit shifter of the two accelerator PEs.
module tb_quad_pe;
  import pe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PE_IW-1:0] instr [4];
  logic instr_valid [4];
  logic [3:0] din_bus [4];
  logic [3:0] dout_s [2], mul_hi [2];
  logic [7:0] dout_pa [2];
  logic busy;
  logic [3:0] edge_w_in [2], edge_e_in [2], edge_n_in [2], edge_s_in [2];
  logic [3:0] edge_w_out [2], edge_e_out [2], edge_n_out [2], edge_s_out [2];
  logic wl_lsb [2], carry_out, sign_in [2], sign_out [2], sh16_en;
  cmp_t cmp_out;
  int checks = 0, failures = 0;

  quad_pe dut (.*, .carry_in(1'b0), .cmp_in(cmp_t'(3'b001)));
  // 8-bit word: top S-PE is the low slice, sign from the bottom one
  assign wl_lsb[0] = 1'b1;
  assign wl_lsb[1] = 1'b0;
  assign sign_in[0] = sign_out[1];
  assign sign_in[1] = sign_out[1];

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
  // issue per-PE instructions (mask selects which PEs get one)
  task automatic issue(input logic [3:0] mask, input logic [PE_IW-1:0] i0, input logic [PE_IW-1:0] i1,
                       input logic [PE_IW-1:0] i2, input logic [PE_IW-1:0] i3);
    @(negedge clk);
    instr[0] = i0; instr[1] = i1; instr[2] = i2; instr[3] = i3;
    for (int k = 0; k < 4; k++) instr_valid[k] = mask[k];
    @(negedge clk);
    for (int k = 0; k < 4; k++) instr_valid[k] = 0;
  endtask

  function automatic logic [7:0] abs8(input logic [3:0] v);
    logic signed [7:0] s;
    s = 8'($signed(v));
    return s < 0 ? 8'(-s) : 8'(s);
  endfunction

  initial begin
    logic [PE_IW-1:0] ld_r0, op;
    logic [7:0] x, y, r;
    for (int k = 0; k < 4; k++) begin instr[k] = 0; instr_valid[k] = 0; din_bus[k] = 0; end
    for (int k = 0; k < 2; k++) begin
      edge_w_in[k] = 4'h1 + 4'(k); edge_e_in[k] = 4'h3 + 4'(k);
      edge_n_in[k] = 4'h5 + 4'(k); edge_s_in[k] = 4'h7 + 4'(k);
    end
    sh16_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    ld_r0 = pe_instr(0, 1, 0, 0, 2'd0, 0, SPE_OR, SRC_BUS, SRC_BUS);
    for (int t = 0; t < 200; t++) begin
      spe_op_e o;
      int k;
      k = $urandom_range(0, 3);
      o = (k == 0) ? SPE_ADD : (k == 1) ? SPE_SUB : (k == 2) ? SPE_COMP : SPE_ABS;
      x = 8'($urandom); y = 8'($urandom);
      din_bus[0] = y[3:0]; din_bus[2] = y[7:4];
      issue(4'b0101, ld_r0, '0, ld_r0, '0);
      din_bus[0] = x[3:0]; din_bus[2] = x[7:4];
      op = pe_instr(0, 0, 0, 0, 2'd0, 1, o, SRC_REG, SRC_BUS);
      issue(4'b0101, op, '0, op, '0);
      case (o)
        SPE_ADD: r = x + y;
        SPE_SUB: r = x - y;
        SPE_ABS: r = x[7] ? 8'(-x) : x;
        default: r = 8'b0;
      endcase
      if (o == SPE_COMP) check(32'(dout_s[1]), 32'({1'b0, x > y, x < y, x == y}), "8-bit COMP");
      else check(32'({dout_s[1], dout_s[0]}), 32'(r), {"8-bit ", o.name()});
    end

    // circular rotation PE0 -> PE1 -> PE3 -> PE2 -> PE0
    din_bus[0] = 4'h1; din_bus[1] = 4'h2; din_bus[2] = 4'h4; din_bus[3] = 4'h1;
    issue(4'b0101, pe_instr(0, 0, 0, 0, 0, 1, SPE_OR, SRC_BUS, SRC_BUS), '0,
          pe_instr(0, 0, 0, 0, 0, 1, SPE_OR, SRC_BUS, SRC_BUS), '0);
    // PE0 = 1, PE2 = 4; PE1 = 2 * 1 and PE3 = 3 * 4 (bus times west neighbour)
    din_bus[1] = 4'h2; din_bus[3] = 4'h3;
    issue(4'b1010, '0, pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, SRC_W), '0,
          pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, SRC_W));
    din_bus[1] = 4'h1; din_bus[3] = 4'h1;
    for (int step = 0; step < 8; step++) begin
      logic [3:0] v0, v1, v2, v3;
      v0 = dout_s[0]; v1 = dout_pa[0][3:0]; v2 = dout_s[1]; v3 = dout_pa[1][3:0];
      issue(4'b1111,
            pe_instr(0, 0, 0, 0, 0, 1, SPE_OR, SRC_S, SRC_S),         // PE0 <- PE2 (below)
            pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, SRC_W),     // PE1 <- PE0 (west)
            pe_instr(0, 0, 0, 0, 0, 1, SPE_OR, SRC_E, SRC_E),         // PE2 <- PE3 (east)
            pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, SRC_N));    // PE3 <- PE1 (north)
      check(32'(dout_s[0]), 32'(v2), "rotate into PE0");
      check(32'(dout_pa[0][3:0]), 32'(v0), "rotate into PE1");
      check(32'(dout_s[1]), 32'(v3), "rotate into PE2");
      check(32'(dout_pa[1][3:0]), 32'(v1), "rotate into PE3");
    end

    // edges
    issue(4'b0101, pe_instr(0, 0, 0, 0, 0, 1, SPE_ADD, SRC_N, SRC_W), '0,
          pe_instr(0, 0, 0, 0, 0, 1, SPE_ADD, SRC_S, SRC_W), '0);
    check(32'(dout_s[0]), 32'(4'h1 + 4'h5), "west+north edge into PE0");
    check(32'(dout_s[1]), 32'(4'h2 + 4'h7), "west+south edge into PE2");
    issue(4'b1010, '0, pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, SRC_E), '0,
          pe_instr(0, 0, 0, 0, 0, 1, PA_PAMUL, SRC_BUS, SRC_S));
    check(32'(dout_pa[0]), 32'(8'h3), "east edge into PE1");
    check(32'(dout_pa[1]), 32'(8'hf8), "south edge into PE3");  // 8 read as -8
    check(32'(edge_w_out[0]), 32'(dout_s[0]), "west out row 0");
    check(32'(edge_e_out[1]), 32'(dout_pa[1][3:0]), "east out row 1");
    check(32'(edge_n_out[1]), 32'(dout_pa[0][3:0]), "north out col 1");
    check(32'(edge_s_out[0]), 32'(dout_s[1]), "south out col 0");

    // paired 16-bit shifter
    sh16_en = 1;
    for (int t = 0; t < 40; t++) begin
      logic [15:0] w;
      logic [3:0] a0, a1, m;
      a0 = 4'($urandom); a1 = 4'($urandom); m = 4'($urandom);
      din_bus[1] = a0; din_bus[3] = a1;
      issue(4'b1010, '0, pe_instr(0, 0, 0, 0, 0, 1, PA_ABS, SRC_BUS, SRC_BUS), '0,
            pe_instr(0, 0, 0, 0, 0, 1, PA_ABS, SRC_BUS, SRC_BUS));
      w = {abs8(a1), abs8(a0)};
      din_bus[1] = m; din_bus[3] = m;
      issue(4'b1010, '0, pe_instr(0, 0, 0, 0, 0, 1, PA_LSL, SRC_BUS, SRC_BUS), '0,
            pe_instr(0, 0, 0, 0, 0, 1, PA_LSL, SRC_BUS, SRC_BUS));
      w = w << m;
      check(32'({dout_pa[1], dout_pa[0]}), 32'(w), "16-bit LSL across the pair");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
