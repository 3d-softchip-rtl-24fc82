// quad_pe: one quad of the configurable array processor - two standard PEs
// (left column) and two processing-accelerator PEs (right column) in a 2x2
// tile, as the quad is drawn around its switch block.
//
// PE numbering inside the quad (used for instr/instr_valid/din_bus):
//   0 = top-left S-PE     1 = top-right PA-PE
//   2 = bottom-left S-PE  3 = bottom-right PA-PE
// Every PE sees its four nearest neighbours (the inter-PE bus); the sides of
// the tile are brought out as edge_*_in / edge_*_out, indexed by row (west,
// east) or column (north, south).  The neighbour value of a PA-PE is the low
// DW bits of its output register.
//
// The two S-PEs form a two-slice word chain: the top one is the lower slice,
// its carry and compare flags go straight to the bottom one, and the chain
// continues through carry_in/cmp_in and carry_out/cmp_out.  Which slice
// starts a word (wl_lsb) and which sign each S-PE uses (sign_in) are decided
// by the array around the quad.  The two PA-PEs are the lower (top) and upper
// (bottom) byte of the 16-bit shifter when sh16_en is set.  All timing is
// that of the PEs: single-cycle except the serial multiply of the S-PEs.
module quad_pe
  import pe_pkg::*;
#(
  parameter int DW = PE_DW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PE_IW-1:0] instr       [4],
  input  logic             instr_valid [4],
  input  logic [DW-1:0]    din_bus     [4],
  output logic [DW-1:0]    dout_s      [2],
  output logic [2*DW-1:0]  dout_pa     [2],
  output logic [DW-1:0]    mul_hi      [2],
  output logic             busy,
  // mesh edges
  input  logic [DW-1:0]    edge_w_in   [2],
  input  logic [DW-1:0]    edge_e_in   [2],
  input  logic [DW-1:0]    edge_n_in   [2],
  input  logic [DW-1:0]    edge_s_in   [2],
  output logic [DW-1:0]    edge_w_out  [2],
  output logic [DW-1:0]    edge_e_out  [2],
  output logic [DW-1:0]    edge_n_out  [2],
  output logic [DW-1:0]    edge_s_out  [2],
  // S-PE word chain
  input  logic             wl_lsb      [2],
  input  logic             carry_in,
  output logic             carry_out,
  input  cmp_t             cmp_in,
  output cmp_t             cmp_out,
  input  logic             sign_in     [2],
  output logic             sign_out    [2],
  // paired shifter
  input  logic             sh16_en
);

  logic [DW-1:0] nb [2][2];   // neighbour value of the PE at [row][col]
  logic [DW-1:0] w_of [2][2], e_of [2][2], n_of [2][2], s_of [2][2];
  logic          busy_s [2];
  logic          c_o [2];
  cmp_t          cmp_o [2];

  assign nb[0][0] = dout_s[0];
  assign nb[1][0] = dout_s[1];
  assign nb[0][1] = dout_pa[0][DW-1:0];
  assign nb[1][1] = dout_pa[1][DW-1:0];

  for (genvar r = 0; r < 2; r++) begin : g_row
    for (genvar c = 0; c < 2; c++) begin : g_col
      assign w_of[r][c] = (c == 0) ? edge_w_in[r] : nb[r][0];
      assign e_of[r][c] = (c == 1) ? edge_e_in[r] : nb[r][1];
      assign n_of[r][c] = (r == 0) ? edge_n_in[c] : nb[0][c];
      assign s_of[r][c] = (r == 1) ? edge_s_in[c] : nb[1][c];
    end
    assign edge_w_out[r] = nb[r][0];
    assign edge_e_out[r] = nb[r][1];
    assign edge_n_out[r] = nb[0][r];
    assign edge_s_out[r] = nb[1][r];
  end

  for (genvar r = 0; r < 2; r++) begin : g_pe
    spe #(.DW(DW)) u_spe (
      .clk, .rst_n,
      .instr(instr[2*r]), .instr_valid(instr_valid[2*r]), .din_bus(din_bus[2*r]),
      .din_w(w_of[r][0]), .din_e(e_of[r][0]), .din_n(n_of[r][0]), .din_s(s_of[r][0]),
      .dout(dout_s[r]), .mul_hi(mul_hi[r]), .busy(busy_s[r]),
      .wl_lsb(wl_lsb[r]),
      .carry_in(r == 0 ? carry_in : c_o[0]),
      .carry_out(c_o[r]),
      .cmp_in(r == 0 ? cmp_in : cmp_o[0]),
      .cmp_out(cmp_o[r]),
      .sign_in(sign_in[r]), .sign_out(sign_out[r])
    );

    pape #(.DW(DW)) u_pape (
      .clk, .rst_n,
      .instr(instr[2*r+1]), .instr_valid(instr_valid[2*r+1]), .din_bus(din_bus[2*r+1]),
      .din_w(w_of[r][1]), .din_e(e_of[r][1]), .din_n(n_of[r][1]), .din_s(s_of[r][1]),
      .dout(dout_pa[r]),
      .sh16_en(sh16_en), .sh16_upper(r == 1), .partner(dout_pa[1-r])
    );
  end

  assign carry_out = c_o[1];
  assign cmp_out   = cmp_o[1];
  assign busy      = busy_s[0] | busy_s[1];

endmodule
