// cap_array: the PE array of one unit chip (the configurable array processor
// side): four quads placed 2x2, i.e. a 4x4 mesh of 8 standard PEs and 8
// processing-accelerator PEs.
//
// PE numbering (instr, instr_valid, din_bus) is quad*4 + position in the quad
// (0 top-left S-PE, 1 top-right PA-PE, 2 bottom-left S-PE, 3 bottom-right
// PA-PE); quad 0 is top-left, 1 top-right, 2 bottom-left, 3 bottom-right.
// Outputs dout_s / dout_pa / mul_hi are indexed quad*2 + row.  The inter-PE
// bus is a nearest-neighbour mesh: quads are joined along their sides and
// the outer sides of the array are edge ports (index = row for west/east,
// column for north/south), so arrays of neighbouring unit chips can be
// joined.  Horizontal, vertical and circular data movement are chosen by the
// operand sources given to each PE.
//
// Word-length configuration: the 8 S-PEs form one chain of 4-bit slices in
// the order quad 0 top, quad 0 bottom, quad 1 top, ... quad 3 bottom.
// wl_mode cuts it into words of 1, 2, 4 or 8 slices (4, 8, 16, 32 bits): the
// first slice of each word gets wl_lsb, and every slice of a word gets the
// sign of the word's last (most significant) slice.  Carries and compare
// flags ripple within a word in the same clock.  sh16_en pairs the two PA-PE
// shifters of each quad.
module cap_array
  import pe_pkg::*;
#(
  parameter int DW = PE_DW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PE_IW-1:0] instr       [16],
  input  logic             instr_valid [16],
  input  logic [DW-1:0]    din_bus     [16],
  output logic [DW-1:0]    dout_s      [8],
  output logic [2*DW-1:0]  dout_pa     [8],
  output logic [DW-1:0]    mul_hi      [8],
  output logic             busy,
  input  logic [DW-1:0]    edge_w_in   [4],
  input  logic [DW-1:0]    edge_e_in   [4],
  input  logic [DW-1:0]    edge_n_in   [4],
  input  logic [DW-1:0]    edge_s_in   [4],
  output logic [DW-1:0]    edge_w_out  [4],
  output logic [DW-1:0]    edge_e_out  [4],
  output logic [DW-1:0]    edge_n_out  [4],
  output logic [DW-1:0]    edge_s_out  [4],
  input  wl_mode_e         wl_mode,
  input  logic             sh16_en     [4]
);

  // per-quad side signals
  logic [DW-1:0] q_w_in [4][2], q_e_in [4][2], q_n_in [4][2], q_s_in [4][2];
  logic [DW-1:0] q_w_out[4][2], q_e_out[4][2], q_n_out[4][2], q_s_out[4][2];
  logic          q_busy [4];
  logic          q_cout [4];
  cmp_t          q_cmpo [4];
  logic          slice_lsb  [8];
  logic          slice_sign [8];
  logic          slice_sgo  [8];

  // word grouping of the S-PE chain
  always_comb begin
    int g;
    g = 1 << wl_mode;
    for (int k = 0; k < 8; k++) begin
      slice_lsb[k]  = (k % g) == 0;
      slice_sign[k] = slice_sgo[(k / g) * g + g - 1];
    end
  end

  for (genvar q = 0; q < 4; q++) begin : g_quad
    localparam int QR = q / 2;
    localparam int QC = q % 2;
    for (genvar r = 0; r < 2; r++) begin : g_side
      // west/east: r is the row inside the quad; north/south: r is the column
      if (QC == 0) begin : g_w_edge
        assign q_w_in[q][r]          = edge_w_in[2*QR+r];
        assign edge_w_out[2*QR+r]    = q_w_out[q][r];
        assign q_e_in[q][r]          = q_w_out[q+1][r];
      end else begin : g_e_edge
        assign q_w_in[q][r]          = q_e_out[q-1][r];
        assign q_e_in[q][r]          = edge_e_in[2*QR+r];
        assign edge_e_out[2*QR+r]    = q_e_out[q][r];
      end
      if (QR == 0) begin : g_n_edge
        assign q_n_in[q][r]          = edge_n_in[2*QC+r];
        assign edge_n_out[2*QC+r]    = q_n_out[q][r];
        assign q_s_in[q][r]          = q_n_out[q+2][r];
      end else begin : g_s_edge
        assign q_n_in[q][r]          = q_s_out[q-2][r];
        assign q_s_in[q][r]          = edge_s_in[2*QC+r];
        assign edge_s_out[2*QC+r]    = q_s_out[q][r];
      end
    end

    quad_pe #(.DW(DW)) u_quad (
      .clk, .rst_n,
      .instr(instr[4*q +: 4]), .instr_valid(instr_valid[4*q +: 4]), .din_bus(din_bus[4*q +: 4]),
      .dout_s(dout_s[2*q +: 2]), .dout_pa(dout_pa[2*q +: 2]), .mul_hi(mul_hi[2*q +: 2]),
      .busy(q_busy[q]),
      .edge_w_in(q_w_in[q]), .edge_e_in(q_e_in[q]), .edge_n_in(q_n_in[q]), .edge_s_in(q_s_in[q]),
      .edge_w_out(q_w_out[q]), .edge_e_out(q_e_out[q]), .edge_n_out(q_n_out[q]), .edge_s_out(q_s_out[q]),
      .wl_lsb(slice_lsb[2*q +: 2]),
      .carry_in(q == 0 ? 1'b0 : q_cout[(q+3)%4]),
      .carry_out(q_cout[q]),
      .cmp_in(q == 0 ? cmp_t'(3'b001) : q_cmpo[(q+3)%4]),
      .cmp_out(q_cmpo[q]),
      .sign_in(slice_sign[2*q +: 2]), .sign_out(slice_sgo[2*q +: 2]),
      .sh16_en(sh16_en[q])
    );
  end

  assign busy = q_busy[0] | q_busy[1] | q_busy[2] | q_busy[3];

endmodule
