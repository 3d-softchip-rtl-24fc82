// data_mem: data memory of a unit chip, DEPTH words of 32 bits.
// Port A (control processor or host) has a variable access width: size 0 =
// byte, 1 = half word, 2 = word, at byte address a_addr (naturally aligned;
// the unused low address bits are ignored).  Reads are combinational and
// zero-extended, writes touch only the addressed bytes at the clock edge.
// Port B (DMA) reads and writes whole words at word address b_addr.  When
// both ports write the same word in one clock, port A's bytes win.
// The depth and the byte/half/word way of giving a variable width are
// choices of this design.  The array is not reset.
module data_mem #(
  parameter int DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       a_we,
  input  logic [1:0]                 a_size,
  input  logic [$clog2(DEPTH)+1:0]   a_addr,
  input  logic [31:0]                a_wdata,
  output logic [31:0]                a_rdata,
  input  logic                       b_we,
  input  logic [$clog2(DEPTH)-1:0]   b_addr,
  input  logic [31:0]                b_wdata,
  output logic [31:0]                b_rdata
);

  localparam int WA = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];
  logic [WA-1:0] a_word;
  logic [1:0]    a_off;
  logic [31:0]   a_line;
  logic [3:0]    a_be;
  logic [31:0]   a_wlane;

  assign a_word = a_addr[WA+1:2];
  assign a_off  = a_addr[1:0];
  assign a_line = mem[a_word];

  always_comb begin
    case (a_size)
      2'd0: begin
        a_be    = 4'b0001 << a_off;
        a_rdata = {24'b0, a_line[8*a_off +: 8]};
        a_wlane = {4{a_wdata[7:0]}};
      end
      2'd1: begin
        a_be    = a_off[1] ? 4'b1100 : 4'b0011;
        a_rdata = {16'b0, a_line[16*a_off[1] +: 16]};
        a_wlane = {2{a_wdata[15:0]}};
      end
      default: begin
        a_be    = 4'b1111;
        a_rdata = a_line;
        a_wlane = a_wdata;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    if (a_we)
      for (int i = 0; i < 4; i++)
        if (a_be[i]) mem[a_word][8*i +: 8] <= a_wlane[8*i +: 8];
  end

  assign b_rdata = mem[b_addr];

endmodule
