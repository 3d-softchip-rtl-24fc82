// frame_buffer: the two data frame buffers of a unit chip, used ping-pong.
// At any time one buffer faces the processor port (p_*) and the other the
// DMA port (d_*); a one-clock pulse on swap exchanges them, so a new frame
// can be streamed in by DMA while the previous one is processed.  sel tells
// which buffer the processor port currently uses.  Both ports read
// combinationally and write at the clock edge, one 32-bit word each.  The
// ping-pong use, the depth and the swap control are choices of this design.
module frame_buffer #(
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     swap,
  output logic                     sel,
  input  logic                     p_we,
  input  logic [$clog2(DEPTH)-1:0] p_addr,
  input  logic [31:0]              p_wdata,
  output logic [31:0]              p_rdata,
  input  logic                     d_we,
  input  logic [$clog2(DEPTH)-1:0] d_addr,
  input  logic [31:0]              d_wdata,
  output logic [31:0]              d_rdata
);

  logic [31:0] buf0 [DEPTH];
  logic [31:0] buf1 [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sel <= 1'b0;
    else if (swap) sel <= ~sel;
  end

  always_ff @(posedge clk) begin
    if (p_we && !sel) buf0[p_addr] <= p_wdata;
    if (d_we &&  sel) buf0[d_addr] <= d_wdata;
  end
  always_ff @(posedge clk) begin
    if (p_we &&  sel) buf1[p_addr] <= p_wdata;
    if (d_we && !sel) buf1[d_addr] <= d_wdata;
  end

  assign p_rdata = sel ? buf1[p_addr] : buf0[p_addr];
  assign d_rdata = sel ? buf0[d_addr] : buf1[d_addr];

endmodule
