// dma: DMA controller of a unit chip.  It copies len words between the data
// memory and the frame buffer (DMA-side buffer), one word per clock.
// A one-clock start pulse captures src, dst, len and dir (0 = data memory to
// frame buffer, 1 = frame buffer to data memory); busy stays high while
// words are moved and done pulses for one clock after the last one.  In
// each busy clock the source word is read combinationally and written to
// the destination at the clock edge, so a copy of len words takes len
// clocks.  A start while busy is ignored; len = 0 gives an immediate done.
// The write data outputs are the other memory's read data, wired through.
// The register set and timing are choices of this design.
module dma #(
  parameter int DM_AW = 10,
  parameter int FB_AW = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             dir,
  input  logic [15:0]      src,
  input  logic [15:0]      dst,
  input  logic [15:0]      len,
  output logic             busy,
  output logic             done,
  // data memory word port
  output logic [DM_AW-1:0] dm_addr,
  output logic             dm_we,
  output logic [31:0]      dm_wdata,
  input  logic [31:0]      dm_rdata,
  // frame buffer DMA port
  output logic [FB_AW-1:0] fb_addr,
  output logic             fb_we,
  output logic [31:0]      fb_wdata,
  input  logic [31:0]      fb_rdata
);

  logic        dir_q;
  logic [15:0] src_q, dst_q, left_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      dir_q  <= 1'b0;
      src_q  <= '0;
      dst_q  <= '0;
      left_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        dir_q  <= dir;
        src_q  <= src;
        dst_q  <= dst;
        left_q <= len;
        busy   <= len != 0;
        done   <= len == 0;
      end else if (busy) begin
        src_q  <= src_q + 1'b1;
        dst_q  <= dst_q + 1'b1;
        left_q <= left_q - 1'b1;
        if (left_q == 16'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dm_addr  = dir_q ? DM_AW'(dst_q) : DM_AW'(src_q);
  assign fb_addr  = dir_q ? FB_AW'(src_q) : FB_AW'(dst_q);
  assign dm_we    = busy && dir_q;
  assign fb_we    = busy && !dir_q;
  assign dm_wdata = fb_rdata;
  assign fb_wdata = dm_rdata;

endmodule
