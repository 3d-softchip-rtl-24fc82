// ics_io: the I/O unit of the control processor - memory-mapped registers
// reached by loads and stores to 0x8000 + 4*index (indices in ics_pkg).
//   DMA_SRC/DST/LEN  parameters of the next DMA copy (read back as written)
//   DMA_CTRL         write: bit0 start, bit1 direction; read: DMA busy
//   FB_SWAP          write: exchange the two frame buffers; read: selection
//   PBANK            program-memory bank used for instruction fetch
//   LINK_OUT         write: send a word to the next unit chip (a one-clock
//                    link_out_valid pulse); read: next chip's mailbox is free
//   LINK_IN          read: word received from the previous unit chip; the
//                    read empties the one-word mailbox
//   LINK_ST          read: mailbox full
//   ARRAY            [1:0] word-length mode of the PE array, [5:2] 16-bit
//                    shifter pairing per quad
// Writes take effect at the clock edge; reads are combinational.  A word
// that arrives while the mailbox is full is dropped, so senders test
// LINK_OUT first.  The register map is a choice of this design.
module ics_io
  import ics_pkg::*;
#(
  parameter int NBANK = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic                     re,
  input  logic [3:0]               idx,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata,
  // DMA
  output logic                     dma_start,
  output logic                     dma_dir,
  output logic [15:0]              dma_src,
  output logic [15:0]              dma_dst,
  output logic [15:0]              dma_len,
  input  logic                     dma_busy,
  // frame buffer
  output logic                     fb_swap,
  input  logic                     fb_sel,
  // program bank
  output logic [$clog2(NBANK)-1:0] pbank,
  // inter-unit link
  output logic                     link_out_valid,
  output logic [31:0]              link_out_data,
  input  logic                     link_out_ready,
  input  logic                     link_in_valid,
  input  logic [31:0]              link_in_data,
  output logic                     link_in_ready,
  // array configuration
  output logic [1:0]               wl_mode,
  output logic [3:0]               sh16
);

  logic        mb_full;
  logic [31:0] mb_data;
  logic        pop;

  assign pop = re && idx == IO_LINK_IN;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_dir <= 1'b0;
      dma_src <= '0;
      dma_dst <= '0;
      dma_len <= '0;
      pbank   <= '0;
      wl_mode <= '0;
      sh16    <= '0;
      mb_full <= 1'b0;
      mb_data <= '0;
    end else begin
      if (we) begin
        case (idx)
          IO_DMA_SRC:  dma_src <= wdata[15:0];
          IO_DMA_DST:  dma_dst <= wdata[15:0];
          IO_DMA_LEN:  dma_len <= wdata[15:0];
          IO_DMA_CTRL: dma_dir <= wdata[1];
          IO_PBANK:    pbank   <= wdata[$clog2(NBANK)-1:0];
          IO_ARRAY:    begin wl_mode <= wdata[1:0]; sh16 <= wdata[5:2]; end
          default: ;
        endcase
      end
      if (link_in_valid && !mb_full) begin
        mb_full <= 1'b1;
        mb_data <= link_in_data;
      end else if (pop) begin
        mb_full <= 1'b0;
      end
    end
  end

  assign dma_start      = we && idx == IO_DMA_CTRL && wdata[0];
  assign fb_swap        = we && idx == IO_FB_SWAP;
  assign link_out_valid = we && idx == IO_LINK_OUT;
  assign link_out_data  = wdata;
  assign link_in_ready  = !mb_full;

  always_comb begin
    case (idx)
      IO_DMA_SRC:  rdata = {16'b0, dma_src};
      IO_DMA_DST:  rdata = {16'b0, dma_dst};
      IO_DMA_LEN:  rdata = {16'b0, dma_len};
      IO_DMA_CTRL: rdata = {31'b0, dma_busy};
      IO_FB_SWAP:  rdata = {31'b0, fb_sel};
      IO_PBANK:    rdata = 32'(pbank);
      IO_LINK_OUT: rdata = {31'b0, link_out_ready};
      IO_LINK_IN:  rdata = mb_data;
      IO_LINK_ST:  rdata = {31'b0, mb_full};
      IO_ARRAY:    rdata = {26'b0, sh16, wl_mode};
      default:     rdata = '0;
    endcase
  end

endmodule
