// dct: frame-level 2-D DCT system.
//
// An input frame buffer streams a frame of unsigned 8-bit pixels, block
// after block with no gaps, into the 8x8 AAN DCT core; the core's READY
// strobe starts each block in the output frame buffer, which collects the
// 12-bit coefficients of the whole frame.  The core's clock enable is tied
// high, as in the document's interconnection figure, and the core runs with
// unsigned input (mean 128 removed) because the frame holds image pixels.
//
// Interface: load_we/load_addr/load_data fill the input frame (normally
// while reset is held); rd_addr/rd_data read coefficients back, one cycle
// after the address; frame_done pulses when the last block of a frame has
// been stored.  Addresses are 64*block + 8*row + col in both frames.
//
// Timing: after reset is released the first pixel enters the core in the
// second cycle; its block's first coefficient follows 132 cycles later, and
// the frame is complete 64*N_BLOCKS cycles after that.  The frames then
// repeat for as long as the system runs.
//
// The three units and their connections follow the document; the frame
// size and the load and read ports are this design's choices.
module dct #(
  parameter int N_BLOCKS = 16,
  localparam int AW = $clog2(N_BLOCKS * 64)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [7:0]    load_data,
  input  logic [AW-1:0] rd_addr,
  output logic [11:0]   rd_data,
  output logic          frame_done
);

  logic [7:0]  pix;
  logic        pix_start;
  logic [11:0] coef;
  logic        coef_ready;

  input_frame_buffer #(.N_BLOCKS(N_BLOCKS)) u_in (
    .clk,
    .reset,
    .we     (load_we),
    .waddr  (load_addr),
    .wdata  (load_data),
    .dataout(pix),
    .ready  (pix_start)
  );

  dct_aan #(.D_SIGNED(1'b0)) u_dct (
    .clk,
    .rst     (reset),
    .start   (pix_start),
    .en      (1'b1),
    .data_in (pix),
    .data_out(coef),
    .rdy     (coef_ready)
  );

  output_frame_buffer #(.N_BLOCKS(N_BLOCKS)) u_out (
    .clk,
    .reset,
    .datain    (coef),
    .start     (coef_ready),
    .raddr     (rd_addr),
    .rdata     (rd_data),
    .frame_done
  );

endmodule
