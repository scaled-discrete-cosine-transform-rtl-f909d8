// input_frame_buffer: frame store that feeds the DCT core.
//
// Holds one frame of N_BLOCKS 8x8 blocks of 8-bit pixels, stored block
// after block with each block in row order (address = 64*block + 8*row +
// col).  Out of reset it streams the frame to dataout, one pixel per clock,
// and starts over at the end, so the core sees back-to-back blocks.  ready
// is high with the first pixel of every block and drives the core's START.
// A write port (we, waddr, wdata) loads pixels; the frame is normally
// loaded while reset is held.
//
// Timing: dataout and ready are registered; the first pixel appears in the
// second cycle after reset is released.
//
// The document names this unit and shows its DATAOUT(7:0), READY, CLK and
// RESET pins; the frame size, the storage order, the write port and the
// repeating read-out are this design's choices.
module input_frame_buffer #(
  parameter int N_BLOCKS = 16,
  localparam int DEPTH = N_BLOCKS * 64,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  output logic [7:0]    dataout,
  output logic          ready
);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] rptr;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rptr    <= '0;
      ready   <= 1'b0;
      dataout <= '0;
    end else begin
      dataout <= mem[rptr];
      ready   <= (rptr[5:0] == 6'd0);
      rptr    <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + AW'(1);
    end
  end

endmodule
