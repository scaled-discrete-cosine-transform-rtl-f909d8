// output_frame_buffer: frame store for the DCT coefficients.
//
// Each start strobe (the core's READY) begins a block: the coefficient on
// datain in that cycle and the 63 that follow are written, in arrival
// order, to the next 64-word block slot (address = 64*block + index).  The
// slots are used in turn; when the last of the N_BLOCKS slots is full,
// frame_done pulses for one cycle and the next block goes to slot 0 again.
// A start that arrives in the middle of a block abandons that block and
// begins the next slot.  The frame is read back through a registered read
// port (raddr -> rdata one cycle later).
//
// The document names this unit and shows its DATAIN(11:0), START, CLK and
// RESET pins; the storage order, the read port and frame_done are this
// design's choices.
module output_frame_buffer #(
  parameter int N_BLOCKS = 16,
  localparam int DEPTH = N_BLOCKS * 64,
  localparam int AW    = $clog2(DEPTH),
  localparam int BW    = (N_BLOCKS > 1) ? $clog2(N_BLOCKS) : 1
) (
  input  logic          clk,
  input  logic          reset,
  input  logic [11:0]   datain,
  input  logic          start,
  input  logic [AW-1:0] raddr,
  output logic [11:0]   rdata,
  output logic          frame_done
);

  logic [11:0]   mem [DEPTH];
  logic [BW-1:0] blk;
  logic [5:0]    idx;
  logic          active;

  logic [BW-1:0] wblk;
  logic [5:0]    widx;
  logic          wr;

  // A start in the middle of a block moves on to the next slot.
  always_comb begin
    wblk = blk;
    if (start && active) wblk = (blk == BW'(N_BLOCKS - 1)) ? '0 : blk + BW'(1);
    widx = start ? 6'd0 : idx;
    wr   = start || active;
  end

  always_ff @(posedge clk) begin
    if (wr) mem[AW'(wblk) * AW'(64) + AW'(widx)] <= datain;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      blk        <= '0;
      idx        <= '0;
      active     <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (wr) begin
        blk <= wblk;
        idx <= widx + 6'd1;
        active <= 1'b1;
        if (widx == 6'd63) begin
          active     <= 1'b0;
          blk        <= (wblk == BW'(N_BLOCKS - 1)) ? '0 : wblk + BW'(1);
          frame_done <= (wblk == BW'(N_BLOCKS - 1));
        end
      end
    end
  end

  always_ff @(posedge clk) rdata <= mem[raddr];

endmodule
