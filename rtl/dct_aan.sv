// dct_aan: pipelined 8x8 two-dimensional DCT core (AAN algorithm).
//
// Pixels of an 8x8 block enter one per clock in row order on data_in and
// the 64 coefficients Y(u,v) leave one per clock in the same row order on
// data_out; a new block may follow the previous one directly, so a block
// takes 64 cycles.  Inside, four units form a chain:
//   u_st1  dct8aan  1-D DCT of each row           (8-bit in, 10-bit out)
//   u_b1   dct_buf  transpose rows -> columns     (10 bits)
//   u_st2  dct8aan  1-D DCT of each column        (10-bit in, 12-bit out)
//   u_b2   dct_buf  transpose back to row order   (12 bits)
// Each unit's rdy drives the next unit's start, and all share clk, rst and
// en.  The two stages hold two multipliers each, four in all.
//
// Data format: with D_SIGNED = 1 data_in is a two's complement pixel in
// -128..127; with D_SIGNED = 0 it is an unsigned pixel in 0..255 and the
// mean value 128 is subtracted first (by inverting the top bit).  The output
// is the orthonormal 2-D DCT, Y(0,0) = (1/8) * sum of all 64 inputs, as a
// 12-bit two's complement number.
//
// Scaled-output mode (SCALED_OUT = 1): both stages leave out their scaling
// multiplier, so the core needs two multipliers instead of four, and emits
//   Ysc(u,v) = Y(u,v) / (8 * s(u) * s(v)),
//   s(0) = 0.5/sqrt(2),  s(k) = 0.25/cos(k*pi/16),
// i.e. the raw AAN butterfly results, divided by 4 after the row stage and
// by 2 after the column stage so that they fit the 10-bit and 12-bit buses.
// The factors s(u)*s(v) are meant to be merged into a following quantiser.
//
// Timing: start is given with the first pixel of a block; rdy is given with
// the first coefficient of that block, CORE_LAT = 132 enabled cycles later.
// Only the first block needs a start; the following ones may run on without
// it.  A later start must fall on a block boundary, or come once the last
// block has left the core (an assertion checks this).  en = 0 freezes the
// whole core, so gaps in the input are made with en.
//
// The chain of units, the port list, the bus widths, the mean removal and
// the 132-cycle latency follow the document.  The document's figures place
// the row transform first; its text puts the columns first, which gives the
// same result.  The scaled-output mode and its multiplier count come from
// the document; the divisions by 4 and 2 in that mode and the defaults
// D_SIGNED = 1 and SCALED_OUT = 0 are this design's choices.
module dct_aan
  import dct_pkg::*;
#(
  parameter bit D_SIGNED   = 1'b1,
  parameter bit SCALED_OUT = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        en,
  input  logic [7:0]  data_in,
  output logic [11:0] data_out,
  output logic        rdy
);

  if (CORE_LAT != 132) begin : g_lat_check
    $error("dct_aan: stage and buffer latencies must add up to 132 cycles");
  end

  logic signed [7:0]  x;
  logic signed [9:0]  s1_out, b1_out;
  logic signed [11:0] s2_out;
  logic               s1_rdy, b1_rdy, s2_rdy;

  // Mean removal for unsigned pixels: p - 128 equals p with its MSB inverted.
  assign x = D_SIGNED ? data_in : {~data_in[7], data_in[6:0]};

  dct8aan #(.IN_W(8), .OUT_W(10), .SCALED(SCALED_OUT), .SC_SHIFT(2)) u_st1 (
    .clk, .rst, .en,
    .start(start),
    .din  (x),
    .dout (s1_out),
    .rdy  (s1_rdy)
  );

  dct_buf #(.WIDTH(10)) u_b1 (
    .clk, .rst, .en,
    .start(s1_rdy),
    .din  (s1_out),
    .dout (b1_out),
    .rdy  (b1_rdy)
  );

  dct8aan #(.IN_W(10), .OUT_W(12), .SCALED(SCALED_OUT), .SC_SHIFT(1)) u_st2 (
    .clk, .rst, .en,
    .start(b1_rdy),
    .din  (b1_out),
    .dout (s2_out),
    .rdy  (s2_rdy)
  );

  dct_buf #(.WIDTH(12)) u_b2 (
    .clk, .rst, .en,
    .start(s2_rdy),
    .din  (s2_out),
    .dout (data_out),
    .rdy  (rdy)
  );

  // START rule: once blocks are flowing, a new START must fall on a block
  // boundary (a multiple of 64 enabled cycles after the previous START) or
  // come after the previous block has fully left the core.  The counter
  // below exists only for this check.
  logic [8:0] since_start;
  logic       started;

  always_ff @(posedge clk) begin
    if (rst) begin
      since_start <= '0;
      started     <= 1'b0;
    end else if (en) begin
      if (start) begin
        since_start <= 9'd1;
        started     <= 1'b1;
      end else if (since_start != '1) begin
        since_start <= since_start + 9'd1;
      end
    end
  end

  a_start_on_boundary: assert property (@(posedge clk) disable iff (rst)
    (en && start && started) |-> (since_start[5:0] == 6'd0 || since_start >= 9'(CORE_LAT + 64)))
    else $error("dct_aan: START in the middle of a block stream");

endmodule
