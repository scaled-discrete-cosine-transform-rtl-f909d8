// dct_buf: 8x8 transpose buffer between the two 1-D DCT stages.
//
// Words arrive one per enabled clock in row order, index w = 8*row + col of
// a 64-word block, and leave in column order: output number o = 8*col + row
// carries the word written at index 8*row + col.  Blocks may follow each
// other without a gap, so the buffer is a ping-pong memory of two 64-word
// banks: block n is written into bank n mod 2 while the reads of block n-1
// drain the other bank.  The read address is derived from the write
// position, so the read side needs no counter of its own.
//
// Interface: start marks din as word 0 of a block (it resets the write
// counter and switches banks); without it the blocks run back to back.  en
// is a clock enable.  Timing: output o of a block is on dout LAT enabled
// cycles after input word o of the same block was on din, and rdy is start
// delayed by LAT.  A word must be written before it is read, which holds for
// LAT >= 51 (the worst word, row 7 column 0, is read 7 places after row 0
// column 0); reading block n before block n+2 overwrites it needs LAT <= 64.
//
// The document says only that the intermediate data are stored and
// transposed in FIFO buffers built from shift-register LUTs.  The register
// array, the ping-pong scheme and LAT = 55 (which gives the document's
// 132-cycle core latency together with two 11-cycle stages) are this
// design's choices.
module dct_buf
  import dct_pkg::*;
#(
  parameter int WIDTH = 10,
  parameter int LAT   = BUF_LAT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             start,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             rdy
);

  if (LAT < 51 || LAT > 64) begin : g_lat_check
    $error("dct_buf: LAT must lie in 51..64");
  end

  logic [WIDTH-1:0] mem [128];  // address = {bank, row, col}

  // ---------------------------------------------------------------- write
  logic [5:0] cnt;
  logic [5:0] wi;        // index of the word on din within its block
  logic       bank;      // bank of the previous word
  logic       cur_bank;  // bank of the word on din

  assign wi       = start ? 6'd0 : cnt;
  assign cur_bank = (wi == 6'd0) ? ~bank : bank;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= 6'd0;
      bank <= 1'b1;
    end else if (en) begin
      cnt  <= wi + 6'd1;
      bank <= cur_bank;
    end
  end

  always_ff @(posedge clk) begin
    if (en) mem[{cur_bank, wi}] <= din;
  end

  // ----------------------------------------------------------------- read
  // Output number o = w + 1 - LAT leaves on the next cycle.  A negative o
  // belongs to the previous block, which sits in the other bank.
  logic [6:0] rpos;   // w + 1 - LAT, two's complement over 7 bits
  logic [5:0] o;
  logic       rbank;

  always_comb begin
    rpos  = {1'b0, wi} + 7'd1 - 7'(LAT);
    o     = rpos[5:0];
    rbank = rpos[6] ? ~cur_bank : cur_bank;
  end

  always_ff @(posedge clk) begin
    if (rst)     dout <= '0;
    else if (en) dout <= mem[{rbank, o[2:0], o[5:3]}];
  end

  // ---------------------------------------------------------- ready strobe
  logic [LAT-1:0] rdy_sr;

  always_ff @(posedge clk) begin
    if (rst)     rdy_sr <= '0;
    else if (en) rdy_sr <= {rdy_sr[LAT-2:0], start};
  end

  assign rdy = rdy_sr[LAT-1];

endmodule
