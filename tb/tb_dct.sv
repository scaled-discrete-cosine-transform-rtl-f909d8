// tb_dct: end-to-end run of the frame-level DCT system at its default size.
//
// A frame of 16 blocks (predefined patterns first, then random pixels) is
// loaded while reset is held.  After reset the system streams the frame
// through the core; the testbench waits for frame_done, reads the whole
// coefficient frame back and compares every value with a floating-point
// 2-D DCT of (pixel - 128) rounded to an integer (error limit TOL, plus a
// bound on each block's mean square error).  It also checks when the
// first frame completes (first pixel in the second cycle after reset, 132
// cycles of core latency, 64 cycles per block) and lets the frame wrap
// around once, checking that the second frame is identical, since the
// stream of blocks then runs on across the frame boundary.
module tb_dct;
  import dct_ref_pkg::*;

  localparam int NB  = 16;                  // default N_BLOCKS of dct
  localparam int TOL = 2;
  localparam real MSE_MAX = 0.5;
  localparam int DONE_CYCLE = 1 + 132 + 64 * NB;

  logic        clk = 1'b0, reset = 1'b1;
  logic        load_we = 1'b0;
  logic [9:0]  load_addr = '0, rd_addr = '0;
  logic [7:0]  load_data = '0;
  logic [11:0] rd_data;
  logic        frame_done;

  always #5 clk = ~clk;

  dct dut (.clk, .reset, .load_we, .load_addr, .load_data, .rd_addr, .rd_data, .frame_done);

  int checks = 0, failures = 0, n_frames = 0, n_blocks = 0, max_err = 0;

  bit [7:0] pix [NB*64];
  int       expv [NB*64];
  int       first [NB*64];

  initial begin : run
    int cyc;
    for (int b = 0; b < NB; b++) begin
      blk_t x;
      real  y [64];
      for (int i = 0; i < 64; i++) begin
        unique case (b)
          0: pix[64*b+i] = 8'd0;
          1: pix[64*b+i] = 8'd255;
          2: pix[64*b+i] = ((i / 8 + i % 8) % 2 == 0) ? 8'd255 : 8'd0;
          3: pix[64*b+i] = 8'(4 * i);
          default: pix[64*b+i] = 8'($urandom);
        endcase
        x[i] = int'(pix[64*b+i]) - 128;
      end
      dct2d(x, y);
      for (int i = 0; i < 64; i++) expv[64*b+i] = round12(y[i]);
    end

    // load the frame under reset
    repeat (2) @(negedge clk);
    for (int a = 0; a < NB * 64; a++) begin
      load_we   = 1'b1;
      load_addr = 10'(a);
      load_data = pix[a];
      @(negedge clk);
    end
    load_we = 1'b0;
    reset   = 1'b0;

    // cycle 0 is the first cycle with reset low
    cyc = 0;
    while (!frame_done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != DONE_CYCLE) begin
      failures++;
      $display("FAIL frame_done at cycle %0d, expected %0d", cyc, DONE_CYCLE);
    end
    n_frames++;

    // hold the system in reset (the memories keep their contents) and read
    // the frame back
    reset = 1'b1;
    for (int b = 0; b < NB; b++) begin
      real serr;
      serr = 0.0;
      for (int i = 0; i < 64; i++) begin
        int d;
        rd_addr = 10'(64 * b + i);
        @(negedge clk);
        first[64*b+i] = int'($signed(rd_data));
        d = first[64*b+i] - expv[64*b+i];
        serr += real'(d * d);
        if (d < 0) d = -d;
        if (d > max_err) max_err = d;
        checks++;
        if (d > TOL) begin
          failures++;
          $display("FAIL block %0d coef %0d: got %0d expected %0d", b, i,
                   first[64*b+i], expv[64*b+i]);
        end
      end
      n_blocks++;
      checks++;
      if (serr / 64.0 > MSE_MAX) begin
        failures++;
        $display("FAIL block %0d mean square error %f", b, serr / 64.0);
      end
    end

    // run again from reset: the first frame must come out the same, at the
    // same time, and the stream runs on into a second frame
    reset = 1'b0;
    cyc = 0;
    while (!frame_done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != DONE_CYCLE) failures++;
    n_frames++;
    @(negedge clk);
    while (!frame_done) @(negedge clk);
    n_frames++;
    reset = 1'b1;
    for (int a = 0; a < NB * 64; a++) begin
      rd_addr = 10'(a);
      @(negedge clk);
      checks++;
      if (int'($signed(rd_data)) != first[a]) begin
        failures++;
        $display("FAIL second frame word %0d: %0d vs %0d", a, $signed(rd_data), first[a]);
      end
    end

    $display("frames %0d, blocks checked %0d, max |error| %0d", n_frames, n_blocks, max_err);
    checks++;
    if (n_frames != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NB * 64 * 6 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
