// tb_dct_aan: end-to-end check of the 8x8 DCT core.
//
// A block generator feeds the same byte stream to three cores: one with
// signed input (default), one with D_SIGNED = 0, where the bytes are
// unsigned pixels and 128 is subtracted, and one in scaled-output mode
// (SCALED_OUT = 1), whose results are Y(u,v) / (8 s(u) s(v)) and are held
// to the looser limits TOL_SC and MSE_SC.  Blocks are predefined patterns
// (flat extremes, checkerboard, ramps, an impulse) followed by random ones.
// Every coefficient is compared with a floating-point 2-D DCT rounded to an
// integer (error limit TOL), and per block the sum of squared errors and
// the mean square error are formed and bounded.  The latency is checked
// exactly: coefficient k of a block must be on data_out, and rdy with
// coefficient 0 of a started block, 132 enabled cycles after pixel k went
// in.  The stream exercises back-to-back blocks with START on each block,
// blocks that run on without START, EN stalls, and restarts after idle
// stretches; each of these is counted and must occur.
module tb_dct_aan;
  import dct_ref_pkg::*;

  localparam int NBLK  = 40;
  localparam int LAT   = 132;
  localparam int TOL   = 2;
  localparam real MSE_MAX = 0.5;
  localparam int  TOL_SC  = 3;
  localparam real MSE_SC  = 1.0;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        start = 1'b0;
  logic        en = 1'b1;
  logic [7:0]  data_in = '0;
  logic [11:0] out_s, out_u, out_c;
  logic        rdy_s, rdy_u, rdy_c;

  always #5 clk = ~clk;

  dct_aan dut_s (.clk, .rst, .start, .en, .data_in, .data_out(out_s), .rdy(rdy_s));
  dct_aan #(.D_SIGNED(1'b0)) dut_u (.clk, .rst, .start, .en, .data_in,
                                     .data_out(out_u), .rdy(rdy_u));
  dct_aan #(.SCALED_OUT(1'b1)) dut_c (.clk, .rst, .start, .en, .data_in,
                                      .data_out(out_c), .rdy(rdy_c));

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ stimulus
  typedef struct {
    bit        en;
    bit        start;
    bit [7:0]  data;
    int        blk;   // -1: filler
    int        idx;
  } rec_t;

  rec_t        sched [$];
  bit   [7:0]  pix [NBLK][64];
  real         exp_s [NBLK][64];
  real         exp_u [NBLK][64];
  real         exp_c [NBLK][64];
  bit          started [NBLK];

  int n_stall = 0, n_start_b2b = 0, n_nostart = 0, n_restart = 0;
  int n_pre = 0, n_rand = 0;

  function automatic void make_block(int b);
    for (int i = 0; i < 64; i++) begin
      int r = i / 8, c = i % 8;
      unique case (b)
        0: pix[b][i] = 8'h80;                                   // -128 / 0
        1: pix[b][i] = 8'h7F;                                   // 127 / 255
        2: pix[b][i] = ((r + c) % 2 == 0) ? 8'h7F : 8'h80;      // checkerboard
        3: pix[b][i] = 8'(c * 32);                              // horizontal ramp
        4: pix[b][i] = 8'(r * 36 - 128);                        // vertical ramp
        5: pix[b][i] = (i == 27) ? 8'h7F : 8'h00;               // impulse
        default: pix[b][i] = 8'($urandom);
      endcase
    end
    if (b < 6) n_pre++; else n_rand++;
  endfunction

  function automatic void ref_block(int b);
    blk_t xs, xu;
    real  ys [64], yu [64];
    for (int i = 0; i < 64; i++) begin
      xs[i] = int'($signed(pix[b][i]));
      xu[i] = int'(pix[b][i]) - 128;
    end
    dct2d(xs, ys);
    dct2d(xu, yu);
    for (int i = 0; i < 64; i++) begin
      exp_s[b][i] = ys[i];
      exp_u[b][i] = yu[i];
      exp_c[b][i] = ys[i] / (8.0 * aan_scale(i / 8) * aan_scale(i % 8));
    end
  endfunction

  function automatic void push_fill(int n);
    for (int i = 0; i < n; i++) sched.push_back('{1'b1, 1'b0, 8'($urandom), -1, 0});
  endfunction

  function automatic void push_block(int b, bit with_start, int stall_pct);
    for (int i = 0; i < 64; i++) begin
      while (stall_pct > 0 && ($urandom % 100) < stall_pct) begin
        sched.push_back('{1'b0, 1'b0, 8'($urandom), -1, 0});
        n_stall++;
      end
      sched.push_back('{1'b1, with_start && i == 0, pix[b][i], b, i});
    end
    started[b] = with_start;
    if (!with_start) n_nostart++;
  endfunction

  // ------------------------------------------------------------- checking
  int        blk_at [int];   // enabled cycle -> block
  int        idx_at [int];   // enabled cycle -> pixel index
  real       serr_s [NBLK], serr_u [NBLK], serr_c [NBLK];
  int        seen [NBLK];
  int        max_err = 0, max_err_c = 0;

  function automatic int sx12(logic [11:0] v);
    return int'($signed(v));
  endfunction

  task automatic check_cycle(int ec);
    int  src = ec - LAT;
    bit  expect_rdy = 1'b0;
    if (blk_at.exists(src)) begin
      int  b = blk_at[src], i = idx_at[src];
      int  es = round12(exp_s[b][i]), eu = round12(exp_u[b][i]);
      int  ds = sx12(out_s) - es, du = sx12(out_u) - eu;
      int  ec_ = round12(exp_c[b][i]);
      int  dc = sx12(out_c) - ec_;
      expect_rdy = started[b] && i == 0;
      // ERROR / SERROR accumulation
      serr_s[b] += real'(ds * ds);
      serr_u[b] += real'(du * du);
      serr_c[b] += real'(dc * dc);
      seen[b]++;
      if (ds < 0) ds = -ds;
      if (du < 0) du = -du;
      if (ds > max_err) max_err = ds;
      if (du > max_err) max_err = du;
      if (dc < 0) dc = -dc;
      if (dc > max_err_c) max_err_c = dc;
      checks += 3;
      if (dc > TOL_SC) begin
        failures++;
        $display("FAIL scaled block %0d coef %0d: got %0d expected %0d", b, i, sx12(out_c), ec_);
      end
      if (ds > TOL || du > TOL) begin
        failures++;
        $display("FAIL block %0d coef %0d: got %0d/%0d expected %0d/%0d",
                 b, i, sx12(out_s), sx12(out_u), es, eu);
      end
      if (seen[b] == 64) begin
        // QUADMEAN: mean square error of the block
        checks += 3;
        if (serr_c[b] / 64.0 > MSE_SC) begin
          failures++;
          $display("FAIL scaled block %0d: mean square error %f", b, serr_c[b] / 64.0);
        end
        if (serr_s[b] / 64.0 > MSE_MAX || serr_u[b] / 64.0 > MSE_MAX) begin
          failures++;
          $display("FAIL block %0d: mean square error %f / %f", b,
                   serr_s[b] / 64.0, serr_u[b] / 64.0);
        end
      end
    end
    checks++;
    if (rdy_s !== expect_rdy || rdy_u !== expect_rdy || rdy_c !== expect_rdy) begin
      failures++;
      $display("FAIL rdy at enabled cycle %0d: got %b/%b expected %b", ec, rdy_s, rdy_u,
               expect_rdy);
    end
  endtask

  // ------------------------------------------------------------ sequence
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      make_block(b);
      ref_block(b);
    end
    push_fill(10);
    for (int b = 0; b < 10; b++) begin                    // START on every block
      push_block(b, 1'b1, 0);
      if (b > 0) n_start_b2b++;
    end
    for (int b = 10; b < 20; b++) push_block(b, 1'b0, 0); // running on, no START
    push_block(20, 1'b1, 0);
    n_start_b2b++;
    for (int b = 21; b < 30; b++) push_block(b, 1'b0, 20); // EN stalls
    push_fill(64);                                         // one idle block
    push_block(30, 1'b1, 0);
    n_restart++;
    for (int b = 31; b < 35; b++) push_block(b, 1'b1, 5);
    push_fill(237);                                        // long idle stretch
    push_block(35, 1'b1, 0);
    n_restart++;
    for (int b = 36; b < NBLK; b++) push_block(b, 1'b1, 0);
    push_fill(LAT + 70);
  end

  initial begin : run
    int ec = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (sched[n]) begin
      @(negedge clk);
      if (sched[n].en) check_cycle(ec);
      en      = sched[n].en;
      start   = sched[n].start;
      data_in = sched[n].data;
      if (sched[n].en) begin
        if (sched[n].blk >= 0) begin
          blk_at[ec] = sched[n].blk;
          idx_at[ec] = sched[n].idx;
        end
        ec++;
      end
    end
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (seen[b] != 64) begin
        failures++;
        $display("FAIL block %0d: %0d coefficients seen", b, seen[b]);
      end
    end
    $display("blocks: %0d predefined, %0d random; max |error| %0d, scaled mode %0d",
             n_pre, n_rand, max_err, max_err_c);
    $display("mechanisms: start_b2b=%0d no_start=%0d stall_cycles=%0d restart=%0d",
             n_start_b2b, n_nostart, n_stall, n_restart);
    checks += 4;
    if (n_start_b2b == 0) failures++;
    if (n_nostart == 0)   failures++;
    if (n_stall == 0)     failures++;
    if (n_restart == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
