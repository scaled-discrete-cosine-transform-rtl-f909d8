// tb_dct8aan: checks the serial 1-D AAN DCT stage in the configurations
// used by the core (8-bit in / 10-bit out and 10-bit in / 12-bit out), and
// in scaled-output mode, where y(k) = sa(k)/4 = DCT(k) / (4 s(k)).
// Rows of eight samples (extreme values first, then random ones) stream in
// back to back, partly with EN stalls.  Every output is compared with the
// floating-point orthonormal 8-point DCT rounded to an integer (limit of one
// unit), and rdy must come exactly 11 enabled cycles after start, together
// with y(0) of the started row.
module tb_dct8aan;
  import dct_ref_pkg::*;

  localparam int NROW = 300;
  localparam int LAT  = 11;

  logic clk = 1'b0, rst = 1'b1, en = 1'b1, start = 1'b0;
  logic signed [7:0]  din_a = '0;
  logic signed [9:0]  din_b = '0;
  logic signed [9:0]  dout_a;
  logic signed [11:0] dout_b;
  logic signed [9:0]  dout_c;
  logic rdy_a, rdy_b, rdy_c;

  always #5 clk = ~clk;

  dct8aan dut_a (.clk, .rst, .en, .start, .din(din_a), .dout(dout_a), .rdy(rdy_a));
  dct8aan #(.IN_W(10), .OUT_W(12)) dut_b (.clk, .rst, .en, .start, .din(din_b),
                                           .dout(dout_b), .rdy(rdy_b));
  dct8aan #(.SCALED(1'b1), .SC_SHIFT(2)) dut_c (.clk, .rst, .en, .start, .din(din_a),
                                               .dout(dout_c), .rdy(rdy_c));

  int checks = 0, failures = 0, n_stall = 0, n_start = 0;

  int va [NROW][8], vb [NROW][8];
  int ya [NROW][8], yb [NROW][8], yc [NROW][8];

  function automatic int clip(int v, int w);
    int hi = (1 << (w - 1)) - 1;
    if (v > hi) return hi;
    if (v < -hi - 1) return -hi - 1;
    return v;
  endfunction

  initial begin
    for (int r = 0; r < NROW; r++) begin
      vec8_t xa, xb, ra, rb;
      for (int m = 0; m < 8; m++) begin
        if (r == 0)      begin va[r][m] = -128; vb[r][m] = -362; end
        else if (r == 1) begin va[r][m] = 127;  vb[r][m] = 361; end
        else if (r == 2) begin va[r][m] = (m % 2) ? -128 : 127; vb[r][m] = (m % 2) ? -300 : 300; end
        else begin
          va[r][m] = int'($urandom % 256) - 128;
          vb[r][m] = int'($urandom % 725) - 362;
        end
        xa[m] = real'(va[r][m]);
        xb[m] = real'(vb[r][m]);
      end
      ra = dct1d(xa);
      rb = dct1d(xb);
      for (int k = 0; k < 8; k++) begin
        ya[r][k] = clip(round12(ra[k]), 10);
        yb[r][k] = clip(round12(rb[k]), 12);
        yc[r][k] = clip(round12(ra[k] / aan_scale(k) / 4.0), 10);
      end
    end
  end

  // enabled cycle -> row/index of the sample that entered then
  int row_at [int], idx_at [int];
  bit started_row [NROW];

  task automatic check(int ec);
    int src = ec - LAT;
    bit er = 1'b0;
    if (row_at.exists(src)) begin
      int r = row_at[src], k = idx_at[src];
      int da = int'(dout_a) - ya[r][k], db = int'(dout_b) - yb[r][k];
      int dc = int'(dout_c) - yc[r][k];
      er = started_row[r] && k == 0;
      checks += 3;
      if (da > 1 || da < -1 || db > 1 || db < -1 || dc > 1 || dc < -1) begin
        failures++;
        $display("FAIL row %0d k %0d: got %0d/%0d/%0d expected %0d/%0d/%0d", r, k, dout_a,
                 dout_b, dout_c, ya[r][k], yb[r][k], yc[r][k]);
      end
    end
    checks++;
    if (rdy_a !== er || rdy_b !== er || rdy_c !== er) begin
      failures++;
      $display("FAIL rdy at enabled cycle %0d", ec);
    end
  endtask

  initial begin : run
    int ec = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < NROW + 3; r++) begin
      for (int m = 0; m < 8; m++) begin
        // stalls in the second half of the run
        while (r > NROW / 2 && r < NROW && ($urandom % 100) < 15) begin
          @(negedge clk);
          en = 1'b0;
          din_a = 8'($urandom);
          din_b = 10'($urandom);
          n_stall++;
        end
        @(negedge clk);
        check(ec);
        en = 1'b1;
        if (r < NROW) begin
          bit s;
          s = (m == 0) && (r % 7 == 0);
          start = s;
          if (m == 0) started_row[r] = s;
          if (s) n_start++;
          din_a = 8'(va[r][m]);
          din_b = 10'(vb[r][m]);
          row_at[ec] = r;
          idx_at[ec] = m;
        end else begin
          start = 1'b0;
          din_a = '0;
          din_b = '0;
        end
        ec++;
      end
    end
    @(negedge clk);
    checks += 2;
    if (n_stall == 0) failures++;
    if (n_start == 0) failures++;
    $display("stall cycles %0d, starts %0d", n_stall, n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
