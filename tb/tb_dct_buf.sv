// tb_dct_buf: checks the 8x8 transpose buffer.  Random 10-bit words stream
// in as back-to-back 64-word blocks (START on some blocks, EN stalls in
// part of the run).  Output number o of a block must equal the input word
// at row o%8, column o/8 of that block and must appear exactly LAT = 55
// enabled cycles after input word o went in; rdy must mark output 0 of
// every started block and nothing else.
module tb_dct_buf;

  localparam int NBLK = 24;
  localparam int LAT  = 55;

  logic       clk = 1'b0, rst = 1'b1, en = 1'b1, start = 1'b0;
  logic [9:0] din = '0;
  logic [9:0] dout;
  logic       rdy;

  always #5 clk = ~clk;

  dct_buf dut (.clk, .rst, .en, .start, .din, .dout, .rdy);

  int checks = 0, failures = 0, n_stall = 0, n_start = 0;

  logic [9:0] word [NBLK][64];
  bit         started [NBLK];
  int         blk_at [int], idx_at [int];

  task automatic check(int ec);
    int src = ec - LAT;
    bit er = 1'b0;
    if (blk_at.exists(src)) begin
      int b = blk_at[src], o = idx_at[src];
      logic [9:0] e = word[b][8 * (o % 8) + o / 8];
      er = started[b] && o == 0;
      checks++;
      if (dout !== e) begin
        failures++;
        $display("FAIL block %0d out %0d: got %h expected %h", b, o, dout, e);
      end
    end
    checks++;
    if (rdy !== er) begin
      failures++;
      $display("FAIL rdy at enabled cycle %0d", ec);
    end
  endtask

  initial begin : run
    int ec = 0;
    foreach (word[b, i]) word[b][i] = 10'($urandom);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int b = 0; b < NBLK + 2; b++) begin
      for (int i = 0; i < 64; i++) begin
        while (b >= NBLK / 2 && b < NBLK && ($urandom % 100) < 10) begin
          @(negedge clk);
          en  = 1'b0;
          din = 10'($urandom);
          n_stall++;
        end
        @(negedge clk);
        check(ec);
        en = 1'b1;
        if (b < NBLK) begin
          bit s;
          s = (i == 0) && (b % 3 == 0);
          start = s;
          if (i == 0) started[b] = s;
          if (s) n_start++;
          din = word[b][i];
          blk_at[ec] = b;
          idx_at[ec] = i;
        end else begin
          start = 1'b0;
          din   = 10'($urandom);
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
