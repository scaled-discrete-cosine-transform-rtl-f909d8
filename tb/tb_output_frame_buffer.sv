// tb_output_frame_buffer: feeds 64-word blocks marked by start into a
// 4-block frame buffer: back-to-back blocks, blocks after idle gaps, and one
// block abandoned by an early start.  Checks the stored words through the
// read port, that frame_done pulses exactly when the fourth slot fills, and
// that the slots wrap around for the next frame.
module tb_output_frame_buffer;

  localparam int NB = 4;

  logic        clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [11:0] datain = '0;
  logic [7:0]  raddr = '0;
  logic [11:0] rdata;
  logic        frame_done;

  always #5 clk = ~clk;

  output_frame_buffer #(.N_BLOCKS(NB)) dut (.clk, .reset, .datain, .start, .raddr, .rdata,
                                            .frame_done);

  int checks = 0, failures = 0, n_done = 0, n_abandon = 0, n_gap = 0;
  logic [11:0] blkdat [8][64];

  // count frame_done pulses continuously
  always @(negedge clk) if (frame_done) n_done++;

  task automatic send(int b, int len);
    for (int i = 0; i < len; i++) begin
      start  = (i == 0);
      datain = blkdat[b][i];
      @(negedge clk);
    end
    start = 1'b0;
    datain = 12'($urandom);
  endtask

  task automatic check_slot(int slot, int b);
    for (int i = 0; i < 64; i++) begin
      raddr = 8'(64 * slot + i);
      @(negedge clk);
      checks++;
      if (rdata !== blkdat[b][i]) begin
        failures++;
        $display("FAIL slot %0d word %0d: got %h expected %h", slot, i, rdata, blkdat[b][i]);
      end
    end
  endtask

  initial begin : run
    foreach (blkdat[b, i]) blkdat[b][i] = 12'($urandom);
    repeat (2) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    send(0, 64);                           // slot 0
    send(1, 64);                           // slot 1, back to back
    repeat (7) @(negedge clk);             // gap
    n_gap++;
    send(7, 20);                           // abandoned after 20 words
    n_abandon++;
    send(2, 64);                           // slot 3 (slot 2 holds the abandoned block)
    @(negedge clk);                        // frame_done is registered
    checks++;
    if (n_done != 1) begin
      failures++;
      $display("FAIL frame_done count %0d after first frame", n_done);
    end
    send(3, 64);                           // wraps to slot 0
    repeat (3) @(negedge clk);
    check_slot(0, 3);
    check_slot(1, 1);
    check_slot(3, 2);
    // slot 2: first 20 words of the abandoned block
    for (int i = 0; i < 20; i++) begin
      raddr = 8'(128 + i);
      @(negedge clk);
      checks++;
      if (rdata !== blkdat[7][i]) failures++;
    end
    checks++;
    if (n_done != 1) failures++;
    $display("frame_done %0d, abandoned %0d, gaps %0d", n_done, n_abandon, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
