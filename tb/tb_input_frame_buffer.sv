// tb_input_frame_buffer: loads a small frame (4 blocks) under reset, then
// checks that the pixels stream out in address order, one per clock, from
// the second cycle after reset, that ready marks exactly the first pixel
// of every block, that the stream wraps to the start of the frame, and that
// a write during streaming shows up on the next pass.
module tb_input_frame_buffer;

  localparam int NB = 4;
  localparam int DEPTH = NB * 64;

  logic       clk = 1'b0, reset = 1'b1, we = 1'b0;
  logic [7:0] waddr = '0, wdata = '0;
  logic [7:0] dataout;
  logic       ready;

  always #5 clk = ~clk;

  input_frame_buffer #(.N_BLOCKS(NB)) dut (.clk, .reset, .we, .waddr, .wdata, .dataout, .ready);

  int checks = 0, failures = 0, n_wrap = 0;
  logic [7:0] img [DEPTH];

  initial begin : run
    foreach (img[a]) img[a] = 8'($urandom);
    repeat (2) @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = 8'(a); wdata = img[a];
      @(negedge clk);
    end
    we = 1'b0;
    reset = 1'b0;                         // the first pixel is out one edge later
    for (int n = 0; n < 3 * DEPTH; n++) begin
      int a;
      a = n % DEPTH;
      // rewrite one pixel on the first pass; it must appear on the next
      if (n == 10) begin
        img[200] = ~img[200];
        we = 1'b1; waddr = 8'd200; wdata = img[200];
      end else we = 1'b0;
      @(negedge clk);
      checks += 2;
      if (dataout !== img[a]) begin
        failures++;
        $display("FAIL pixel %0d: got %h expected %h", a, dataout, img[a]);
      end
      if (ready !== (a % 64 == 0)) begin
        failures++;
        $display("FAIL ready at pixel %0d", a);
      end
      if (a == DEPTH - 1) n_wrap++;
    end
    checks++;
    if (n_wrap != 3) failures++;
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
