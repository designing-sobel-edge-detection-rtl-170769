// tb_sobel_input - self-checking test of the frame memory / raster source.
//
// Loads a random 8 x 4 frame through the load port, then runs two frames:
// one with `pause` low, where the W*H+W+1 beats must come on consecutive
// clocks starting one clock after `start`, and one with random pauses,
// where no beat may be issued while paused. Every beat is checked against
// the loaded frame in raster order, followed by W+1 zero pad beats.
module tb_sobel_input;
  import sobel_pkg::*;

  localparam int W = 8;
  localparam int H = 4;
  localparam int NPIX  = W * H;
  localparam int NBEAT = NPIX + W + 1;
  localparam int AW = $clog2(NPIX);
  localparam int BW = $clog2(NBEAT + 1);

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic          load_we;
  logic [AW-1:0] load_addr;
  pixel_t        load_data;
  logic          start, pause, busy;
  logic          data_valid, pad;
  pixel_t        input_image;
  logic [BW-1:0] idx_in;

  sobel_input #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  pixel_t img [NPIX];
  int beat;
  int first_cycle, last_cycle;
  logic paused_prev;
  int n_paused;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // beat checker (falling edges)
  always @(negedge clk) begin
    if (!rst && data_valid) begin
      if (beat == 0) first_cycle = cycle;
      last_cycle = cycle;
      if (beat < NPIX)
        check(input_image == img[beat] && !pad,
              $sformatf("beat %0d pixel %0d expected %0d", beat, input_image, img[beat]));
      else
        check(input_image == 0 && pad, $sformatf("pad beat %0d", beat));
      check(!paused_prev, "beat issued while paused");
      beat++;
    end
    paused_prev = pause;
  end

  task automatic run_frame(bit with_pause);
    int start_cycle;
    beat = 0;
    start = 1'b1;
    start_cycle = cycle;
    @(negedge clk);
    start = 1'b0;
    while (busy) begin
      pause = with_pause ? (($urandom % 3) == 0) : 1'b0;
      if (pause) n_paused++;
      @(negedge clk);
    end
    pause = 1'b0;
    repeat (3) @(negedge clk);
    check(beat == NBEAT, $sformatf("frame had %0d beats, expected %0d", beat, NBEAT));
    // start is sampled at clock start_cycle+1; the first beat leaves one
    // clock after that and the rest follow back to back.
    if (!with_pause) begin
      check(first_cycle == start_cycle + 2,
            $sformatf("first beat at +%0d", first_cycle - start_cycle - 1));
      check(last_cycle == start_cycle + NBEAT + 1,
            $sformatf("last beat at +%0d", last_cycle - start_cycle - 1));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load_we = 1'b0; load_addr = '0; load_data = '0;
    start = 1'b0; pause = 1'b0; paused_prev = 1'b0; beat = 0; n_paused = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NPIX; i++) begin
      img[i]    = pixel_t'($urandom);
      load_we   = 1'b1;
      load_addr = AW'(i);
      load_data = img[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    @(negedge clk);
    check(!busy && !data_valid, "idle after load");
    run_frame(1'b0);
    run_frame(1'b1);
    check(n_paused > 0, "pause never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
