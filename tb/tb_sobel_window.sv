// tb_sobel_window - self-checking test of the line buffers and 3x3 window.
//
// Streams random 8 x 6 frames (plus the W+1 pad beats) with random bubbles
// into the window unit. After every input beat, checked one clock later:
// a window must be emitted exactly for beats W+1 onwards; its centre address
// must count 0..W*H-1 in raster order; the border flag must mark the outer
// ring; and every non-border window must equal the frame's 3x3
// neighbourhood of its centre. Two frames are run to check that `start`
// re-aligns the counters.
module tb_sobel_window;
  import sobel_pkg::*;

  localparam int W = 8;
  localparam int H = 6;
  localparam int NPIX = W * H;
  localparam int AW = $clog2(NPIX);

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic          start, in_valid;
  pixel_t        in_pixel;
  logic          win_valid;
  window_t       window;
  logic [AW-1:0] addr;
  logic          border;

  sobel_window #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;
  int n_border = 0, n_inner = 0, n_bubble = 0;
  pixel_t img [NPIX];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame();
    int emitted = 0;
    for (int i = 0; i < NPIX; i++) img[i] = pixel_t'($urandom);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < NPIX + W + 1; k++) begin
      while (($urandom % 4) == 0) begin
        n_bubble++;
        in_valid = 1'b0;
        @(negedge clk);
        check(!win_valid, "window emitted on a bubble");
      end
      in_valid = 1'b1;
      in_pixel = (k < NPIX) ? img[k] : 8'd0;
      @(negedge clk);
      in_valid = 1'b0;
      if (k < W + 1) begin
        check(!win_valid, $sformatf("window emitted at beat %0d", k));
      end else begin
        int c, cx, cy;
        bit bexp;
        c  = k - W - 1;
        cx = c % W;
        cy = c / W;
        bexp = (cx == 0) || (cx == W - 1) || (cy == 0) || (cy == H - 1);
        check(win_valid, $sformatf("no window at beat %0d", k));
        check(int'(addr) == c, $sformatf("addr %0d expected %0d", addr, c));
        check(border == bexp, $sformatf("border flag at centre %0d", c));
        if (bexp) n_border++;
        else begin
          n_inner++;
          for (int r = 0; r < 3; r++)
            for (int q = 0; q < 3; q++)
              check(window[r][q] == img[(cy - 1 + r) * W + (cx - 1 + q)],
                    $sformatf("centre (%0d,%0d) window[%0d][%0d]=%0d expected %0d",
                              cx, cy, r, q, window[r][q],
                              img[(cy - 1 + r) * W + (cx - 1 + q)]));
        end
        emitted++;
      end
    end
    check(emitted == NPIX, $sformatf("%0d windows, expected %0d", emitted, NPIX));
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0; in_valid = 1'b0; in_pixel = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run_frame();
    run_frame();
    check(n_border > 0 && n_inner > 0 && n_bubble > 0, "border, interior or bubble case never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
