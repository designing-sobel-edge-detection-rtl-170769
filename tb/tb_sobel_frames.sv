// tb_sobel_frames - the detector at other frame sizes.
//
// Runs one synthetic portrait-like frame through each of two sobel_top
// configurations side by side: a 512 x 512 frame, the size of the common
// Lena test image, and a non-square 96 x 40 frame with a higher threshold.
// Each runner checks latency, the result stream and the stored image
// against the reference model; the scene must also give some edge pixels.
module tb_sobel_frames;

  logic fin_a, fin_b;
  int   chk_a, chk_b, fail_a, fail_b, edg_a, edg_b;

  sobel_frame_runner #(.W(512), .H(512), .THR(128)) u_lena_size (
    .finished(fin_a), .checks(chk_a), .failures(fail_a), .edges(edg_a));
  sobel_frame_runner #(.W(96), .H(40), .THR(300)) u_wide (
    .finished(fin_b), .checks(chk_b), .failures(fail_b), .edges(edg_b));

  int checks, failures;

  initial begin
    #30ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b + 1);
    $finish;
  end

  initial begin
    wait (fin_a === 1'b1 && fin_b === 1'b1);
    checks   = chk_a + chk_b + 2;
    failures = fail_a + fail_b;
    if (edg_a == 0) failures++;
    if (edg_b == 0) failures++;
    $display("512x512: %0d checks, %0d edge pixels; 96x40: %0d checks, %0d edge pixels",
             chk_a, edg_a, chk_b, edg_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
