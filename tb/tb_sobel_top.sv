// tb_sobel_top - end-to-end test of the Sobel edge detector at full size.
//
// Uses the top with its default parameters (64 x 64 frame, threshold 128).
// Two frames are generated in the testbench: the first framed by a black
// border band, the second by noise up to its edges. Both hold a bright
// rectangle, a horizontal ramp, a checkerboard (high-frequency content) and
// a white-noise patch. Each is loaded through the load port
// and processed; the expected edge image is computed with the reference
// model. Checked:
//   - the gradients Gx, Gy on the observation port, result by result;
//   - the streamed results (8-bit magnitude and edge bit) in raster order;
//   - the stored edge image, read back through the read port;
//   - output_count and done, and for the unpaused frame the exact latency:
//     done W*H + W + 6 clocks after the clock that samples start.
// Frame 2 runs with random pauses on the source. The testbench counts how
// often each mechanism occurred (border zeroing, edge and non-edge
// decisions, magnitude clamping, source pauses, line-buffer flush beats,
// several pipeline stages busy at once, back-to-back frames) and counts a failure for any never seen.
module tb_sobel_top;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 64;
  localparam int H = 64;
  localparam int THR = 128;
  localparam int NPIX  = W * H;
  localparam int NBEAT = NPIX + W + 1;
  localparam int AW = $clog2(NPIX);
  localparam int BW = $clog2(NBEAT + 1);
  localparam int CW = $clog2(NPIX + 1);

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic          load_we;
  logic [AW-1:0] load_addr;
  pixel_t        load_data;
  logic          start, pause, busy, done;
  logic [CW-1:0] output_count;
  logic          data_valid, data_pad;
  pixel_t        input_image;
  logic [BW-1:0] idx_in;
  logic          grad_valid;
  grad_t         grad_x, grad_y;
  logic          output_valid, output_edge;
  pixel_t        output_image;
  logic [AW-1:0] rd_addr;
  result_t       rd_result;

  sobel_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  pixel_t img [NPIX];
  int exp_gx [NPIX], exp_gy [NPIX], exp_mag8 [NPIX], exp_edge [NPIX];
  int n_grad, n_out;
  // mechanism counters
  int n_border = 0, n_edge = 0, n_flat = 0, n_clamp = 0, n_pause = 0;
  int n_overlap = 0, n_frames = 0, n_pad = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic make_image(int seed_shift);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if (seed_shift == 0 && (x < 3 || y < 3 || x >= W - 3 || y >= H - 3))
          v = 0;                                           // black border band
        else if (x < 2 || y < 2 || x >= W - 2 || y >= H - 2)
          v = $urandom % 256;                              // noisy frame edge
        else if (x >= 8 + seed_shift && x < 28 && y >= 6 && y < 26)
          v = 230;                                         // bright rectangle
        else if (y >= 30 && y < 44)
          v = clip(x * 4 - seed_shift);                    // horizontal ramp
        else if (y >= 46 && x < 30)
          v = ((((x >> 1) ^ (y >> 1)) & 1) != 0) ? 200 : 20;      // checkerboard
        else if (y >= 46)
          v = $urandom % 256;                              // white noise
        else
          v = 60 + seed_shift;
        img[y * W + x] = pixel_t'(v);
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int a;
        a = y * W + x;
        if (x == 0 || y == 0 || x == W - 1 || y == H - 1) begin
          exp_gx[a] = 0; exp_gy[a] = 0; exp_mag8[a] = 0; exp_edge[a] = 0;
        end else begin
          nbhd_t p;
          int m;
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++)
              p[r][c] = int'(img[(y - 1 + r) * W + (x - 1 + c)]);
          exp_gx[a] = ref_gx(p);
          exp_gy[a] = ref_gy(p);
          m = ref_mag(p);
          exp_mag8[a] = ref_mag8(m);
          exp_edge[a] = (m > THR) ? 1 : 0;
        end
      end
  endtask

  // observation of the streams (falling edges)
  always @(negedge clk) begin
    if (!rst) begin
      if (data_valid && grad_valid && output_valid) n_overlap++;
      if (busy && pause) n_pause++;
      if (data_valid && data_pad) n_pad++;
      if (grad_valid) begin
        if (n_grad < NPIX)
          check(int'(grad_x) == exp_gx[n_grad] && int'(grad_y) == exp_gy[n_grad],
                $sformatf("pixel %0d: Gx %0d/%0d Gy %0d/%0d", n_grad,
                          grad_x, exp_gx[n_grad], grad_y, exp_gy[n_grad]));
        else
          check(1'b0, "extra gradient result");
        n_grad++;
      end
      if (output_valid) begin
        if (n_out < NPIX) begin
          int x, y;
          x = n_out % W;
          y = n_out / W;
          check(int'(output_image) == exp_mag8[n_out] && int'(output_edge) == exp_edge[n_out],
                $sformatf("pixel %0d: mag8 %0d/%0d edge %0d/%0d", n_out,
                          output_image, exp_mag8[n_out], output_edge, exp_edge[n_out]));
          if (x == 0 || y == 0 || x == W - 1 || y == H - 1) n_border++;
          else if (output_edge) n_edge++;
          else n_flat++;
          if (exp_mag8[n_out] == 255) n_clamp++;
        end else
          check(1'b0, "extra output result");
        n_out++;
      end
    end
  end

  task automatic run_frame(bit with_pause);
    int start_cycle, done_cycle;
    for (int i = 0; i < NPIX; i++) begin
      load_we   = 1'b1;
      load_addr = AW'(i);
      load_data = img[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    n_grad = 0;
    n_out  = 0;
    start = 1'b1;
    start_cycle = cycle;
    @(negedge clk);
    start = 1'b0;
    done_cycle = -1;
    for (int t = 0; t < 4 * NBEAT && done_cycle < 0; t++) begin
      pause = with_pause ? (($urandom % 5) == 0) : 1'b0;
      @(negedge clk);
      if (done) done_cycle = cycle;
    end
    pause = 1'b0;
    check(done_cycle >= 0, "done never rose");
    // start is sampled at clock start_cycle+1
    if (!with_pause)
      check(done_cycle - (start_cycle + 1) == NPIX + W + 6,
            $sformatf("frame latency %0d clocks, expected %0d",
                      done_cycle - (start_cycle + 1), NPIX + W + 6));
    repeat (4) @(negedge clk);
    check(int'(output_count) == NPIX && done, $sformatf("output_count %0d", output_count));
    check(n_grad == NPIX && n_out == NPIX,
          $sformatf("%0d gradients and %0d outputs, expected %0d", n_grad, n_out, NPIX));
    for (int i = 0; i < NPIX; i++) begin
      rd_addr = AW'(i);
      @(negedge clk);
      check(int'(rd_result.mag8) == exp_mag8[i] && int'(rd_result.edge_bit) == exp_edge[i],
            $sformatf("stored pixel %0d: %0d/%0d edge %0d/%0d", i, rd_result.mag8,
                      exp_mag8[i], rd_result.edge_bit, exp_edge[i]));
    end
    n_frames++;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load_we = 1'b0; load_addr = '0; load_data = '0;
    start = 1'b0; pause = 1'b0; rd_addr = '0; n_grad = 0; n_out = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    make_image(0);
    run_frame(1'b0);
    make_image(5);
    run_frame(1'b1);
    $display("mechanisms: border=%0d edge=%0d non_edge=%0d clamp=%0d pause=%0d overlap=%0d pad=%0d frames=%0d",
             n_border, n_edge, n_flat, n_clamp, n_pause, n_overlap, n_pad, n_frames);
    check(n_border > 0, "border zeroing never happened");
    check(n_edge > 0, "no edge decision");
    check(n_flat > 0, "no non-edge decision");
    check(n_clamp > 0, "magnitude clamp never happened");
    check(n_pause > 0, "source pause never happened");
    check(n_overlap > 0, "pipeline stages never overlapped");
    check(n_pad == 2 * (W + 1), "line-buffer flush beats missing");
    check(n_frames == 2, "second frame did not run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
