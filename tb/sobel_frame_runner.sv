// sobel_frame_runner - drives one sobel_top instance through one frame.
//
// Testbench helper. Instantiates sobel_top with the given W, H and
// THRESHOLD, generates a synthetic scene (light background, a dark oval
// "head" with a lighter oval "face" inside it, thin dark strokes like
// printed text, and a soft shading ramp), loads it, runs one frame with
// `pause` low and checks: the exact latency (done W*H + W + 6 clocks after
// start is sampled), every streamed result in raster order, and every
// stored result read back, all against the reference model. It reports its
// check and failure counts and raises `finished` when done.
module sobel_frame_runner
  import sobel_pkg::*;
  import sobel_ref_pkg::*;
#(
  parameter int W   = 64,
  parameter int H   = 64,
  parameter int THR = 128
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   edges
);

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

  sobel_top #(.W(W), .H(H), .THRESHOLD(mag_t'(THR))) dut (.*);

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  pixel_t img [NPIX];
  int exp_mag8 [NPIX];
  bit exp_edge [NPIX];
  int n_out;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0dx%0d): %s", W, H, what);
    end
  endtask

  function automatic int scene(int x, int y);
    int dx, dy, v;
    dx = x - W / 2;
    dy = y - H / 3;
    v = 190 + (x * 40) / W;                                  // shading ramp
    if (dx * dx * 9 + dy * dy * 4 < (W * W) / 4) v = 50;     // head
    if (dx * dx * 16 + (dy - H / 20) * (dy - H / 20) * 9 < (W * W) / 4)
      v = 140;                                               // face
    if (y > (2 * H) / 3 && (y % 7) == 3 && ((x / 3) % 3) != 0)
      v = 30;                                                // text strokes
    return v;
  endfunction

  always @(negedge clk) begin
    if (!rst && output_valid) begin
      if (n_out < NPIX)
        check(int'(output_image) == exp_mag8[n_out] && output_edge == exp_edge[n_out],
              $sformatf("pixel %0d: mag8 %0d/%0d edge %0d/%0d", n_out, output_image,
                        exp_mag8[n_out], output_edge, exp_edge[n_out]));
      else
        check(1'b0, "extra output");
      if (output_edge) edges++;
      n_out++;
    end
  end

  initial begin
    int start_cycle, done_cycle;
    finished = 1'b0; checks = 0; failures = 0; edges = 0; n_out = 0;
    rst = 1'b1; load_we = 1'b0; load_addr = '0; load_data = '0;
    start = 1'b0; pause = 1'b0; rd_addr = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y * W + x] = pixel_t'(scene(x, y));
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int a;
        a = y * W + x;
        if (x == 0 || y == 0 || x == W - 1 || y == H - 1) begin
          exp_mag8[a] = 0;
          exp_edge[a] = 1'b0;
        end else begin
          nbhd_t p;
          int m;
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 3; c++)
              p[r][c] = int'(img[(y - 1 + r) * W + (x - 1 + c)]);
          m = ref_mag(p);
          exp_mag8[a] = ref_mag8(m);
          exp_edge[a] = (m > THR);
        end
      end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NPIX; i++) begin
      load_we   = 1'b1;
      load_addr = AW'(i);
      load_data = img[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    start = 1'b1;
    start_cycle = cycle;
    @(negedge clk);
    start = 1'b0;
    done_cycle = -1;
    for (int t = 0; t < 2 * NBEAT && done_cycle < 0; t++) begin
      @(negedge clk);
      if (done) done_cycle = cycle;
    end
    check(done_cycle >= 0, "done never rose");
    check(done_cycle - (start_cycle + 1) == NPIX + W + 6,
          $sformatf("latency %0d, expected %0d", done_cycle - (start_cycle + 1), NPIX + W + 6));
    repeat (3) @(negedge clk);
    check(n_out == NPIX && int'(output_count) == NPIX,
          $sformatf("%0d outputs, count %0d", n_out, output_count));
    for (int i = 0; i < NPIX; i++) begin
      rd_addr = AW'(i);
      @(negedge clk);
      check(int'(rd_result.mag8) == exp_mag8[i] && rd_result.edge_bit == exp_edge[i],
            $sformatf("stored pixel %0d", i));
    end
    finished = 1'b1;
  end

endmodule
