// tb_sobel_threshold - self-checking test of the threshold / clamp stage.
//
// Sweeps magnitudes around the threshold (threshold-1, threshold,
// threshold+1), around the 8-bit clamp point (254..256), the extremes and
// random values, under random thresholds and random bubbles. edge_bit must
// be (mag > threshold), mag8 must be min(mag, 255), and each result must
// appear one clock after its input.
module tb_sobel_threshold;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int SIDE_W = 12;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic              in_valid;
  mag_t              mag;
  mag_t              threshold;
  logic [SIDE_W-1:0] side_i;
  logic              out_valid;
  result_t           result;
  logic [SIDE_W-1:0] side_o;

  sobel_threshold #(.SIDE_W(SIDE_W)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_edge = 0, n_flat = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int mag8; int edge_bit; int side; int due; } exp_t;
  exp_t expq [$];

  // Inputs change on falling edges; outputs are checked on falling edges.
  task automatic drive(int m, int t);
    exp_t e;
    in_valid  = 1'b1;
    mag       = mag_t'(m);
    threshold = mag_t'(t);
    side_i    = SIDE_W'($urandom);
    e.mag8     = ref_mag8(m);
    e.edge_bit = (m > t) ? 1 : 0;
    e.side     = int'(side_i);
    e.due      = cycle + 1;
    if (e.edge_bit == 1) n_edge++; else n_flat++;
    expq.push_back(e);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = expq.pop_front();
        if (int'(result.mag8) != e.mag8 || int'(result.edge_bit) != e.edge_bit ||
            int'(side_o) != e.side || cycle != e.due) begin
          failures++;
          $display("FAIL: mag8=%0d/%0d edge=%0d/%0d side=%0d/%0d cyc=%0d/%0d",
                   result.mag8, e.mag8, result.edge_bit, e.edge_bit,
                   side_o, e.side, cycle, e.due);
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; mag = '0; threshold = '0; side_i = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int t = 0; t < 2041; t += 97) begin
      for (int d = -1; d <= 1; d++)
        if (t + d >= 0) drive(t + d, t);
    end
    for (int m = 250; m <= 260; m++) drive(m, 128);
    drive(0, 0);
    drive(2040, 2040);
    drive(2040, 0);
    drive(0, 2040);
    for (int i = 0; i < 300; i++) begin
      drive($urandom % 2041, $urandom % 2041);
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0 || n_edge == 0 || n_flat == 0) begin
      failures++;
      $display("FAIL: %0d results missing, %0d edge, %0d non-edge", expq.size(), n_edge, n_flat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
