// tb_sobel_conv - self-checking test of the Sobel gradient / magnitude unit.
//
// Drives directed windows (flat, vertical and horizontal steps, the
// largest-magnitude pattern, the zero input) and random windows with random
// bubbles. Each result is compared with the multiply-accumulate reference
// and must appear exactly two clocks after its input.
module tb_sobel_conv;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int SIDE_W = 12;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic              in_valid;
  window_t           window;
  logic              zero;
  logic [SIDE_W-1:0] side_i;
  logic              out_valid;
  grad_t             gx, gy;
  mag_t              mag;
  logic [SIDE_W-1:0] side_o;

  sobel_conv #(.SIDE_W(SIDE_W)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int gx; int gy; int mag; int side; int due; } exp_t;
  exp_t expq [$];

  function automatic nbhd_t to_nbhd(window_t w);
    nbhd_t p;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        p[r][c] = int'(w[r][c]);
    return p;
  endfunction

  // Inputs change on the falling edge and are sampled on the next rising
  // edge; outputs are checked on falling edges, so there is no race.
  task automatic drive(window_t w, logic z);
    nbhd_t p;
    exp_t e;
    p = to_nbhd(w);
    in_valid = 1'b1;
    window   = w;
    zero     = z;
    side_i   = SIDE_W'($urandom);
    e.gx   = z ? 0 : ref_gx(p);
    e.gy   = z ? 0 : ref_gy(p);
    e.mag  = z ? 0 : ref_mag(p);
    e.side = int'(side_i);
    e.due  = cycle + 2;   // two register stages
    expq.push_back(e);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic window_t fill(int v [3][3]);
    window_t w;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        w[r][c] = pixel_t'(v[r][c]);
    return w;
  endfunction

  // checker
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = expq.pop_front();
        if (int'(gx) != e.gx || int'(gy) != e.gy || int'(mag) != e.mag ||
            int'(side_o) != e.side || cycle != e.due) begin
          failures++;
          $display("FAIL: gx=%0d/%0d gy=%0d/%0d mag=%0d/%0d side=%0d/%0d cyc=%0d/%0d",
                   gx, e.gx, gy, e.gy, mag, e.mag, side_o, e.side, cycle, e.due);
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
    rst = 1'b1; in_valid = 1'b0; window = '0; zero = 1'b0; side_i = '0;
    idle(3);
    rst = 1'b0;
    idle(1);
    drive(fill('{'{0,0,0},'{0,0,0},'{0,0,0}}), 1'b0);
    drive(fill('{'{77,77,77},'{77,77,77},'{77,77,77}}), 1'b0);
    drive(fill('{'{0,0,255},'{0,0,255},'{0,0,255}}), 1'b0);        // Gx = +1020
    drive(fill('{'{255,0,0},'{255,0,0},'{255,0,0}}), 1'b0);        // Gx = -1020
    drive(fill('{'{0,0,0},'{0,0,0},'{255,255,255}}), 1'b0);        // Gy = +1020
    drive(fill('{'{255,255,255},'{0,0,0},'{0,0,0}}), 1'b0);        // Gy = -1020
    drive(fill('{'{0,0,0},'{0,0,255},'{0,255,255}}), 1'b0);        // diagonal
    drive(fill('{'{255,255,0},'{255,0,0},'{0,0,0}}), 1'b0);
    drive(fill('{'{0,0,0},'{0,0,255},'{255,255,255}}), 1'b0);
    drive(fill('{'{255,0,0},'{0,0,0},'{0,0,255}}), 1'b0);
    drive(fill('{'{0,0,255},'{0,0,255},'{255,255,255}}), 1'b0);    // corner: Gx = Gy = +765
    drive(fill('{'{0,0,255},'{0,0,255},'{0,255,255}}), 1'b1);      // zeroed
    for (int i = 0; i < 400; i++) begin
      window_t w;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          w[r][c] = pixel_t'($urandom);
      drive(w, ($urandom % 8) == 0);
      idle($urandom % 3);
    end
    idle(5);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
