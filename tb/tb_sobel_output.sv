// tb_sobel_output - self-checking test of the result memory and counters.
//
// Writes a 4 x 4 frame of random results at addresses in a shuffled order
// with random bubbles. Checks, one clock after each input, the streaming
// outputs and output_count, that `done` rises exactly with the W*H-th
// result and stays high, and then reads every stored word back through the
// read port (one clock latency). A second frame checks that `start` clears
// the count and done.
module tb_sobel_output;
  import sobel_pkg::*;

  localparam int W = 4;
  localparam int H = 4;
  localparam int NPIX = W * H;
  localparam int AW = $clog2(NPIX);
  localparam int CW = $clog2(NPIX + 1);

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic          start, in_valid;
  logic [AW-1:0] addr;
  result_t       result;
  logic          output_valid, output_edge, done;
  pixel_t        output_image;
  logic [CW-1:0] output_count;
  logic [AW-1:0] rd_addr;
  result_t       rd_result;

  sobel_output #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;
  result_t frame [NPIX];
  int order [NPIX];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame();
    for (int i = 0; i < NPIX; i++) begin
      frame[i] = result_t'($urandom);
      order[i] = i;
    end
    order.shuffle();
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(output_count == 0 && !done, "start did not clear count / done");
    for (int i = 0; i < NPIX; i++) begin
      repeat ($urandom % 3) begin
        @(negedge clk);
        check(!output_valid, "output_valid on a bubble");
      end
      in_valid = 1'b1;
      addr     = AW'(order[i]);
      result   = frame[order[i]];
      @(negedge clk);
      in_valid = 1'b0;
      check(output_valid && output_image == frame[order[i]].mag8 &&
            output_edge == frame[order[i]].edge_bit, $sformatf("stream output %0d", i));
      check(int'(output_count) == i + 1, $sformatf("count %0d expected %0d", output_count, i + 1));
      check(done == (i == NPIX - 1), $sformatf("done=%0d after %0d results", done, i + 1));
    end
    repeat (3) @(negedge clk);
    check(done && int'(output_count) == NPIX, "done not held");
    for (int i = 0; i < NPIX; i++) begin
      rd_addr = AW'(i);
      @(negedge clk);
      check(rd_result == frame[i], $sformatf("readback %0d: %h expected %h", i, rd_result, frame[i]));
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
    rst = 1'b1; start = 1'b0; in_valid = 1'b0; addr = '0; result = '0; rd_addr = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!done && output_count == 0, "reset state");
    run_frame();
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
