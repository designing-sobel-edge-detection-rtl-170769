// sobel_threshold - binary edge decision and 8-bit magnitude pixel.
//
// Compares the gradient magnitude with `threshold`: edge_bit is 1 when
// mag > threshold, else 0. Alongside it, the magnitude is clamped to 255 to
// give an 8-bit grayscale edge-strength pixel (mag8), the form an edge
// image is viewed in. `side_i` is carried through unchanged.
//
// Timing: one register stage; out_valid, result and side_o appear one clock
// after in_valid.
//
// Comparing with a threshold and producing edge = 1 / non-edge = 0 follows
// the design; the strict comparison, the clamped 8-bit magnitude output and
// the threshold arriving as an input are choices of this implementation.
module sobel_threshold
  import sobel_pkg::*;
#(
  parameter int unsigned SIDE_W = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  mag_t              mag,
  input  mag_t              threshold,
  input  logic [SIDE_W-1:0] side_i,
  output logic              out_valid,
  output result_t           result,
  output logic [SIDE_W-1:0] side_o
);

  localparam mag_t PIX_MAX = mag_t'(2**PIX_W - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      result    <= '0;
      side_o    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        result.edge_bit <= (mag > threshold);
        result.mag8     <= (mag > PIX_MAX) ? pixel_t'(PIX_MAX) : mag[PIX_W-1:0];
        side_o          <= side_i;
      end
    end
  end

endmodule
