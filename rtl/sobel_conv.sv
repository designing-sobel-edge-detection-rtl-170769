// sobel_conv - Sobel gradient and |Gx|+|Gy| magnitude, two pipeline stages.
//
// Stage 1 applies the two 3x3 Sobel kernels to the window:
//   Gx = (p02 + 2*p12 + p22) - (p00 + 2*p10 + p20)   (right minus left column)
//   Gy = (p20 + 2*p21 + p22) - (p00 + 2*p01 + p02)   (bottom minus top row)
// where pRC is window[row][col]. The multiplications by the kernel weights
// 1 and 2 are wires and shifts; only adders remain. Stage 2 forms the
// magnitude approximation |Gx| + |Gy| (0..2040).
//
// `zero` forces both gradients, and so the magnitude, to 0; the pipeline uses
// it for border pixels, whose window is not a real neighbourhood. `side_i`
// is an opaque sideband (pixel address, flags) carried along with the data.
//
// Timing: one result per clock; out_valid, gx, gy, mag and side_o appear
// two clocks after in_valid.
//
// The kernels and the |Gx|+|Gy| approximation are those of the design; the
// split into two register stages and the zeroing input are choices of this
// implementation.
module sobel_conv
  import sobel_pkg::*;
#(
  parameter int unsigned SIDE_W = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  window_t           window,
  input  logic              zero,
  input  logic [SIDE_W-1:0] side_i,
  output logic              out_valid,
  output grad_t             gx,
  output grad_t             gy,
  output mag_t              mag,
  output logic [SIDE_W-1:0] side_o
);

  // Sum of a kernel line with weights 1, 2, 1; at most 4*255 = 1020.
  function automatic grad_t line121(pixel_t a, pixel_t b, pixel_t c);
    return grad_t'({3'b000, a}) + grad_t'({2'b00, b, 1'b0}) + grad_t'({3'b000, c});
  endfunction

  function automatic mag_t abs_grad(grad_t g);
    return mag_t'(g < 0 ? -g : g);
  endfunction

  grad_t gx_c, gy_c;
  always_comb begin
    gx_c = line121(window[0][2], window[1][2], window[2][2])
         - line121(window[0][0], window[1][0], window[2][0]);
    gy_c = line121(window[2][0], window[2][1], window[2][2])
         - line121(window[0][0], window[0][1], window[0][2]);
  end

  // stage 1
  logic              v1;
  grad_t             gx1, gy1;
  logic [SIDE_W-1:0] side1;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1    <= 1'b0;
      gx1   <= '0;
      gy1   <= '0;
      side1 <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        gx1   <= zero ? '0 : gx_c;
        gy1   <= zero ? '0 : gy_c;
        side1 <= side_i;
      end
    end
  end

  // stage 2
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      gx        <= '0;
      gy        <= '0;
      mag       <= '0;
      side_o    <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        gx     <= gx1;
        gy     <= gy1;
        mag    <= abs_grad(gx1) + abs_grad(gy1);
        side_o <= side1;
      end
    end
  end

endmodule
