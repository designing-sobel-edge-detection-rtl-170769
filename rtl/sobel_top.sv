// sobel_top - pipelined Sobel edge detector for one W x H grayscale frame.
//
// Data path, one pixel per clock:
//
//   sobel_input -> sobel_window -> sobel_conv (2 stages) -> sobel_threshold
//     frame memory   line buffers    Gx, Gy, |Gx|+|Gy|      edge bit, 8-bit
//     raster scan    3x3 window                              magnitude
//                                                      -> sobel_output
//                                                         result memory, count, done
//
// Use: write the frame through load_we/load_addr/load_data, pulse `start`,
// wait for `done`, then read the edge image through rd_addr/rd_result (one
// clock read latency). Results also stream out on output_valid /
// output_image / output_edge in raster order while the frame runs. Pixels
// in the outer row and column ring of the frame have no full 3x3
// neighbourhood and are written as magnitude 0, non-edge.
//
// Timing with `pause` low: a frame takes W*H + W + 1 beats; `done` rises
// W*H + W + 6 clocks after the clock edge that samples `start` (one clock of
// memory read, one of windowing, two of convolution, one of thresholding,
// one of output write). Holding `pause` high stops the source only; the
// stages behind it keep draining.
//
// The module split, the Sobel kernels, |Gx|+|Gy| and the thresholding
// follow the design; the frame size default of 64 x 64 (4096 pixels)
// matches the image array of its simulation. The threshold value, border
// treatment, pause input and host ports are choices of this implementation.
module sobel_top
  import sobel_pkg::*;
#(
  parameter int unsigned W         = 64,
  parameter int unsigned H         = 64,
  parameter mag_t        THRESHOLD = mag_t'(128),
  localparam int unsigned NPIX  = W * H,
  localparam int unsigned NBEAT = NPIX + W + 1,
  localparam int unsigned AW    = $clog2(NPIX),
  localparam int unsigned BW    = $clog2(NBEAT + 1),
  localparam int unsigned CW    = $clog2(NPIX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // frame load
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  pixel_t        load_data,
  // control and status
  input  logic          start,
  input  logic          pause,
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] output_count,
  // input-side stream (observation)
  output logic          data_valid,
  output pixel_t        input_image,
  output logic [BW-1:0] idx_in,
  output logic          data_pad,
  // gradient stage (observation)
  output logic          grad_valid,
  output grad_t         grad_x,
  output grad_t         grad_y,
  // output-side stream
  output logic          output_valid,
  output pixel_t        output_image,
  output logic          output_edge,
  // result read port
  input  logic [AW-1:0] rd_addr,
  output result_t       rd_result
);

  sobel_input #(.W(W), .H(H)) u_input (
    .clk, .rst,
    .load_we, .load_addr, .load_data,
    .start, .pause, .busy,
    .data_valid, .input_image, .pad(data_pad), .idx_in
  );

  logic          win_valid, win_border;
  window_t       window;
  logic [AW-1:0] win_addr;

  sobel_window #(.W(W), .H(H)) u_window (
    .clk, .rst, .start(start && !busy),
    .in_valid(data_valid), .in_pixel(input_image),
    .win_valid, .window, .addr(win_addr), .border(win_border)
  );

  logic          conv_valid;
  mag_t          mag;
  logic [AW-1:0] conv_addr;

  sobel_conv #(.SIDE_W(AW)) u_conv (
    .clk, .rst,
    .in_valid(win_valid), .window, .zero(win_border), .side_i(win_addr),
    .out_valid(conv_valid), .gx(grad_x), .gy(grad_y), .mag, .side_o(conv_addr)
  );

  logic          thr_valid;
  result_t       thr_result;
  logic [AW-1:0] thr_addr;

  assign grad_valid = conv_valid;

  sobel_threshold #(.SIDE_W(AW)) u_threshold (
    .clk, .rst,
    .in_valid(conv_valid), .mag, .threshold(THRESHOLD), .side_i(conv_addr),
    .out_valid(thr_valid), .result(thr_result), .side_o(thr_addr)
  );

  sobel_output #(.W(W), .H(H)) u_output (
    .clk, .rst, .start(start && !busy),
    .in_valid(thr_valid), .addr(thr_addr), .result(thr_result),
    .output_valid, .output_image, .output_edge, .output_count, .done,
    .rd_addr, .rd_result
  );

endmodule
