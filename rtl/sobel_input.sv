// sobel_input - frame memory and raster-scan pixel source.
//
// Holds one grayscale frame of W x H 8-bit pixels in an on-chip memory
// (`image`). A host fills it through the load port (load_we/load_addr/
// load_data) before processing. A one-cycle `start` pulse, accepted while
// idle, scans the memory row by row, pixel by pixel, and emits one pixel per
// clock on input_image with data_valid high; idx_in is the read address.
//
// After the W*H frame pixels it emits W+1 further beats with `pad` high and
// pixel value 0. A 3x3 window centred on pixel (x, y) is complete only when
// pixel (x+1, y+1) has arrived, so these extra beats push the last image row
// through the line buffers; downstream they only ever land on border
// positions.
//
// Timing: the memory is read synchronously, so the pixel at address k
// appears one clock after idx_in was k. While `pause` is high no beat is
// issued and the scan holds its place (used to insert bubbles into the
// stream). `busy` is high from the clock after `start` until the last beat
// has been issued.
//
// Reading pixels from a memory and scanning them row by row follows the
// input module of the design; the load port, pause input and pad beats are
// choices of this implementation.
module sobel_input
  import sobel_pkg::*;
#(
  parameter int unsigned W = 64,
  parameter int unsigned H = 64,
  localparam int unsigned NPIX  = W * H,
  localparam int unsigned NBEAT = NPIX + W + 1,
  localparam int unsigned AW    = $clog2(NPIX),
  localparam int unsigned BW    = $clog2(NBEAT + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // host load port
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  pixel_t        load_data,
  // control
  input  logic          start,
  input  logic          pause,
  output logic          busy,
  // pixel stream
  output logic          data_valid,
  output pixel_t        input_image,
  output logic          pad,
  output logic [BW-1:0] idx_in
);

  pixel_t image [NPIX];

  always_ff @(posedge clk) begin
    if (load_we) image[load_addr] <= load_data;
  end

  logic issue;
  assign issue = busy && !pause;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      idx_in <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        idx_in <= '0;
      end
    end else if (issue) begin
      if (idx_in == BW'(NBEAT - 1)) busy <= 1'b0;
      idx_in <= idx_in + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      data_valid  <= 1'b0;
      pad         <= 1'b0;
      input_image <= '0;
    end else begin
      data_valid <= issue;
      if (issue) begin
        if (idx_in < BW'(NPIX)) begin
          input_image <= image[idx_in[AW-1:0]];
          pad         <= 1'b0;
        end else begin
          input_image <= '0;
          pad         <= 1'b1;
        end
      end
    end
  end

  // No beat may leave while the scan is paused or idle.
  a_no_beat_when_held: assert property (@(posedge clk) disable iff (rst)
    !issue |=> !data_valid);

endmodule
