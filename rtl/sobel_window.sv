// sobel_window - line buffers and sliding 3x3 window.
//
// Two line buffers of W pixels each hold the previous two image rows,
// addressed by column. When a pixel of column x arrives, lb1[x] (row y-1)
// and lb2[x] (row y-2) are read and, together with the new pixel, form a
// new window column; the 3x3 window register shifts left by one column.
// lb2[x] then takes the old lb1[x] and lb1[x] the new pixel. Each stored
// pixel is thus read from memory once per row it contributes to.
//
// After pixel k (raster index) has been taken, the window is centred on
// pixel k-W-1. Windows are emitted from beat W+1 on, each with the centre's
// raster address `addr` and a `border` flag for centres in the first or last
// row or column; the window of a border centre wraps across rows and must
// not be used. A frame is W*H+W+1 beats long (the source appends W+1 pad
// beats), so exactly W*H windows are emitted, one per pixel position.
//
// Interface: in_valid/in_pixel is the pixel stream (bubbles allowed);
// `start` clears the position counters at the start of a frame. Outputs are
// registered: win_valid follows the accepted beat by one clock.
//
// Storing lines of image data and sliding a 3x3 window follows the design;
// the column-addressed buffer organisation, centre addressing and border flag
// are choices of this implementation.
module sobel_window
  import sobel_pkg::*;
#(
  parameter int unsigned W = 64,
  parameter int unsigned H = 64,
  localparam int unsigned NPIX = W * H,
  localparam int unsigned AW   = $clog2(NPIX),
  localparam int unsigned XW   = $clog2(W),
  localparam int unsigned YW   = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          in_valid,
  input  pixel_t        in_pixel,
  output logic          win_valid,
  output window_t       window,
  output logic [AW-1:0] addr,
  output logic          border
);

  pixel_t lb1 [W];   // row y-1
  pixel_t lb2 [W];   // row y-2

  logic [XW-1:0] x;        // column of incoming pixel
  logic          primed;   // W+1 beats taken, centre is valid
  logic [XW:0]   prime_cnt;
  logic [XW-1:0] cx;       // centre column
  logic [YW-1:0] cy;       // centre row

  pixel_t top_px, mid_px;
  assign top_px = lb2[x];
  assign mid_px = lb1[x];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb2[x] <= mid_px;
      lb1[x] <= in_pixel;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < 3; r++) begin
        window[r][0] <= window[r][1];
        window[r][1] <= window[r][2];
      end
      window[0][2] <= top_px;
      window[1][2] <= mid_px;
      window[2][2] <= in_pixel;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || start) begin
      x         <= '0;
      prime_cnt <= '0;
      primed    <= 1'b0;
      cx        <= '0;
      cy        <= '0;
      win_valid <= 1'b0;
      addr      <= '0;
      border    <= 1'b0;
    end else begin
      win_valid <= in_valid && primed;
      if (in_valid) begin
        x <= (x == XW'(W - 1)) ? '0 : x + 1'b1;
        if (!primed) begin
          prime_cnt <= prime_cnt + 1'b1;
          if (prime_cnt == (XW+1)'(W)) primed <= 1'b1;
        end else begin
          addr   <= AW'(cy) * AW'(W) + AW'(cx);
          border <= (cx == '0) || (cx == XW'(W - 1)) ||
                    (cy == '0) || (cy == YW'(H - 1));
          if (cx == XW'(W - 1)) begin
            cx <= '0;
            cy <= (cy == YW'(H - 1)) ? '0 : cy + 1'b1;
          end else begin
            cx <= cx + 1'b1;
          end
        end
      end
    end
  end

  // A window is only ever emitted in the clock after an accepted beat.
  a_win_after_beat: assert property (@(posedge clk) disable iff (rst || start)
    win_valid |-> $past(in_valid));

endmodule
