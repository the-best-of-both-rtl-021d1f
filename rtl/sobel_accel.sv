// sobel_accel: streaming Sobel edge-detection accelerator for the
// landing-mark detection on the general-purpose cores.
//
// Grey-scale pixels arrive one per valid cycle in raster order; in_sof marks
// the first pixel of a frame. Two line buffers of IMG_W pixels hold the two
// previous rows, so together with the incoming pixel the accelerator sees one
// column of three pixels per cycle; a 3x3 window of shift registers keeps the
// last three columns. For every input pixel at column x >= 2 of row y >= 2 it
// outputs the gradient magnitude of the window centred on (x-1, y-1):
//   Gx = (right column, weights 1 2 1) - (left column, weights 1 2 1)
//   Gy = (bottom row,   weights 1 2 1) - (top row,     weights 1 2 1)
//   out = min(|Gx| + |Gy|, 255)
// An image of W x H pixels thus gives (W-2) x (H-2) outputs, each two cycles
// after the pixel that completes its window. Border pixels produce no output.
// There is no back-pressure: the accelerator accepts a pixel in every cycle.
// The Sobel accelerator itself is named by the architecture; the streaming
// structure, the |Gx|+|Gy| magnitude, 8-bit pixels and the default width of
// 640 pixels are this design's choice.
module sobel_accel #(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned PIX_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_sof,
  input  logic [PIX_W-1:0]         in_pix,
  output logic                     out_valid,
  output logic [PIX_W-1:0]         out_pix,
  output logic [$clog2(IMG_W)-1:0] out_x,     // column of the window centre
  output logic [15:0]              out_y      // row of the window centre
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned SW = PIX_W + 4;     // signed sum width

  logic [PIX_W-1:0] lb1 [IMG_W];   // row y-1
  logic [PIX_W-1:0] lb2 [IMG_W];   // row y-2
  logic [PIX_W-1:0] win [3][3];    // win[row][col], row 0 = top, col 2 = newest
  logic [XW-1:0]    x_q, cx, wx_q;
  logic [15:0]      y_q, cy, wy_q;
  logic             wvalid_q;

  // Position of the incoming pixel.
  assign cx = in_sof ? '0 : x_q;
  assign cy = in_sof ? '0 : y_q;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb1[cx] <= in_pix;
      lb2[cx] <= lb1[cx];
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= lb2[cx];
      win[1][2] <= lb1[cx];
      win[2][2] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q      <= '0;
      y_q      <= '0;
      wvalid_q <= 1'b0;
      wx_q     <= '0;
      wy_q     <= '0;
    end else begin
      wvalid_q <= in_valid && cx >= XW'(2) && cy >= 16'd2;
      if (in_valid) begin
        wx_q <= cx - XW'(1);
        wy_q <= cy - 16'd1;
        if (32'(cx) == IMG_W - 1) begin
          x_q <= '0;
          y_q <= cy + 16'd1;
        end else begin
          x_q <= cx + XW'(1);
          y_q <= cy;
        end
      end
    end
  end

  function automatic logic signed [SW-1:0] wsum(input logic [PIX_W-1:0] a, b, c);
    return SW'(a) + (SW'(b) << 1) + SW'(c);
  endfunction

  logic signed [SW-1:0] gx, gy;
  logic        [SW-1:0] ax, ay;
  logic        [SW:0]   mag;
  always_comb begin
    gx  = wsum(win[0][2], win[1][2], win[2][2]) - wsum(win[0][0], win[1][0], win[2][0]);
    gy  = wsum(win[2][0], win[2][1], win[2][2]) - wsum(win[0][0], win[0][1], win[0][2]);
    ax  = gx[SW-1] ? -gx : gx;
    ay  = gy[SW-1] ? -gy : gy;
    mag = {1'b0, ax} + {1'b0, ay};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= wvalid_q;
      if (wvalid_q) begin
        out_pix <= (mag > (SW+1)'({PIX_W{1'b1}})) ? {PIX_W{1'b1}} : mag[PIX_W-1:0];
        out_x   <= wx_q;
        out_y   <= wy_q;
      end
    end
  end

endmodule
