// sobel_conv: Sobel gradient and edge decision for one 3x3 window per clock.
//
// For the window P0..P8 (raster order, P4 the centre pixel) it forms
//   Gx = (P2 + 2*P5 + P8) - (P0 + 2*P3 + P6)     horizontal mask [-1 0 1; -2 0 2; -1 0 1]
//   Gy = (P6 + 2*P7 + P8) - (P0 + 2*P1 + P2)     vertical mask   [-1 -2 -1; 0 0 0; 1 2 1]
// and marks the centre pixel as an edge when the gradient magnitude
// G = sqrt(Gx^2 + Gy^2) is greater than THRESHOLD. The square root is avoided by
// the equivalent integer test Gx^2 + Gy^2 > THRESHOLD^2. An edge pixel is output
// as 255, any other as 0, so the result is an 8-bit black-and-white image.
//
// Pipeline: stage 1 registers Gx and Gy (adders only), stage 2 squares, sums and
// compares, so o_valid/o_data follow i_valid/i_window by two clocks, at one
// window per clock. The masks, the magnitude and the threshold rule follow the
// published method; the threshold value, the 255/0 output coding and the
// pipelining are choices of this design.
module sobel_conv
  import img_pkg::*;
#(
  parameter int unsigned THRESHOLD = 100
)(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    i_valid,
  input  window_t i_window,
  output logic    o_valid,
  output pixel_t  o_data
);

  localparam int unsigned GW = PIX_W + 3;          // |G| <= 4*255 needs 11 signed bits
  localparam int unsigned SW = 2 * GW + 1;          // Gx^2 + Gy^2
  localparam logic [SW-1:0] T_SQ = SW'(THRESHOLD * THRESHOLD);

  function automatic logic signed [GW-1:0] px(input window_t w, input int unsigned k);
    return $signed({{(GW-PIX_W){1'b0}}, w[k*PIX_W +: PIX_W]});
  endfunction

  logic signed [GW-1:0] gx, gy;
  logic                 v1;
  logic [SW-1:0]        mag_sq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1      <= 1'b0;
      gx      <= '0;
      gy      <= '0;
      o_valid <= 1'b0;
      o_data  <= '0;
    end else begin
      v1 <= i_valid;
      if (i_valid) begin
        gx <= (px(i_window, 2) + 2 * px(i_window, 5) + px(i_window, 8))
            - (px(i_window, 0) + 2 * px(i_window, 3) + px(i_window, 6));
        gy <= (px(i_window, 6) + 2 * px(i_window, 7) + px(i_window, 8))
            - (px(i_window, 0) + 2 * px(i_window, 1) + px(i_window, 2));
      end
      o_valid <= v1;
      if (v1) o_data <= (mag_sq > T_SQ) ? pixel_t'(PIX_MAX) : '0;
    end
  end

  logic signed [SW-1:0] gx_w, gy_w;
  assign gx_w   = SW'(gx);
  assign gy_w   = SW'(gy);
  assign mag_sq = unsigned'(gx_w * gx_w + gy_w * gy_w);

endmodule
