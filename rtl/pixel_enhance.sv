// pixel_enhance: one spatial-domain enhancement operation on one RGB pixel.
//
// Combinational. The operation is chosen at run time by cfg.op:
//   OP_BRIGHTNESS  every channel becomes c + value (cfg.sign = 1) or c - value
//                  (cfg.sign = 0); a sum above 255 is clamped to 255 and a
//                  difference below 0 is clamped to 0, so no value wraps around.
//   OP_NEGATIVE    every channel becomes 255 - c (S = L - 1 - r with L = 256).
//   OP_THRESHOLD   the pixel becomes white (255 on all channels) when its
//                  intensity is greater than cfg.threshold, otherwise black (0),
//                  so the image holds only the two levels g0 = 0 and g1 = 255.
//   OP_BYPASS      the pixel is passed unchanged.
// The three operations, the clamping rule and the two output levels follow the
// published method. Taking the intensity of a colour pixel for the threshold as
// the mean (r + g + b) / 3, truncated, so that all three channels agree, and the
// bypass code are choices of this design.
module pixel_enhance
  import img_pkg::*;
(
  input  enh_cfg_t cfg,
  input  rgb_t     i_pix,
  output rgb_t     o_pix
);

  function automatic pixel_t brighten(input pixel_t c, input logic sign, input pixel_t g);
    logic [PIX_W:0] sum;
    if (sign) begin
      sum = {1'b0, c} + {1'b0, g};
      return sum[PIX_W] ? pixel_t'(PIX_MAX) : sum[PIX_W-1:0];
    end else begin
      return (c >= g) ? c - g : '0;
    end
  endfunction

  logic [PIX_W+1:0] rgb_sum;
  logic [PIX_W+1:0] intensity;
  logic             bright;

  always_comb begin
    rgb_sum   = {2'b00, i_pix.r} + {2'b00, i_pix.g} + {2'b00, i_pix.b};
    intensity = rgb_sum / 3;
    bright    = intensity > {2'b00, cfg.threshold};
    unique case (cfg.op)
      OP_BRIGHTNESS: begin
        o_pix.r = brighten(i_pix.r, cfg.sign, cfg.value);
        o_pix.g = brighten(i_pix.g, cfg.sign, cfg.value);
        o_pix.b = brighten(i_pix.b, cfg.sign, cfg.value);
      end
      OP_NEGATIVE: begin
        o_pix.r = pixel_t'(PIX_MAX) - i_pix.r;
        o_pix.g = pixel_t'(PIX_MAX) - i_pix.g;
        o_pix.b = pixel_t'(PIX_MAX) - i_pix.b;
      end
      OP_THRESHOLD: begin
        o_pix.r = bright ? pixel_t'(PIX_MAX) : '0;
        o_pix.g = bright ? pixel_t'(PIX_MAX) : '0;
        o_pix.b = bright ? pixel_t'(PIX_MAX) : '0;
      end
      default: o_pix = i_pix;
    endcase
  end

endmodule
