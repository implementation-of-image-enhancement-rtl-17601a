// tb_ref_pkg: reference models used by the testbenches, written from the
// equations of the method with plain integer and real arithmetic, independent
// of the RTL: clamped brightness, negative, mean-intensity threshold, and the
// Sobel gradient with a real square root compared against the threshold.
package tb_ref_pkg;
  import img_pkg::*;

  function automatic int ref_chan(input enh_cfg_t cfg, input int c, input int mean);
    int v;
    case (cfg.op)
      OP_BRIGHTNESS: begin
        v = cfg.sign ? c + int'(cfg.value) : c - int'(cfg.value);
        if (v > 255) v = 255;
        if (v < 0)   v = 0;
        return v;
      end
      OP_NEGATIVE:  return 255 - c;
      OP_THRESHOLD: return (mean > int'(cfg.threshold)) ? 255 : 0;
      default:      return c;
    endcase
  endfunction

  function automatic rgb_t ref_enhance(input enh_cfg_t cfg, input rgb_t p);
    rgb_t o;
    int   mean;
    mean = (int'(p.r) + int'(p.g) + int'(p.b)) / 3;
    o.r = pixel_t'(ref_chan(cfg, int'(p.r), mean));
    o.g = pixel_t'(ref_chan(cfg, int'(p.g), mean));
    o.b = pixel_t'(ref_chan(cfg, int'(p.b), mean));
    return o;
  endfunction

  // p[0..8]: window in raster order, centre p[4].
  function automatic int ref_sobel(input int p[9], input int thr);
    int  gx, gy;
    real g;
    gx = (p[2] + 2 * p[5] + p[8]) - (p[0] + 2 * p[3] + p[6]);
    gy = (p[6] + 2 * p[7] + p[8]) - (p[0] + 2 * p[1] + p[2]);
    g  = $sqrt(real'(gx * gx + gy * gy));
    return (g > real'(thr)) ? 255 : 0;
  endfunction

endpackage
