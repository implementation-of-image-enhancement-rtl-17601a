// tb_pixel_enhance: drives random pixels and settings, including the corner
// values 0 and 255, through every operation and compares with the reference.
module tb_pixel_enhance;
  import img_pkg::*;
  import tb_ref_pkg::*;

  enh_cfg_t cfg;
  rgb_t     pin, pout, exp_p;
  int       checks = 0, failures = 0;

  pixel_enhance dut (.cfg(cfg), .i_pix(pin), .o_pix(pout));

  function automatic pixel_t rnd_pix();
    case ($urandom_range(0, 4))
      0: return 8'd0;
      1: return 8'd255;
      default: return pixel_t'($urandom);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      cfg.op        = enh_op_e'(i % 4);
      cfg.sign      = $urandom_range(0, 1);
      cfg.value     = (i % 3 == 0) ? 8'd100 : rnd_pix();
      cfg.threshold = (i % 3 == 0) ? 8'd90  : rnd_pix();
      pin.r = rnd_pix(); pin.g = rnd_pix(); pin.b = rnd_pix();
      #1;
      exp_p = ref_enhance(cfg, pin);
      checks++;
      if (pout !== exp_p) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH op=%0d sign=%0b g=%0d t=%0d in=%h out=%h exp=%h",
                   cfg.op, cfg.sign, cfg.value, cfg.threshold, pin, pout, exp_p);
      end
    end
    // Directed values from the worked examples: +100 on 200 clamps, -100 on 50 clamps.
    cfg = '{op: OP_BRIGHTNESS, sign: 1'b1, value: 8'd100, threshold: 8'd90};
    pin = '{r: 8'd200, g: 8'd155, b: 8'd10}; #1;
    checks++; if (pout !== rgb_t'{8'd255, 8'd255, 8'd110}) failures++;
    cfg.sign = 1'b0; #1;
    checks++; if (pout !== rgb_t'{8'd100, 8'd55, 8'd0}) failures++;
    cfg.op = OP_THRESHOLD; pin = '{r: 8'd91, g: 8'd91, b: 8'd91}; #1;
    checks++; if (pout !== rgb_t'{8'd255, 8'd255, 8'd255}) failures++;
    pin = '{r: 8'd90, g: 8'd90, b: 8'd90}; #1;
    checks++; if (pout !== rgb_t'{8'd0, 8'd0, 8'd0}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
