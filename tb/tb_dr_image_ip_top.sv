// tb_dr_image_ip_top: end-to-end test of both IPs at reduced image sizes.
// The enhancement IP is loaded with a random colour image and runs the five
// settings of the published experiments (darken by 100, brighten by 100,
// negative, threshold 90 and 80) while, at the same time, the edge detection IP
// takes three grayscale images: the first at full rate, checking one pixel per
// clock, the others back to back with input gaps and a stalling receiver. Every
// output is compared with the reference models, and each mechanism (clamping at
// both ends, both threshold outcomes, input stall, full output FIFO, line
// release, end of image, edge and non-edge pixels) must occur at least once.
module tb_dr_image_ip_top;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int EW = 32, EH = 8, EWORDS = EW * EH / 2;
  localparam int EAW = $clog2(EWORDS);
  localparam int SW = 24, SH = 16, THR = 100;
  localparam int SOBEL_IMAGES = 3;

  logic      clk = 0, rst_n = 0;
  // enhancement side
  enh_cfg_t  cfg = '0;
  logic      e_wr_en = 0, e_start = 0, e_busy, e_valid, e_row_start, e_done;
  logic [EAW-1:0] e_wr_addr = '0;
  rgb_pair_t e_wr_data = '0, e_pair, e_exp;
  rgb_pair_t eimg [EWORDS];
  int        e_idx, e_first, e_last;
  // sobel side
  pixel_t    s_in = '0, s_out;
  logic      s_in_valid = 0, s_in_ready, s_out_valid, s_out_ready = 1, s_intr;
  pixel_t    simg [SH][SW];
  int        s_exp [$];
  int        s_got;
  logic      s_stalls = 0;

  int cycle = 0, checks = 0, failures = 0;
  // how often each mechanism happened
  int n_bright_up, n_bright_down, n_clamp_hi, n_clamp_lo, n_negative, n_thr_white, n_thr_black;
  int n_in_stall, n_fifo_full, n_line_release, n_frame_end, n_edge, n_flat, n_back_to_back;

  dr_image_ip_top #(.ENH_WIDTH(EW), .ENH_HEIGHT(EH), .SOBEL_WIDTH(SW), .SOBEL_HEIGHT(SH),
                    .SOBEL_THRESHOLD(THR), .SOBEL_FIFO_DEPTH(16)) dut (
    .clk, .rst_n,
    .enh_cfg(cfg), .enh_wr_en(e_wr_en), .enh_wr_addr(e_wr_addr), .enh_wr_data(e_wr_data),
    .enh_start(e_start), .enh_busy(e_busy), .enh_valid(e_valid), .enh_pair(e_pair),
    .enh_row_start(e_row_start), .enh_done(e_done),
    .sobel_pixel_data(s_in), .sobel_pixel_valid(s_in_valid), .sobel_pixel_ready(s_in_ready),
    .sobel_data(s_out), .sobel_data_valid(s_out_valid), .sobel_data_ready(s_out_ready),
    .sobel_intr(s_intr)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic void count_enh(input rgb_t i, input rgb_t o);
    pixel_t ic[3], oc[3];
    ic = '{i.r, i.g, i.b};
    oc = '{o.r, o.g, o.b};
    for (int k = 0; k < 3; k++) begin
      if (cfg.op == OP_BRIGHTNESS && cfg.sign && oc[k] == 8'd255 && int'(ic[k]) + int'(cfg.value) > 255) n_clamp_hi++;
      if (cfg.op == OP_BRIGHTNESS && !cfg.sign && oc[k] == 8'd0 && ic[k] < cfg.value) n_clamp_lo++;
    end
    if (cfg.op == OP_THRESHOLD) begin
      if (o.r == 8'd255) n_thr_white++; else n_thr_black++;
    end
  endfunction

  always @(negedge clk) begin
    if (rst_n && e_valid) begin
      e_exp.p0 = ref_enhance(cfg, eimg[e_idx].p0);
      e_exp.p1 = ref_enhance(cfg, eimg[e_idx].p1);
      checks++;
      if (e_pair !== e_exp || e_row_start !== (e_idx % (EW / 2) == 0) || e_done !== (e_idx == EWORDS - 1)) begin
        failures++;
        if (failures < 10) $display("ENH MISMATCH op %0d word %0d: %h expected %h", cfg.op, e_idx, e_pair, e_exp);
      end
      count_enh(eimg[e_idx].p0, e_pair.p0);
      count_enh(eimg[e_idx].p1, e_pair.p1);
      if (e_idx == 0) e_first = cycle;
      e_last = cycle;
      e_idx++;
    end
  end

  always @(negedge clk) begin
    s_out_ready = s_stalls ? ((cycle / 300) % 2 == 0 && $urandom_range(0, 1) == 0) : 1'b1;
    if (rst_n && s_out_valid && s_out_ready) begin
      checks++;
      if (s_exp.size() == 0) begin
        failures++; $display("SOBEL unexpected output");
      end else begin
        int e;
        e = s_exp.pop_front();
        if (s_out !== pixel_t'(e)) begin
          failures++;
          if (failures < 10) $display("SOBEL MISMATCH output %0d: %0d expected %0d", s_got, s_out, e);
        end
        if (e == 255) n_edge++; else n_flat++;
      end
      s_got++;
    end
    if (rst_n && s_intr) n_line_release++;
    if (rst_n && s_in_valid && !s_in_ready) n_in_stall++;
    if (rst_n && dut.u_sobel.fifo_full) n_fifo_full++;
  end
  always @(posedge clk) if (rst_n && dut.u_sobel.u_ctrl.frame_done) n_frame_end++;

  task automatic enh_load();
    for (int a = 0; a < EWORDS; a++) begin
      eimg[a] = {$urandom, $urandom};
      @(negedge clk); e_wr_en = 1; e_wr_addr = EAW'(a); e_wr_data = eimg[a];
    end
    @(negedge clk); e_wr_en = 0;
  endtask

  task automatic enh_run(input enh_op_e op, input logic sign, input int value, input int thr);
    int t0;
    cfg = '{op: op, sign: sign, value: pixel_t'(value), threshold: pixel_t'(thr)};
    e_idx = 0;
    @(negedge clk); e_start = 1; t0 = cycle;
    @(negedge clk); e_start = 0;
    while (e_busy) @(negedge clk);
    checks++;
    // two pixels per clock: a frame of EW x EH pixels in EW*EH/2 clocks
    if (e_idx != EWORDS || e_last - e_first != EWORDS - 1 || e_first - t0 != 3) begin
      failures++;
      $display("ENH op %0d: %0d words in %0d clocks", op, e_idx, e_last - e_first + 1);
    end
    if (op == OP_BRIGHTNESS && sign) n_bright_up++;
    if (op == OP_BRIGHTNESS && !sign) n_bright_down++;
    if (op == OP_NEGATIVE) n_negative++;
  endtask

  task automatic sobel_image();
    int p[9];
    // bright vessel-like bands and a blob on a noisy background
    for (int r = 0; r < SH; r++)
      for (int c = 0; c < SW; c++)
        simg[r][c] = pixel_t'((((r + 2 * c) % 23) < 3 ||
                               (r - SH / 2) * (r - SH / 2) + (c - SW / 2) * (c - SW / 2) < SH * SW / 16) ?
                              180 + $urandom_range(0, 50) : 20 + $urandom_range(0, 40));
    for (int r = 0; r < SH - 2; r++)
      for (int c = 0; c < SW - 2; c++) begin
        for (int k = 0; k < 9; k++) p[k] = simg[r + k / 3][c + k % 3];
        s_exp.push_back(ref_sobel(p, THR));
      end
  endtask

  task automatic sobel_send(output int cycles);
    int t0;
    t0 = cycle;
    for (int r = 0; r < SH; r++)
      for (int c = 0; c < SW; c++) begin
        while (s_stalls && $urandom_range(0, 7) == 0) begin
          s_in_valid = 0; @(negedge clk);
        end
        s_in_valid = 1; s_in = simg[r][c];
        while (!s_in_ready) @(negedge clk);
        @(negedge clk);
      end
    s_in_valid = 0;
    cycles = cycle - t0;
  endtask

  task automatic sobel_flow();
    int cyc, t0;
    s_got = 0;
    // image 1 at full rate: one pixel per clock, never refused
    sobel_image();
    sobel_send(cyc);
    checks++;
    if (cyc != SH * SW || n_in_stall != 0) begin
      failures++; $display("SOBEL full rate: %0d clocks for %0d pixels, %0d stalls", cyc, SH * SW, n_in_stall);
    end
    t0 = cycle;
    while (s_exp.size() != 0 && cycle - t0 < SW + 10) @(negedge clk);
    checks++;
    if (s_exp.size() != 0) begin failures++; $display("SOBEL drain too slow"); end
    // further images back to back with input gaps and a stalling receiver
    s_stalls = 1;
    for (int i = 1; i < SOBEL_IMAGES; i++) begin
      sobel_image();
      sobel_send(cyc);
      n_back_to_back++;
    end
    t0 = cycle;
    while (s_exp.size() != 0 && cycle - t0 < 20 * SW * SH) @(negedge clk);
    s_stalls = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (s_got != SOBEL_IMAGES * (SH - 2) * (SW - 2) || n_line_release != SOBEL_IMAGES * (SH - 2) ||
        n_frame_end != SOBEL_IMAGES) begin
      failures++;
      $display("SOBEL got %0d outputs, %0d line releases, %0d frame ends", s_got, n_line_release, n_frame_end);
    end
  endtask

  task automatic report(input string name, input int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("  mechanism never exercised: %s", name); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      begin
        enh_load();
        enh_run(OP_BRIGHTNESS, 1'b0, 100, 0);
        enh_run(OP_BRIGHTNESS, 1'b1, 100, 0);
        enh_run(OP_NEGATIVE,   1'b0, 0, 0);
        enh_run(OP_THRESHOLD,  1'b0, 0, 90);
        enh_run(OP_THRESHOLD,  1'b0, 0, 80);
      end
      sobel_flow();
    join
    $display("mechanisms:");
    report("brightness increase", n_bright_up);
    report("brightness decrease", n_bright_down);
    report("clamp at 255", n_clamp_hi);
    report("clamp at 0", n_clamp_lo);
    report("negative", n_negative);
    report("threshold white", n_thr_white);
    report("threshold black", n_thr_black);
    report("sobel input stall", n_in_stall);
    report("sobel output FIFO full", n_fifo_full);
    report("line buffer released", n_line_release);
    report("end of image", n_frame_end);
    report("images back to back", n_back_to_back);
    report("edge pixel", n_edge);
    report("non-edge pixel", n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
