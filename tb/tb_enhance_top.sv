// tb_enhance_top: loads a small random image and runs one frame for each
// setting used in the published experiments (darken by 100, brighten by 100,
// negative, threshold 90 and 80) plus bypass; checks every enhanced pixel pair
// against the reference, the row markers, the done pulse, and that a frame of
// WIDTH*HEIGHT pixels takes WIDTH*HEIGHT/2 clocks.
module tb_enhance_top;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int WIDTH = 16, HEIGHT = 6, WORDS = WIDTH * HEIGHT / 2;
  localparam int AW = $clog2(WORDS);

  logic      clk = 0, rst_n = 0;
  enh_cfg_t  cfg;
  logic      wr_en = 0, start = 0, busy, valid, row_start, done;
  logic [AW-1:0] wr_addr = '0;
  rgb_pair_t wr_data = '0, pair, e;
  rgb_pair_t img [WORDS];
  int        cycle = 0, checks = 0, failures = 0, idx, first_cycle, last_cycle, done_cnt;

  enhance_top #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) dut (
    .clk, .rst_n, .i_cfg(cfg), .i_wr_en(wr_en), .i_wr_addr(wr_addr), .i_wr_data(wr_data),
    .i_start(start), .o_busy(busy), .o_valid(valid), .o_pair(pair),
    .o_row_start(row_start), .o_done(done)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) begin
    if (rst_n && valid) begin
      e.p0 = ref_enhance(cfg, img[idx].p0);
      e.p1 = ref_enhance(cfg, img[idx].p1);
      checks++;
      if (pair !== e || row_start !== (idx % (WIDTH / 2) == 0) || done !== (idx == WORDS - 1)) begin
        failures++;
        if (failures < 10) $display("MISMATCH op %0d word %0d: %h expected %h", cfg.op, idx, pair, e);
      end
      if (idx == 0) first_cycle = cycle;
      last_cycle = cycle;
      idx++;
    end
    if (rst_n && done) done_cnt++;
  end

  task automatic run(input enh_op_e op, input logic sign, input int value, input int thr);
    int start_cycle;
    cfg = '{op: op, sign: sign, value: pixel_t'(value), threshold: pixel_t'(thr)};
    idx = 0; done_cnt = 0;
    @(negedge clk); start = 1; start_cycle = cycle;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    checks++;
    if (idx != WORDS || done_cnt != 1 || last_cycle - first_cycle != WORDS - 1 ||
        first_cycle - start_cycle != 3) begin
      failures++;
      $display("op %0d: words=%0d done=%0d span=%0d first at +%0d", op, idx, done_cnt,
               last_cycle - first_cycle, first_cycle - start_cycle);
    end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      img[a] = {$urandom, $urandom};
      @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = img[a];
    end
    @(negedge clk); wr_en = 0;
    run(OP_BRIGHTNESS, 1'b0, 100, 0);
    run(OP_BRIGHTNESS, 1'b1, 100, 0);
    run(OP_NEGATIVE,   1'b0, 0, 0);
    run(OP_THRESHOLD,  1'b0, 0, 90);
    run(OP_THRESHOLD,  1'b0, 0, 80);
    run(OP_BYPASS,     1'b0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
