// tb_image_read: loads a small random image, streams it twice and checks every
// word, the row and frame markers, the busy flag, the one-word-per-clock rate
// and that writes during streaming are ignored.
module tb_image_read;
  import img_pkg::*;

  localparam int WIDTH = 12, HEIGHT = 5, WORDS = WIDTH * HEIGHT / 2;
  localparam int AW = $clog2(WORDS);

  logic      clk = 0, rst_n = 0;
  logic      wr_en = 0, start = 0, busy, valid, row_start, frame_end;
  logic [AW-1:0] wr_addr = '0;
  rgb_pair_t wr_data = '0, pair;
  rgb_pair_t img [WORDS];
  int        cycle = 0, checks = 0, failures = 0, idx, first_cycle, last_cycle;

  image_read #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) dut (
    .clk, .rst_n, .i_wr_en(wr_en), .i_wr_addr(wr_addr), .i_wr_data(wr_data),
    .i_start(start), .o_busy(busy), .o_valid(valid), .o_pair(pair),
    .o_row_start(row_start), .o_frame_end(frame_end)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) begin
    if (rst_n && valid) begin
      checks++;
      if (pair !== img[idx] || row_start !== (idx % (WIDTH / 2) == 0) ||
          frame_end !== (idx == WORDS - 1)) begin
        failures++;
        if (failures < 10) $display("MISMATCH word %0d: %h expected %h rs=%b fe=%b", idx, pair, img[idx], row_start, frame_end);
      end
      if (idx == 0) first_cycle = cycle;
      last_cycle = cycle;
      idx++;
    end
  end

  task automatic stream();
    idx = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++; if (!busy) begin failures++; $display("not busy after start"); end
    // a write while streaming must not land
    wr_en = 1; wr_addr = AW'(WORDS - 1); wr_data = ~img[WORDS - 1];
    @(negedge clk); wr_en = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (idx != WORDS || last_cycle - first_cycle != WORDS - 1) begin
      failures++; $display("words=%0d span=%0d", idx, last_cycle - first_cycle);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      img[a] = {$urandom, $urandom};
      @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = img[a];
    end
    @(negedge clk); wr_en = 0;
    stream();
    stream();
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
