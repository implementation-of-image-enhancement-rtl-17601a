// tb_image_control: streams a small random image with random input gaps and
// random read stalls; checks every 3x3 window against the image, the window
// count, one interrupt per released line, that input is refused while all four
// line buffers are occupied, and the rate without stalls.
module tb_image_control;
  import img_pkg::*;

  localparam int W = 8, H = 9;

  logic    clk = 0, rst_n = 0;
  logic    in_valid = 0, ready, rd_allow = 0, win_valid, intr;
  pixel_t  in_data = '0;
  window_t window;
  pixel_t  img [H][W];
  int      cycle = 0, checks = 0, failures = 0;
  int      win_idx, intr_cnt, refused;
  logic    stall_mode;

  image_control #(.W(W), .H(H)) dut (
    .clk, .rst_n, .i_valid(in_valid), .i_data(in_data), .o_ready(ready),
    .i_rd_allow(rd_allow), .o_win_valid(win_valid), .o_window(window), .o_intr(intr)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) begin
    if (rst_n && win_valid) begin
      int r, c;
      window_t e;
      r = win_idx / (W - 2);
      c = win_idx % (W - 2);
      for (int k = 0; k < 9; k++) e[k*8 +: 8] = img[r + k / 3][c + k % 3];
      checks++;
      if (window !== e) begin
        failures++;
        if (failures < 10) $display("MISMATCH window %0d: %h expected %h", win_idx, window, e);
      end
      win_idx++;
    end
    if (rst_n && intr) intr_cnt++;
    if (rst_n && in_valid && !ready) refused++;
  end

  task automatic run_image(input logic stalls, output int cycles);
    int start;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r][c] = pixel_t'($urandom);
    win_idx = 0; intr_cnt = 0; refused = 0;
    stall_mode = stalls;
    start = cycle;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        in_valid = 1; in_data = img[r][c];
        while (stalls && $urandom_range(0, 4) == 0) begin
          in_valid = 0; @(negedge clk); in_valid = 1;
        end
        while (!ready) @(negedge clk);
      end
    @(negedge clk); in_valid = 0;
    while (win_idx < (H - 2) * (W - 2) && cycle - start < 5000) @(negedge clk);
    cycles = cycle - start;
    repeat (3) @(negedge clk);
    checks++;
    if (win_idx != (H - 2) * (W - 2) || intr_cnt != H - 2) begin
      failures++;
      $display("windows=%0d intr=%0d", win_idx, intr_cnt);
    end
  endtask

  // Read stalls: in stall mode, allow reads only one clock in four for long
  // stretches so the writer catches up and all four lines fill.
  always @(negedge clk) rd_allow <= stall_mode ? ((cycle / 40) % 2 == 1 || $urandom_range(0, 3) == 0) : 1'b1;

  initial begin
    int cyc;
    stall_mode = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(1'b0, cyc);
    // Input one pixel per clock, last window one clock after the last read.
    checks++;
    if (cyc > H * W + W + 2) begin failures++; $display("took %0d clocks for %0d pixels", cyc, H * W); end
    run_image(1'b1, cyc);
    checks++;
    if (refused == 0) begin failures++; $display("input never refused"); end
    run_image(1'b0, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
