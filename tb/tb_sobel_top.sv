// tb_sobel_top: streams small random-with-structure grayscale images through
// the edge detection IP and compares the edge map with the reference.
// Image 1 runs at full rate with the receiver always ready and checks that one
// pixel is taken every clock and that the last result follows the last input
// within the time of one window row plus the pipeline. Images 2 and 3 follow
// back to back with random input gaps and a receiver that stalls, which must
// fill the output FIFO and push back on the input.
module tb_sobel_top;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 16, H = 10, THR = 100, DEPTH = 8;

  logic   clk = 0, rst_n = 0;
  pixel_t in_data = '0, out_data;
  logic   in_valid = 0, in_ready, out_valid, out_ready = 1, intr;
  pixel_t img [H][W];
  int     exp_q [$];
  int     cycle = 0, checks = 0, failures = 0;
  int     got, intr_cnt, in_refused, fifo_full_seen, edges, flats;
  logic   stalls = 0;

  sobel_top #(.W(W), .H(H), .THRESHOLD(THR), .FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .i_pixel_data(in_data), .i_pixel_valid(in_valid), .o_pixel_ready(in_ready),
    .o_data(out_data), .o_data_valid(out_valid), .i_data_ready(out_ready), .o_intr(intr)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) begin
    // ready for the coming edge, then take the value that edge will pop
    out_ready = stalls ? ((cycle / 50) % 2 == 0 && $urandom_range(0, 1) == 0) : 1'b1;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        int e;
        e = exp_q.pop_front();
        if (out_data !== pixel_t'(e)) begin
          failures++;
          if (failures < 10) $display("MISMATCH output %0d: %0d expected %0d", got, out_data, e);
        end
        if (e == 255) edges++; else flats++;
      end
      got++;
    end
    if (rst_n && intr) intr_cnt++;
    if (rst_n && in_valid && !in_ready) in_refused++;
    if (rst_n && dut.fifo_full) fifo_full_seen++;
  end

  task automatic make_image();
    int p[9];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        // a bright disc-like blob on a noisy dark background
        img[r][c] = pixel_t'(((r - H / 2) * (r - H / 2) + (c - W / 2) * (c - W / 2) < 12) ?
                             200 + $urandom_range(0, 40) : $urandom_range(0, 60));
    for (int r = 0; r < H - 2; r++)
      for (int c = 0; c < W - 2; c++) begin
        for (int k = 0; k < 9; k++) p[k] = img[r + k / 3][c + k % 3];
        exp_q.push_back(ref_sobel(p, THR));
      end
  endtask

  task automatic send_image();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        in_valid = 1; in_data = img[r][c];
        while (stalls && $urandom_range(0, 5) == 0) begin
          in_valid = 0; @(negedge clk); in_valid = 1;
        end
        while (!in_ready) @(negedge clk);   // taken on the next edge once ready is high
        @(negedge clk);
      end
    in_valid = 0;
  endtask

  initial begin
    int t0, t_last_in;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // image 1, full rate
    make_image();
    got = 0; intr_cnt = 0; in_refused = 0;
    t0 = cycle;
    send_image();
    t_last_in = cycle;
    while (exp_q.size() != 0 && cycle - t0 < 2000) @(negedge clk);
    checks++;
    if (t_last_in - t0 != H * W || in_refused != 0 || cycle - t_last_in > W + 4 || intr_cnt != H - 2) begin
      failures++;
      $display("full rate: input took %0d clocks for %0d pixels, refused %0d, drain %0d, intr %0d",
               t_last_in - t0, H * W, in_refused, cycle - t_last_in, intr_cnt);
    end
    // images 2 and 3 with gaps and stalls
    stalls = 1;
    got = 0; intr_cnt = 0;
    make_image(); send_image();
    make_image(); send_image();
    t0 = cycle;
    while (exp_q.size() != 0 && cycle - t0 < 5000) @(negedge clk);
    stalls = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (got != 2 * (H - 2) * (W - 2) || intr_cnt != 2 * (H - 2) || in_refused == 0 ||
        fifo_full_seen == 0 || edges == 0 || flats == 0) begin
      failures++;
      $display("stalled: got %0d intr %0d refused %0d full %0d edges %0d flats %0d",
               got, intr_cnt, in_refused, fifo_full_seen, edges, flats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
