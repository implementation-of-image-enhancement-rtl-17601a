// tb_sobel_conv: random and directed windows, one per clock with random gaps;
// compares each result with the real-valued gradient magnitude test and checks
// the two-clock latency.
module tb_sobel_conv;
  import img_pkg::*;
  import tb_ref_pkg::*;

  localparam int THR = 100;

  logic    clk = 0, rst_n = 0;
  logic    in_valid = 0, out_valid;
  window_t window = '0;
  pixel_t  out_data;
  int      exp_q [$];
  int      sent_cycle [$];
  int      cycle = 0, checks = 0, failures = 0, edges = 0, flats = 0;

  sobel_conv #(.THRESHOLD(THR)) dut (
    .clk, .rst_n, .i_valid(in_valid), .i_window(window), .o_valid(out_valid), .o_data(out_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        int e, c;
        e = exp_q.pop_front();
        c = sent_cycle.pop_front();
        if (out_data !== pixel_t'(e)) begin
          failures++;
          if (failures < 10) $display("MISMATCH got %0d expected %0d", out_data, e);
        end
        checks++;
        if (cycle - c != 2) begin
          failures++; $display("latency %0d, expected 2", cycle - c);
        end
        if (e == 255) edges++; else flats++;
      end
    end
  end

  initial begin
    int p[9];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < 9; k++) begin
        case (i % 4)
          0: p[k] = $urandom_range(0, 255);
          1: p[k] = $urandom_range(100, 130);                  // weak gradient
          2: p[k] = (k % 3 == 2) ? $urandom_range(120, 160) : 100;  // near the threshold
          default: p[k] = (k < 3) ? 0 : 255;                    // strongest edge
        endcase
        window[k*8 +: 8] = pixel_t'(p[k]);
      end
      if (in_valid) begin
        exp_q.push_back(ref_sobel(p, THR));
        sent_cycle.push_back(cycle);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || edges == 0 || flats == 0) begin
      failures++; $display("left=%0d edges=%0d flats=%0d", exp_q.size(), edges, flats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
