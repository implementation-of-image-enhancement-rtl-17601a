// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the full and valid flags, the count and the show-ahead read.
module tb_sync_fifo;
  localparam int WIDTH = 8, DEPTH = 8;

  logic             clk = 0, rst_n = 0;
  logic             wr_en = 0, rd_ready = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic             full, rd_valid;
  logic [3:0]       count;
  logic [WIDTH-1:0] model [$];
  int               checks = 0, failures = 0, full_seen = 0;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .i_wr_en(wr_en), .i_wr_data(wr_data), .o_full(full),
    .o_rd_valid(rd_valid), .o_rd_data(rd_data), .i_rd_ready(rd_ready), .o_count(count)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // compare state before this clock's actions
      checks++;
      if (count !== 4'(model.size()) || full !== (model.size() == DEPTH) ||
          rd_valid !== (model.size() != 0) || (model.size() != 0 && rd_data !== model[0])) begin
        failures++;
        if (failures < 10) $display("MISMATCH at %0d: count=%0d model=%0d", i, count, model.size());
      end
      if (full) full_seen++;
      // phases: fill-biased, drain-biased
      wr_en    = ((i / 200) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      wr_en    = wr_en && !full;
      rd_ready = ((i / 200) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      wr_data  = WIDTH'($urandom);
      @(posedge clk);
      if (rd_ready && model.size() != 0) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FIFO never became full"); end
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
