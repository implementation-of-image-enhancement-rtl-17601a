// tb_line_buffer: fills a short line, reads every 3-pixel window and checks
// them, then refills the same buffer to check that both pointers wrapped.
module tb_line_buffer;
  import img_pkg::*;

  localparam int W = 10;

  logic        clk = 0, rst_n = 0;
  logic        wr_valid = 0, rd_en = 0;
  pixel_t      wr_data = '0;
  logic [23:0] rd_data;
  pixel_t      line [W];
  int          checks = 0, failures = 0;

  line_buffer #(.W(W)) dut (
    .clk, .rst_n, .i_wr_valid(wr_valid), .i_wr_data(wr_data),
    .i_rd_en(rd_en), .o_data(rd_data)
  );

  always #5 clk = ~clk;

  task automatic fill_and_read();
    for (int c = 0; c < W; c++) begin
      line[c] = pixel_t'($urandom);
      @(negedge clk); wr_valid = 1; wr_data = line[c];
    end
    @(negedge clk); wr_valid = 0;
    for (int c = 0; c < W - 2; c++) begin
      checks++;
      if (rd_data !== {line[c+2], line[c+1], line[c]}) begin
        failures++;
        $display("MISMATCH col %0d: %h expected %h", c, rd_data, {line[c+2], line[c+1], line[c]});
      end
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    // Read pointer back at column 0.
    checks++;
    if (rd_data[7:0] !== line[0]) begin
      failures++;
      $display("read pointer did not wrap");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) fill_and_read();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
