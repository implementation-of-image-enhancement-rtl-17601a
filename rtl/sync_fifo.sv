// sync_fifo: single-clock first-in first-out buffer, used as the output buffer
// of the edge detection IP.
//
// DEPTH entries of WIDTH bits held in a register array. Write side: i_wr_en
// stores i_wr_data unless the FIFO is full (o_full). Read side is show-ahead:
// o_rd_data is the oldest entry and o_rd_valid says the FIFO is not empty; the
// entry is removed on a clock where i_rd_ready and o_rd_valid are both high.
// o_count is the number of entries held. Data written into an empty FIFO can be
// read on the next clock. A FIFO as the output buffer follows the published
// design; its depth and show-ahead read are choices of this design.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             i_wr_en,
  input  logic [WIDTH-1:0] i_wr_data,
  output logic             o_full,
  output logic             o_rd_valid,
  output logic [WIDTH-1:0] o_rd_data,
  input  logic             i_rd_ready,
  output logic [CW-1:0]    o_count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             push, pop;

  assign o_full     = o_count == CW'(DEPTH);
  assign o_rd_valid = o_count != '0;
  assign o_rd_data  = mem[rp];
  assign push       = i_wr_en && !o_full;
  assign pop        = i_rd_ready && o_rd_valid;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= i_wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      rp      <= '0;
      o_count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      o_count <= o_count + CW'(push) - CW'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) i_wr_en |-> !o_full)
    else $error("sync_fifo: write while full, data lost");

endmodule
