// line_buffer: storage for one image line of 8-bit grayscale pixels.
//
// Write side: each clock with i_wr_valid high stores i_wr_data at the write
// pointer, which runs 0..W-1 and then wraps, so W writes fill the line from
// left to right. Read side: o_data always shows the three adjacent pixels at
// columns rp, rp+1 and rp+2 (column rp in bits [7:0]), read without a clock from
// the storage (a distributed RAM). Each clock with i_rd_en high advances rp;
// after the window at columns W-3..W-1 it wraps to 0, so W-2 reads walk every
// full 3-pixel window of the line once and leave the buffer ready for reuse.
//
// Reading three pixels per access and the 24-bit read word follow the published
// design; the pointer scheme and reading only windows that lie wholly inside the
// line (no padding at the left and right edges) are choices of this design.
module line_buffer
  import img_pkg::*;
#(
  parameter int unsigned W = 512,
  localparam int unsigned PW = $clog2(W)
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             i_wr_valid,
  input  pixel_t           i_wr_data,
  input  logic             i_rd_en,
  output logic [3*PIX_W-1:0] o_data
);

  pixel_t        line [W];
  logic [PW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    if (i_wr_valid) line[wp] <= i_wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (i_wr_valid) wp <= (wp == PW'(W - 1)) ? '0 : wp + 1'b1;
      if (i_rd_en)    rp <= (rp == PW'(W - 3)) ? '0 : rp + 1'b1;
    end
  end

  assign o_data = {line[rp + PW'(2)], line[rp + PW'(1)], line[rp]};

  initial begin
    assert (W >= 3) else $error("line_buffer: W must be at least 3");
  end

endmodule
