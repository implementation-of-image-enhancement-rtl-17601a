// image_control: steers the pixel stream into four line buffers and forms 3x3
// windows for the Sobel convolution.
//
// Incoming grayscale pixels (raster order, one per clock at most, i_valid and
// o_ready handshake) fill the line buffers in turn: W pixels into buffer 0, the
// next W into buffer 1, and so on round the four buffers. Once three lines are
// complete the convolution side starts: each clock with i_rd_allow high it reads
// three pixels from each of the three oldest lines at once and presents the
// nine pixels P0..P8 (oldest line first) one clock later on o_window with
// o_win_valid. After W-2 windows the oldest line is spent: it is released for
// refill, o_intr pulses for one clock (once per window row), and the next window row uses the next
// three lines. At the end of an image (after H-2 window rows) the three lines
// under the last window row are all released at once, so the next image starts
// on clean lines without an explicit frame signal. While three lines are being
// read the fourth keeps filling, so input and convolution overlap and a W-pixel
// line is taken in W clocks while its W-2 windows take W-2 clocks.
//
// Flow control: pix_cnt counts pixels held in lines not yet released. The IP
// accepts input while pix_cnt < 4W (the four buffers are not all occupied) and
// reads windows while pix_cnt >= 3W (the three oldest lines are complete).
// Four line buffers, filling three before convolving and refilling the fourth
// during convolution follow the published design; the counters, the handshake,
// the interrupt, the image height as a parameter and the valid-only window rows
// (an H x W image gives H-2 rows of W-2 windows) are choices of this design.
module image_control
  import img_pkg::*;
#(
  parameter int unsigned W = 512,
  parameter int unsigned H = 512,
  localparam int unsigned PW = $clog2(W),
  localparam int unsigned RW = $clog2(H),
  localparam int unsigned CW = $clog2(4 * W + 1)
)(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    i_valid,
  input  pixel_t  i_data,
  output logic    o_ready,
  input  logic    i_rd_allow,
  output logic    o_win_valid,
  output window_t o_window,
  output logic    o_intr
);

  localparam logic [CW-1:0] LINE  = CW'(W);
  localparam logic [CW-1:0] THREE = CW'(3 * W);
  localparam logic [CW-1:0] FOUR  = CW'(4 * W);

  logic [1:0]    wr_sel, rd_base;
  logic [PW-1:0] wr_col, rd_col;
  logic [RW-1:0] rd_row;
  logic [CW-1:0] pix_cnt;
  logic          wr, rd, row_done, frame_done;

  logic [3:0]         lb_wr, lb_rd;
  logic [3*PIX_W-1:0] lb_data [4];

  assign o_ready  = pix_cnt < FOUR;
  assign wr       = i_valid && o_ready;
  assign rd       = (pix_cnt >= THREE) && i_rd_allow;
  assign row_done   = rd && (rd_col == PW'(W - 3));
  assign frame_done = row_done && (rd_row == RW'(H - 3));

  always_comb begin
    lb_wr = '0;
    lb_rd = '0;
    lb_wr[wr_sel] = wr;
    for (int k = 0; k < 3; k++) lb_rd[2'(rd_base + 2'(k))] = rd;
  end

  for (genvar i = 0; i < 4; i++) begin : g_lb
    line_buffer #(.W(W)) u_lb (
      .clk, .rst_n,
      .i_wr_valid (lb_wr[i]),
      .i_wr_data  (i_data),
      .i_rd_en    (lb_rd[i]),
      .o_data     (lb_data[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_sel      <= '0;
      wr_col      <= '0;
      rd_base     <= '0;
      rd_col      <= '0;
      rd_row      <= '0;
      pix_cnt     <= '0;
      o_win_valid <= 1'b0;
      o_window    <= '0;
      o_intr      <= 1'b0;
    end else begin
      if (wr) begin
        if (wr_col == PW'(W - 1)) begin
          wr_col <= '0;
          wr_sel <= wr_sel + 1'b1;
        end else begin
          wr_col <= wr_col + 1'b1;
        end
      end
      if (rd) begin
        if (frame_done) begin
          // last window row: the three lines under it all leave
          rd_col  <= '0;
          rd_row  <= '0;
          rd_base <= rd_base + 2'd3;
        end else if (row_done) begin
          rd_col  <= '0;
          rd_row  <= rd_row + 1'b1;
          rd_base <= rd_base + 1'b1;
        end else begin
          rd_col <= rd_col + 1'b1;
        end
      end
      pix_cnt <= pix_cnt + CW'(wr) - (frame_done ? THREE : row_done ? LINE : '0);
      o_intr  <= row_done;
      o_win_valid <= rd;
      if (rd) o_window <= {lb_data[2'(rd_base + 2'd2)],
                           lb_data[2'(rd_base + 2'd1)],
                           lb_data[rd_base]};
    end
  end

  // The line being written is never one of the three being read.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr && rd) |-> (wr_sel != rd_base && wr_sel != 2'(rd_base + 2'd1) &&
                                   wr_sel != 2'(rd_base + 2'd2)))
    else $error("image_control: write into a line under convolution");

endmodule
