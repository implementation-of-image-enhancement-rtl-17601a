// enhance_top: image enhancement IP for retinal fundus images.
//
// An image memory (image_read) streams the stored RGB picture two pixels per
// clock into two pixel_enhance units working side by side, one for the even and
// one for the odd column, so the whole image is processed in WIDTH*HEIGHT/2
// clocks. The operation (brightness up or down by a constant, negative, or
// threshold) and its constants are taken from i_cfg, which must be held steady
// while a frame streams. The enhanced pair is registered: each output word
// appears one clock after image_read shows it; the first one is valid after
// the third rising edge counting the edge that samples i_start. o_row_start and o_frame_end travel with the
// data. o_done pulses for one clock with the last enhanced word.
//
// The published design picks the operation in a compile-time settings file; here
// it is a run-time input, so one IP holds all three operations. Load port and
// handshake are as described in image_read.
module enhance_top
  import img_pkg::*;
#(
  parameter int unsigned WIDTH  = 768,
  parameter int unsigned HEIGHT = 512,
  localparam int unsigned AW    = $clog2(WIDTH * HEIGHT / 2)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  enh_cfg_t      i_cfg,
  input  logic          i_wr_en,
  input  logic [AW-1:0] i_wr_addr,
  input  rgb_pair_t     i_wr_data,
  input  logic          i_start,
  output logic          o_busy,
  output logic          o_valid,
  output rgb_pair_t     o_pair,
  output logic          o_row_start,
  output logic          o_done
);

  logic      rd_valid, rd_row_start, rd_frame_end, rd_busy;
  rgb_pair_t rd_pair;
  rgb_pair_t enh_pair;

  image_read #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_read (
    .clk, .rst_n,
    .i_wr_en, .i_wr_addr, .i_wr_data,
    .i_start,
    .o_busy      (rd_busy),
    .o_valid     (rd_valid),
    .o_pair      (rd_pair),
    .o_row_start (rd_row_start),
    .o_frame_end (rd_frame_end)
  );

  pixel_enhance u_enh_even (.cfg(i_cfg), .i_pix(rd_pair.p0), .o_pix(enh_pair.p0));
  pixel_enhance u_enh_odd  (.cfg(i_cfg), .i_pix(rd_pair.p1), .o_pix(enh_pair.p1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid     <= 1'b0;
      o_row_start <= 1'b0;
      o_done      <= 1'b0;
      o_pair      <= '0;
    end else begin
      o_valid     <= rd_valid;
      o_row_start <= rd_row_start;
      o_done      <= rd_frame_end;
      if (rd_valid) o_pair <= enh_pair;
    end
  end

  // Busy until the last enhanced word has left.
  assign o_busy = rd_busy | rd_valid | o_valid;

endmodule
