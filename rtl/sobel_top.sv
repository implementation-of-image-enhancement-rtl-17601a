// sobel_top: Sobel edge detection IP (image processing top).
//
// Streams a grayscale image in, one pixel per clock, and streams the edge map
// out. image_control keeps four line buffers and produces a 3x3 window per clock
// once three lines are in; sobel_conv turns each window into an edge pixel (255)
// or a non-edge pixel (0) two clocks later; sync_fifo holds the results until the
// receiver takes them, absorbing the difference between input and output rates.
//
// Interface: i_pixel_data/i_pixel_valid with o_pixel_ready on the input side,
// o_data/o_data_valid with i_data_ready on the output side, both moving a value
// on a clock where valid and ready are high. o_intr pulses each time a line
// buffer has been used up and can take a new line. An H x W image yields
// (H-2) x (W-2) output pixels, the windows that lie wholly inside the image, in
// raster order. Without back-pressure the IP takes one pixel per clock
// throughout, so an image takes H*W clocks plus a few clocks of latency.
//
// Back-pressure: a window is read only while the FIFO has room for it and for
// the windows already in the three pipeline stages (window register and the two
// convolution stages), so the FIFO never overflows; when the receiver stalls,
// the line buffers fill up and o_pixel_ready drops. The three sub-modules and
// the output FIFO follow the published design, as do the 512 x 512 default image
// size; the handshake, the FIFO depth and the threshold value are choices of
// this design. Images of H lines follow each other with no gap or frame signal.
module sobel_top
  import img_pkg::*;
#(
  parameter int unsigned W          = 512,
  parameter int unsigned H          = 512,
  parameter int unsigned THRESHOLD  = 100,
  parameter int unsigned FIFO_DEPTH = 32
)(
  input  logic   clk,
  input  logic   rst_n,
  input  pixel_t i_pixel_data,
  input  logic   i_pixel_valid,
  output logic   o_pixel_ready,
  output pixel_t o_data,
  output logic   o_data_valid,
  input  logic   i_data_ready,
  output logic   o_intr
);

  localparam int unsigned IN_FLIGHT = 3;   // window register + two convolution stages
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1);

  logic    rd_allow, win_valid, conv_valid, fifo_full;
  window_t window;
  pixel_t  conv_data;
  logic [CW-1:0] fifo_count;

  // Room for this window and those in flight.
  assign rd_allow = fifo_count <= CW'(FIFO_DEPTH - IN_FLIGHT - 1);

  image_control #(.W(W), .H(H)) u_ctrl (
    .clk, .rst_n,
    .i_valid     (i_pixel_valid),
    .i_data      (i_pixel_data),
    .o_ready     (o_pixel_ready),
    .i_rd_allow  (rd_allow),
    .o_win_valid (win_valid),
    .o_window    (window),
    .o_intr
  );

  sobel_conv #(.THRESHOLD(THRESHOLD)) u_conv (
    .clk, .rst_n,
    .i_valid  (win_valid),
    .i_window (window),
    .o_valid  (conv_valid),
    .o_data   (conv_data)
  );

  sync_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_DEPTH)) u_out_buf (
    .clk, .rst_n,
    .i_wr_en    (conv_valid),
    .i_wr_data  (conv_data),
    .o_full     (fifo_full),
    .o_rd_valid (o_data_valid),
    .o_rd_data  (o_data),
    .i_rd_ready (i_data_ready),
    .o_count    (fifo_count)
  );

  assert property (@(posedge clk) disable iff (!rst_n) conv_valid |-> !fifo_full)
    else $error("sobel_top: edge pixel arrived at a full output buffer");

  initial begin
    assert (FIFO_DEPTH > IN_FLIGHT + 1) else $error("sobel_top: FIFO_DEPTH too small");
  end

endmodule
