// dr_image_ip_top: the two retinal-image IPs side by side.
//
// enh_*  : the image enhancement IP (enhance_top). A colour image of
//          ENH_WIDTH x ENH_HEIGHT pixels is loaded into its image memory two
//          pixels per word, then one pulse on enh_start streams it out through
//          the selected operation (brightness up/down, negative or threshold),
//          two enhanced pixels per clock.
// sobel_*: the Sobel edge detection IP (sobel_top). A grayscale image of
//          SOBEL_WIDTH x SOBEL_HEIGHT pixels streams in one pixel per clock; the edge map
//          streams out through the output FIFO.
// The two share only the clock and the active-low asynchronous reset; neither
// feeds the other, as in the published work, where enhancement works on the RGB
// image and edge detection on a grayscale copy prepared beforehand. Timing of
// each port group is given in the header of the IP it belongs to.
module dr_image_ip_top
  import img_pkg::*;
#(
  parameter int unsigned ENH_WIDTH        = 768,
  parameter int unsigned ENH_HEIGHT       = 512,
  parameter int unsigned SOBEL_WIDTH      = 512,
  parameter int unsigned SOBEL_HEIGHT     = 512,
  parameter int unsigned SOBEL_THRESHOLD  = 100,
  parameter int unsigned SOBEL_FIFO_DEPTH = 32,
  localparam int unsigned ENH_AW          = $clog2(ENH_WIDTH * ENH_HEIGHT / 2)
)(
  input  logic              clk,
  input  logic              rst_n,
  // image enhancement IP
  input  enh_cfg_t          enh_cfg,
  input  logic              enh_wr_en,
  input  logic [ENH_AW-1:0] enh_wr_addr,
  input  rgb_pair_t         enh_wr_data,
  input  logic              enh_start,
  output logic              enh_busy,
  output logic              enh_valid,
  output rgb_pair_t         enh_pair,
  output logic              enh_row_start,
  output logic              enh_done,
  // Sobel edge detection IP
  input  pixel_t            sobel_pixel_data,
  input  logic              sobel_pixel_valid,
  output logic              sobel_pixel_ready,
  output pixel_t            sobel_data,
  output logic              sobel_data_valid,
  input  logic              sobel_data_ready,
  output logic              sobel_intr
);

  enhance_top #(.WIDTH(ENH_WIDTH), .HEIGHT(ENH_HEIGHT)) u_enhance (
    .clk, .rst_n,
    .i_cfg       (enh_cfg),
    .i_wr_en     (enh_wr_en),
    .i_wr_addr   (enh_wr_addr),
    .i_wr_data   (enh_wr_data),
    .i_start     (enh_start),
    .o_busy      (enh_busy),
    .o_valid     (enh_valid),
    .o_pair      (enh_pair),
    .o_row_start (enh_row_start),
    .o_done      (enh_done)
  );

  sobel_top #(.W(SOBEL_WIDTH), .H(SOBEL_HEIGHT), .THRESHOLD(SOBEL_THRESHOLD),
              .FIFO_DEPTH(SOBEL_FIFO_DEPTH)) u_sobel (
    .clk, .rst_n,
    .i_pixel_data  (sobel_pixel_data),
    .i_pixel_valid (sobel_pixel_valid),
    .o_pixel_ready (sobel_pixel_ready),
    .o_data        (sobel_data),
    .o_data_valid  (sobel_data_valid),
    .i_data_ready  (sobel_data_ready),
    .o_intr        (sobel_intr)
  );

endmodule
