// image_read: image memory of the enhancement IP, streamed out two pixels per clock.
//
// Holds one RGB image of WIDTH x HEIGHT pixels as WIDTH*HEIGHT/2 words, each word
// being two horizontally adjacent pixels (even column in p0, odd column in p1).
// Words are stored in raster order: word address = row * WIDTH/2 + column/2.
//
// Loading: while the stream is idle, a host writes words with i_wr_en, i_wr_addr
// and i_wr_data (one word per clock). Streaming: a one-cycle pulse on i_start
// makes the block read the whole image in raster order, one word per clock with
// no gaps. Each word appears one clock after it is addressed, with o_valid high;
// o_row_start marks the first word of a row and o_frame_end the last word of the
// image. o_busy is high from the clock after i_start until the last word has been
// addressed. A full image takes WIDTH*HEIGHT/2 clocks.
//
// Reading the picture into a memory and handing out two neighbouring pixels per
// clock follows the published design, as do the 768 x 512 default size and the
// RGB format; the load port and the start/valid/row/frame signals are choices of
// this design. Writes while streaming are ignored.
module image_read
  import img_pkg::*;
#(
  parameter int unsigned WIDTH  = 768,
  parameter int unsigned HEIGHT = 512,
  localparam int unsigned WORDS  = WIDTH * HEIGHT / 2,
  localparam int unsigned AW     = $clog2(WORDS),
  localparam int unsigned CW     = $clog2(WIDTH / 2)
)(
  input  logic            clk,
  input  logic            rst_n,
  // image load port
  input  logic            i_wr_en,
  input  logic [AW-1:0]   i_wr_addr,
  input  rgb_pair_t       i_wr_data,
  // stream control
  input  logic            i_start,
  output logic            o_busy,
  // pixel pair stream
  output logic            o_valid,
  output rgb_pair_t       o_pair,
  output logic            o_row_start,
  output logic            o_frame_end
);

  rgb_pair_t mem [WORDS];

  logic [AW-1:0] rd_addr;
  logic [CW-1:0] col;

  always_ff @(posedge clk) begin
    if (i_wr_en && !o_busy) mem[i_wr_addr] <= i_wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_busy      <= 1'b0;
      rd_addr     <= '0;
      col         <= '0;
      o_valid     <= 1'b0;
      o_row_start <= 1'b0;
      o_frame_end <= 1'b0;
    end else begin
      o_valid     <= o_busy;
      o_row_start <= o_busy && (col == '0);
      o_frame_end <= o_busy && (rd_addr == AW'(WORDS - 1));
      if (!o_busy) begin
        if (i_start) begin
          o_busy  <= 1'b1;
          rd_addr <= '0;
          col     <= '0;
        end
      end else begin
        if (rd_addr == AW'(WORDS - 1)) o_busy <= 1'b0;
        rd_addr <= rd_addr + 1'b1;
        col     <= (col == CW'(WIDTH / 2 - 1)) ? '0 : col + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    o_pair <= mem[rd_addr];
  end

endmodule
