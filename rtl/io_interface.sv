// io_interface -- video I/O interface towards the synchronisation board.
//
// The synchronisation board delivers one 8-bit pixel per pixel period with
// three timing signals: Blank (high while the pixels belong to a line),
// SYNH (negative pulse between two lines) and SYNV (negative pulse between
// two images). This block samples the four inputs at the end of every
// pixel period (pix_tick), so the rest of the design processes each pixel
// during the following period; act is the sampled Blank and switches the
// filter and the memory off during dead times.
//
// It counts the lines of the image (reset while SYNV is low, advanced when
// Blank falls) and, together with the column counter of the memory data
// path, marks each result whose 5x5 window is not entirely inside the
// current image (border). Such results are still delivered; the marking and
// the counters are this design's choice, the document does not treat image
// borders.
//
// Output side: the filtered value (12-bit sum of the chosen 3x3
// neighbourhood, as the document's hardware delivers it) is held for a
// whole pixel period, and Blank, SYNH and SYNV are given back delayed by
// the same two pixel periods so that the board can redisplay the stream.
// The result shown with an active blank_o belongs to the 5x5 window whose
// lower right pixel was sampled two pixel periods earlier; the window's
// centre is two lines up and two columns to the left.
module io_interface
  import nagamod_pkg::*;
#(
  parameter int unsigned LINES  = 512,
  parameter int unsigned LINE_W = 512
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     pix_tick,
  input  logic     step,
  // from the synchronisation board
  input  pixel_t   pixel_in,
  input  logic     blank,
  input  logic     synh,
  input  logic     synv,
  // pixel in process
  output pixel_t   pix,
  output logic     act,
  input  logic [$clog2(LINE_W)-1:0] col,
  // from the filter
  input  sum_t     res_sum,
  // to the synchronisation board
  output sum_t     pixel_out,
  output logic     border_o,
  output logic     blank_o,
  output logic     synh_o,
  output logic     synv_o
);

  localparam int unsigned ROW_W = $clog2(LINES);

  logic [ROW_W-1:0] row;
  logic             synh_q, synv_q;
  logic             interior;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix    <= '0;
      act    <= 1'b0;
      synh_q <= 1'b1;
      synv_q <= 1'b1;
    end else if (pix_tick) begin
      pix    <= pixel_in;
      act    <= blank;
      synh_q <= synh;
      synv_q <= synv;
    end
  end

  // line counter of the pixel in process
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row <= '0;
    else if (pix_tick) begin
      if (!synv)
        row <= '0;
      else if (act && !blank && row != ROW_W'(LINES - 1))
        row <= row + ROW_W'(1);
    end
  end

  assign interior = (row >= ROW_W'(4)) && (col >= $bits(col)'(4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    border_o <= 1'b1;
    else if (step) border_o <= ~interior;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blank_o <= 1'b0;
      synh_o  <= 1'b1;
      synv_o  <= 1'b1;
    end else if (pix_tick) begin
      blank_o <= act;
      synh_o  <= synh_q;
      synv_o  <= synv_q;
    end
  end

  assign pixel_out = res_sum;

endmodule
