// nagamod_pkg -- types, widths and small operators shared by the Nagamod
// smoothing filter.
//
// Pixels are 8-bit grey levels. A 3x3 sum of 8-bit pixels needs 12 bits
// (9 * 255 = 2295); the intermediate widths 9, 10 and 11 bits are those of
// the adder tree of the B1 component. The extent of a window (maximum minus
// minimum) fits in 8 bits. The external line-buffer memory is one 32-bit
// SRAM bank, each word holding the four delayed lines of one column.
package nagamod_pkg;

  localparam int unsigned PIX_W  = 8;   // grey level
  localparam int unsigned VSUM_W = 10;  // sum of three pixels of one column
  localparam int unsigned SUM_W  = 12;  // sum of a 3x3 window
  localparam int unsigned WORD_W = 32;  // SRAM word: four line-FIFO bytes

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [VSUM_W-1:0] vsum_t;
  typedef logic [SUM_W-1:0]  sum_t;
  typedef logic [WORD_W-1:0] word_t;

  // Extent and sum of one 3x3 neighbourhood, the quantity B1 produces and
  // B2 selects among.
  typedef struct packed {
    pixel_t ext;
    sum_t   sum;
  } ext_sum_t;

  // The five pixels of one image column inside the 5x5 window;
  // index 0 is the oldest line (four lines up), index 4 the current line.
  typedef logic [4:0][PIX_W-1:0] col5_t;

  function automatic pixel_t min3(input pixel_t a, input pixel_t b, input pixel_t c);
    pixel_t m;
    m = (a < b) ? a : b;
    return (c < m) ? c : m;
  endfunction

  function automatic pixel_t max3(input pixel_t a, input pixel_t b, input pixel_t c);
    pixel_t m;
    m = (a > b) ? a : b;
    return (c > m) ? c : m;
  endfunction

endpackage
