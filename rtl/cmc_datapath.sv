// cmc_datapath -- dedicated data path of the common memory controller.
//
// It keeps the four line FIFOs (z^-N delays) of the filter in external
// memory. Word c of the SRAM holds, for image column c, the pixels of the
// four previous lines: byte 0 the oldest (four lines up) to byte 3 the
// line just above. For each active pixel the word of its column is read
// (word_ld) and, in the next cycle (step), written back shifted by one
// byte with the new pixel in byte 3. The whole logical organisation of the
// four chained FIFOs is thus updated in one memory cycle, and the read
// word plus the incoming pixel form the five-pixel column the filter
// needs. Packing the four FIFO bytes in one word follows the document's
// simulation trace (a 32-bit "fifo" word); the byte order is this design's
// choice.
//
// Address generation: a column counter gives the SRAM address of the
// pixel in process; it counts active pixels and returns to zero on the
// first inactive (blanked) pixel period. Lines longer than LINE_W pixels
// are not supported (assertion).
//
// Timing: sram_addr and sram_wdata are decoded from registers. col is
// valid for the pixel in process; it advances at the end of its step.
module cmc_datapath
  import nagamod_pkg::*;
#(
  parameter int unsigned LINE_W = 512,
  parameter int unsigned ADDR_W = 19
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pix_tick,  // end of a pixel period
  input  logic              act,       // the pixel in process is active
  input  logic              word_ld,   // read cycle: capture sram_rdata
  input  logic              step,      // write cycle of an active pixel
  input  pixel_t            pix,       // pixel in process (current line)
  input  word_t             sram_rdata,
  output logic [ADDR_W-1:0] sram_addr,
  output word_t             sram_wdata,
  output col5_t             col5,      // [0] four lines up .. [4] current line
  output logic [$clog2(LINE_W)-1:0] col
);

  localparam int unsigned COL_W = $clog2(LINE_W);

  word_t word_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       word_q <= '0;
    else if (word_ld) word_q <= sram_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                col <= '0;
    else if (step)             col <= col + COL_W'(1);
    else if (pix_tick && !act) col <= '0;
  end

  always_comb begin
    sram_addr  = ADDR_W'(col);
    sram_wdata = {pix, word_q[WORD_W-1:PIX_W]};
    col5[4]    = pix;
    col5[3]    = word_q[31:24];
    col5[2]    = word_q[23:16];
    col5[1]    = word_q[15:8];
    col5[0]    = word_q[7:0];
  end

  // set once the last column of the buffer has been used in this line
  logic line_full;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   line_full <= 1'b0;
    else if (step && col == COL_W'(LINE_W - 1))   line_full <= 1'b1;
    else if (pix_tick && !act)                    line_full <= 1'b0;
  end

  a_line_fits: assert property (@(posedge clk) disable iff (!rst_n)
    !(step && line_full))
    else $error("video line longer than LINE_W pixels");

endmodule
