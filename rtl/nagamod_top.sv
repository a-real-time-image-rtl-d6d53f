// nagamod_top -- real-time Nagamod video smoothing on one FPGA with one
// external SRAM bank.
//
// A video stream (8-bit pixels in raster order with Blank, SYNH and SYNV
// timing) enters through the I/O interface. The common memory controller
// keeps the four previous lines in the external SRAM, one 32-bit word per
// column, and with one read and one write per pixel delivers the five
// pixels of the current column of the 5x5 window. The Nagamod filter
// (three B1 and two B2 components) picks, within every 5x5 window, the 3x3
// sub-window of smallest extent and outputs its sum; the I/O interface
// sends it back with the timing signals delayed to match.
//
// Clocking: clk runs at twice the pixel rate (20 MHz for the 10 MHz pixel
// clock of a 512x512, 25 images/s stream). pix_clk_o is the recovered
// pixel clock: the board presents a new pixel for each of its periods and
// the design samples it at the end of the period (when pix_clk_o is high
// at a clk edge). Results leave two pixel periods after their last pixel
// came in. Latency and clocking are this design's choices within the
// document's two-stage pipeline and 20 MHz memory clock.
//
// SRAM port: asynchronous 512Kx32 SRAM with active-low chip enable,
// output enable and write enable; read data are taken at the end of the
// read cycle, a write happens during the write cycle. Data in and out are
// separate buses here; the board's bidirectional bus is outside this RTL.
// Only LINE_W words are used, so the upper address bits stay zero.
//
// The extent of the chosen window (res.ext) is computed but not brought
// out: the final B2 of the filter leaves its extent output unconnected,
// and only the sum forms the filtered pixel. Lint reports these bits as
// unused for that reason.
module nagamod_top
  import nagamod_pkg::*;
#(
  parameter int unsigned LINE_W = 512,
  parameter int unsigned LINES  = 512,
  parameter int unsigned ADDR_W = 19
) (
  input  logic              clk,
  input  logic              rst_n,
  // video in
  input  pixel_t            pixel_in,
  input  logic              blank,
  input  logic              synh,
  input  logic              synv,
  output logic              pix_clk_o,
  // video out
  output sum_t              pixel_out,
  output logic              border_o,
  output logic              blank_o,
  output logic              synh_o,
  output logic              synv_o,
  // external SRAM bank
  output logic [ADDR_W-1:0] sram_addr,
  output word_t             sram_wdata,
  input  word_t             sram_rdata,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n
);

  logic   phase, pix_tick, word_ld, step, act;
  pixel_t pix;
  col5_t  col5;
  logic [$clog2(LINE_W)-1:0] col;
  ext_sum_t res;

  cmc_ctrl u_cmc_ctrl (
    .clk, .rst_n, .act,
    .phase, .pix_tick, .word_ld, .step,
    .sram_ce_n, .sram_oe_n, .sram_we_n
  );

  cmc_datapath #(.LINE_W(LINE_W), .ADDR_W(ADDR_W)) u_cmc_dp (
    .clk, .rst_n, .pix_tick, .act, .word_ld, .step, .pix,
    .sram_rdata, .sram_addr, .sram_wdata,
    .col5, .col
  );

  nagamod_filter u_filter (
    .clk, .rst_n, .en(step), .col(col5), .res
  );

  io_interface #(.LINES(LINES), .LINE_W(LINE_W)) u_io (
    .clk, .rst_n, .pix_tick, .step,
    .pixel_in, .blank, .synh, .synv,
    .pix, .act, .col, .res_sum(res.sum),
    .pixel_out, .border_o, .blank_o, .synh_o, .synv_o
  );

  assign pix_clk_o = phase;

endmodule
