// cmc_ctrl -- control part of the common memory controller.
//
// The four line delays of the filter live in one external asynchronous
// SRAM bank, one 32-bit word per image column. Every pixel period the
// controller makes one read and one write of that word: the design clock
// runs at twice the pixel rate, the first cycle of a pixel period reads
// (oe_n low), the second writes the rearranged word back (we_n low). The
// document asks for a read and a write per pixel period and its simulation
// shows a 20 MHz memory clock for a 10 MHz pixel clock; the exact two-cycle
// sequence is this design's choice.
//
// Memory operations are made only for active pixels (Blank high when the
// pixel was sampled): during line and frame blanking the chip enable stays
// high and the SRAM is idle, as the document describes.
//
// Outputs: phase (0 = read cycle, 1 = write cycle), pix_tick (last cycle
// of a pixel period, where the I/O interface samples the next pixel),
// word_ld (capture the read word), step (advance the filter and the column
// counter) and the active-low SRAM strobes. All outputs are decoded from
// two registers (phase and act) without other logic.
module cmc_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic act,        // the pixel being processed is active
  output logic phase,
  output logic pix_tick,
  output logic word_ld,
  output logic step,
  output logic sram_ce_n,
  output logic sram_oe_n,
  output logic sram_we_n
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= ~phase;
  end

  always_comb begin
    pix_tick  = phase;
    word_ld   = act & ~phase;
    step      = act &  phase;
    sram_ce_n = ~act;
    sram_oe_n = ~(act & ~phase);
    sram_we_n = ~(act &  phase);
  end

  // the SRAM is never driven and written at the same time
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
    !(!sram_oe_n && !sram_we_n));

endmodule
