// nagamod_filter -- the Nagamod smoothing operator (modified Nagao filter).
//
// For every 5x5 neighbourhood of the video stream, the filter considers the
// nine 3x3 sub-neighbourhoods centred on the nine innermost pixels (A, E, B
// in the upper row, H, I, F in the middle row, D, G, C in the lower row),
// finds the one whose extent (maximum - minimum intensity) is smallest and
// delivers that sub-neighbourhood's 12-bit sum. The sum divided by nine is
// the smoothed value of the 5x5 centre pixel.
//
// Structure (the document's compact organisation): three B1 blocks work on
// the line triples (y-4, y-3, y-2), (y-3, y-2, y-1) and (y-2, y-1, y) of the
// current column and give the three vertically stacked 3x3 windows whose
// right column is the current one. A first B2 keeps the best of these
// three; two z^-1 registers on its (extent, sum) hold the results of the
// two previous columns, and a second B2 chooses among the three columns.
// On equal extents the upper window, then the right-most column, is kept
// (tie order is this design's choice).
//
// Interface: col[0] is the pixel four lines up (oldest line delay), col[4]
// the pixel of the current line, all of the same column. Everything
// advances only when en is high (one cycle per active pixel). The result
// is registered: after the enabled cycle that presented column x of line y
// the output holds the result for the 5x5 window of lines y-4..y and
// columns x-4..x (centre pixel y-2, x-2). This output register is the
// second of the two pipeline stages; the first is the register that
// captures the line-buffer word from external memory.
module nagamod_filter
  import nagamod_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  col5_t    col,
  output ext_sum_t res
);

  ext_sum_t w_top, w_mid, w_bot;   // 3x3 windows centred one line up / on / below the centre line
  ext_sum_t best_v;                // best of the three, current column
  ext_sum_t best_v_d1, best_v_d2;  // same for the two previous columns
  ext_sum_t best;

  nagamod_b1 u_b1_top (
    .clk, .rst_n, .en,
    .i1(col[0]), .i2(col[1]), .i3(col[2]),
    .extent(w_top.ext), .sum(w_top.sum)
  );

  nagamod_b1 u_b1_mid (
    .clk, .rst_n, .en,
    .i1(col[1]), .i2(col[2]), .i3(col[3]),
    .extent(w_mid.ext), .sum(w_mid.sum)
  );

  nagamod_b1 u_b1_bot (
    .clk, .rst_n, .en,
    .i1(col[2]), .i2(col[3]), .i3(col[4]),
    .extent(w_bot.ext), .sum(w_bot.sum)
  );

  nagamod_b2 u_b2_vert (
    .in1(w_top), .in2(w_mid), .in3(w_bot),
    .out(best_v)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_v_d1 <= '0;
      best_v_d2 <= '0;
    end else if (en) begin
      best_v_d1 <= best_v;
      best_v_d2 <= best_v_d1;
    end
  end

  nagamod_b2 u_b2_horz (
    .in1(best_v), .in2(best_v_d1), .in3(best_v_d2),
    .out(best)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  res <= '0;
    else if (en) res <= best;
  end

endmodule
