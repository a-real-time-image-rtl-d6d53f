// nagamod_b1 -- the B1 component: extent and sum of a 3x3 window sliding
// along the image lines.
//
// Each enabled cycle brings three vertically adjacent pixels i1, i2, i3 of
// one image column. A first level takes their minimum, maximum and sum
// (9-bit then 10-bit adders); two z^-1 registers per quantity keep the two
// previous columns, and a second level takes minimum, maximum and sum over
// the current and the two stored columns (11-bit then 12-bit adders). The
// outputs are the extent (maximum - minimum) and the sum of the 3x3 window
// whose right-hand column is the current input. This organisation and the
// adder widths are those of the document's B1 diagram.
//
// Timing: the outputs are combinational in the current inputs and the
// stored columns; the delay registers advance only when en is high, so the
// block holds its state while the video line is blanked. Reset clearing
// the delay registers is a choice of this design.
module nagamod_b1
  import nagamod_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  pixel_t i1,
  input  pixel_t i2,
  input  pixel_t i3,
  output pixel_t extent,
  output sum_t   sum
);

  pixel_t vmin, vmax;
  vsum_t  vsum;
  logic [VSUM_W-2:0] sum12;            // 9-bit partial sum i1 + i2

  // column z^-1 and z^-2 registers
  pixel_t min_d1, min_d2, max_d1, max_d2;
  vsum_t  sum_d1, sum_d2;

  logic [SUM_W-2:0] hsum_d;            // 11-bit partial sum of the stored columns
  pixel_t hmin, hmax;

  always_comb begin
    vmin  = min3(i1, i2, i3);
    vmax  = max3(i1, i2, i3);
    sum12 = {1'b0, i1} + {1'b0, i2};
    vsum  = {1'b0, sum12} + VSUM_W'(i3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_d1 <= '0; min_d2 <= '0;
      max_d1 <= '0; max_d2 <= '0;
      sum_d1 <= '0; sum_d2 <= '0;
    end else if (en) begin
      min_d1 <= vmin;  min_d2 <= min_d1;
      max_d1 <= vmax;  max_d2 <= max_d1;
      sum_d1 <= vsum;  sum_d2 <= sum_d1;
    end
  end

  always_comb begin
    hmin   = min3(vmin, min_d1, min_d2);
    hmax   = max3(vmax, max_d1, max_d2);
    hsum_d = (SUM_W-1)'(sum_d1) + (SUM_W-1)'(sum_d2);
    extent = hmax - hmin;
    sum    = SUM_W'(hsum_d) + SUM_W'(vsum);
  end

endmodule
