// nagamod_b2 -- the B2 component: choose, among three 3x3 neighbourhoods,
// the one with the smallest extent and pass on its extent and its sum.
//
// A three-input minimum on the extents drives the select of a 3-to-1
// multiplexer on the sums, as in the document's B2 diagram. When extents
// are equal the lowest-numbered input wins (input 1 before 2 before 3);
// the document does not say how ties are broken, so this order is this
// design's choice. Purely combinational.
module nagamod_b2
  import nagamod_pkg::*;
(
  input  ext_sum_t in1,
  input  ext_sum_t in2,
  input  ext_sum_t in3,
  output ext_sum_t out
);

  always_comb begin
    out = in1;
    if (in2.ext < out.ext) out = in2;
    if (in3.ext < out.ext) out = in3;
  end

endmodule
