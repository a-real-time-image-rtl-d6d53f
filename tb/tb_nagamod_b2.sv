// tb_nagamod_b2 -- self-checking test of the B2 component.
//
// Applies random (extent, sum) triples, many with equal extents, and checks
// that the output is the pair with the smallest extent, the first input
// winning among equal extents. The expected value is found by sorting the
// three inputs on (extent, input number).
module tb_nagamod_b2;
  import nagamod_pkg::*;

  ext_sum_t in1, in2, in3, out;
  int       checks = 0, failures = 0;
  int       ties = 0;

  nagamod_b2 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ext_sum_t v [3];
    int best;
    for (int n = 0; n < 20000; n++) begin
      foreach (v[k]) begin
        v[k].ext = (n % 2) ? pixel_t'($urandom_range(3)) : pixel_t'($urandom);
        v[k].sum = sum_t'($urandom);
      end
      in1 = v[0]; in2 = v[1]; in3 = v[2];
      #1;
      // rank: extent first, then position
      best = 0;
      for (int k = 1; k < 3; k++)
        if ({v[k].ext, 2'(k)} < {v[best].ext, 2'(best)}) best = k;
      if (v[0].ext == v[1].ext || v[0].ext == v[2].ext || v[1].ext == v[2].ext) ties++;
      checks++;
      if (out != v[best]) begin
        failures++;
        if (failures < 10)
          $display("B2 mismatch: in ext %0d %0d %0d, got ext=%0d sum=%0d, expected input %0d",
                   v[0].ext, v[1].ext, v[2].ext, out.ext, out.sum, best + 1);
      end
    end
    if (ties == 0) failures++;
    $display("B2: %0d vectors with equal extents", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
