// tb_nagamod_filter -- self-checking test of the Nagamod filter datapath.
//
// Feeds random five-pixel columns with a random enable and keeps its own
// 5x5 window of the enabled columns (zero before the first column, as
// after reset). After each enabled cycle it checks the registered result
// against a direct evaluation: the nine 3x3 sub-windows of the 5x5 window
// are scanned, right column first and upper window first within a column,
// and the first with the smallest extent gives the expected extent and
// sum. Pixels are drawn from a few flat levels with noise so that ties and
// every one of the nine positions occur; the test fails if any of the nine
// positions is never chosen.
module tb_nagamod_filter;
  import nagamod_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  col5_t    col;
  ext_sum_t res;
  int       checks = 0, failures = 0;
  int       chosen [3][3];
  int       ties = 0;

  pixel_t   win [5][5];   // [column 0 oldest .. 4 newest][line 0 oldest .. 4 current]

  nagamod_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ext_sum_t expected(output int hc, output int vr, output bit tie);
    ext_sum_t best;
    int mn, mx, sm;
    best.ext = '1; best.sum = '0; hc = -1; vr = -1; tie = 0;
    for (int h = 2; h >= 0; h--)        // column triple h..h+2, right-most first
      for (int v = 0; v < 3; v++) begin // line triple v..v+2, upper first
        mn = 255; mx = 0; sm = 0;
        for (int c = h; c < h + 3; c++)
          for (int l = v; l < v + 3; l++) begin
            if (int'(win[c][l]) < mn) mn = int'(win[c][l]);
            if (int'(win[c][l]) > mx) mx = int'(win[c][l]);
            sm += int'(win[c][l]);
          end
        if (hc < 0 || mx - mn < int'(best.ext)) begin
          best.ext = pixel_t'(mx - mn); best.sum = sum_t'(sm); hc = h; vr = v; tie = 0;
        end else if (mx - mn == int'(best.ext)) tie = 1;
      end
    return best;
  endfunction

  initial begin
    ext_sum_t exp_r;
    int hc, vr;
    bit tie;
    pixel_t base;
    foreach (win[a, b]) win[a][b] = '0;
    foreach (chosen[a, b]) chosen[a][b] = 0;
    col = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      for (int l = 0; l < 5; l++) begin
        base = ($urandom_range(1) != 0) ? 8'd40 : 8'd200;
        if (n % 3 == 0) col[l] = pixel_t'($urandom);
        else            col[l] = base + pixel_t'($urandom_range(6));
      end
      @(posedge clk);
      if (en) begin
        for (int c = 0; c < 4; c++) win[c] = win[c + 1];
        for (int l = 0; l < 5; l++) win[4][l] = col[l];
      end
      #1;
      exp_r = expected(hc, vr, tie);
      checks++;
      if (res != exp_r) begin
        failures++;
        if (failures < 10)
          $display("filter mismatch at %0d: got ext=%0d sum=%0d, expected ext=%0d sum=%0d",
                   n, res.ext, res.sum, exp_r.ext, exp_r.sum);
      end
      if (en) begin
        chosen[hc][vr]++;
        if (tie) ties++;
      end
    end
    foreach (chosen[a, b]) begin
      $display("window columns %0d..%0d lines %0d..%0d chosen %0d times", a, a + 2, b, b + 2, chosen[a][b]);
      if (chosen[a][b] == 0) failures++;
    end
    $display("results decided among equal extents: %0d", ties);
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
