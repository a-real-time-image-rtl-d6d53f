// tb_nagamod_top -- end-to-end test of the Nagamod smoothing design.
//
// The testbench plays the synchronisation board and the external SRAM
// bank. It sends FRAMES video frames of H lines of W pixels, with line
// blanking (Blank low, a SYNH pulse) and frame blanking (Blank and SYNV
// low), one pixel per pixel period (two clock cycles), and checks every
// output pixel period:
//  * Blank, SYNH and SYNV come back exactly two pixel periods late;
//  * each active output carries the result for the 5x5 window whose lower
//    right pixel was the input two periods earlier: border flagged when the
//    window is not inside the frame, otherwise the sum of the 3x3
//    sub-window of smallest extent, computed here directly from the frame
//    (nine windows scanned right column first, upper first);
//  * the SRAM sees one read and one write in every active pixel period and
//    no access in a blanked one.
// Frames are random noise, blocks with noise, and nearly flat (many equal
// extents). The test counts how often each mechanism occurred (line and
// frame blanking with the memory idle, border results, ties, each of the
// nine sub-windows chosen) and fails if one never did.
module tb_nagamod_top;
  import nagamod_pkg::*;

  localparam int W = 24, H = 16, FRAMES = 3;
  // blanking, in pixel periods: per line (SYNH low for HS of them) and
  // per frame (SYNV low for VS of them, then two more)
  localparam int HBL = 3, HS = 1, VS = 4;
  localparam int FRAME_PERIODS = VS + 2 + H * (W + HBL);

  logic   clk = 1'b0, rst_n = 1'b0;
  pixel_t pixel_in = '0;
  logic   blank = 1'b0, synh = 1'b1, synv = 1'b1;
  logic   pix_clk_o;
  sum_t   pixel_out;
  logic   border_o, blank_o, synh_o, synv_o;
  logic [18:0] sram_addr;
  word_t  sram_wdata, sram_rdata;
  logic   sram_ce_n, sram_oe_n, sram_we_n;

  int checks = 0, failures = 0;
  int n_results = 0, n_border = 0, n_ties = 0, n_hblank = 0, n_vblank = 0;
  int n_active_in = 0, n_synh_out = 0, n_frames_out = 0;
  int chosen [3][3];
  int ce_cycles = 0, rd_cycles = 0, wr_cycles = 0;
  longint n_cycles = 0;

  pixel_t img [FRAMES][H][W];

  typedef struct { logic b, h, v; int f, y, x; } smp_t;
  smp_t hist [$];

  nagamod_top #(.LINE_W(W), .LINES(H)) dut (.*);

  sram_model u_sram (
    .clk, .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n)
  );

  always #25 clk = ~clk;   // 20 MHz memory clock, 10 MHz pixel rate

  initial begin
    #(64'd200 * (64'(FRAMES) * 64'(FRAME_PERIODS) + 64'd40) + 64'd100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sum_t reference(int f, int y, int x, output int hc, output int vr, output bit tie);
    int best_e, best_s, mn, mx, sm, v;
    best_e = 1000; best_s = 0; hc = 0; vr = 0; tie = 0;
    for (int h = 2; h >= 0; h--)
      for (int vv = 0; vv < 3; vv++) begin
        mn = 255; mx = 0; sm = 0;
        for (int r = vv; r < vv + 3; r++)
          for (int c = h; c < h + 3; c++) begin
            v = int'(img[f][y - 4 + r][x - 4 + c]);
            if (v < mn) mn = v;
            if (v > mx) mx = v;
            sm += v;
          end
        if (mx - mn < best_e) begin
          best_e = mx - mn; best_s = sm; hc = h; vr = vv; tie = 0;
        end else if (mx - mn == best_e) tie = 1;
      end
    return sum_t'(best_s);
  endfunction

  // SRAM activity within the current pixel period
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (!sram_ce_n) ce_cycles++;
    if (!sram_ce_n && !sram_oe_n) rd_cycles++;
    if (!sram_ce_n && !sram_we_n) wr_cycles++;
  end

  // end of each pixel period: inputs are sampled now; outputs belong to
  // the sample taken two periods ago
  always @(posedge clk) if (rst_n && pix_clk_o) begin
    smp_t s1, s2;
    int hc, vr;
    bit tie;
    sum_t exp_v;
    hist.push_front('{blank, synh, synv, cur_f, cur_y, cur_x});
    if (hist.size() > 3) hist.pop_back();
    if (hist.size() == 3) begin
      s1 = hist[1]; s2 = hist[2];
      // memory activity of the period that ends now (sample s1 in process)
      checks++;
      if (s1.b ? (ce_cycles != 2 || rd_cycles != 1 || wr_cycles != 1)
               : (ce_cycles != 0)) begin
        failures++;
        if (failures < 10) $display("memory activity wrong: act=%0b ce=%0d rd=%0d wr=%0d",
                                    s1.b, ce_cycles, rd_cycles, wr_cycles);
      end
      if (!s1.b && s1.v) n_hblank++;
      if (!s1.b && !s1.v) n_vblank++;
      // regenerated timing
      checks++;
      if (blank_o != s2.b || synh_o != s2.h || synv_o != s2.v) begin
        failures++;
        if (failures < 10) $display("timing out wrong at frame %0d line %0d col %0d", s2.f, s2.y, s2.x);
      end
      if (!synh_o) n_synh_out++;
      if (s2.b) begin
        n_results++;
        checks++;
        if (border_o != !(s2.y >= 4 && s2.x >= 4)) begin
          failures++;
          if (failures < 10) $display("border flag wrong at line %0d col %0d", s2.y, s2.x);
        end
        if (s2.y >= 4 && s2.x >= 4) begin
          exp_v = reference(s2.f, s2.y, s2.x, hc, vr, tie);
          chosen[hc][vr]++;
          if (tie) n_ties++;
          checks++;
          if (pixel_out != exp_v) begin
            failures++;
            if (failures < 10) $display("frame %0d line %0d col %0d: got %0d expected %0d",
                                        s2.f, s2.y, s2.x, pixel_out, exp_v);
          end
        end else n_border++;
      end
    end
    ce_cycles = 0; rd_cycles = 0; wr_cycles = 0;
  end

  int cur_f = 0, cur_y = 0, cur_x = 0;

  // time between rising edges of the regenerated SYNV: one frame
  realtime t_synv = 0.0;
  int      n_frame_periods = 0;
  logic    synv_o_q = 1'b1;
  always @(posedge clk) begin
    synv_o_q <= synv_o;
    if (rst_n && synv_o && !synv_o_q) begin
      if (t_synv > 0.0) begin
        n_frame_periods++;
        checks++;
        // 100 ns per pixel period (10 MHz pixel rate)
        if ($realtime - t_synv != real'(FRAME_PERIODS) * 100.0) begin
          failures++;
          $display("frame period %0t, expected %0d pixel periods", $realtime - t_synv, FRAME_PERIODS);
        end
      end
      t_synv = $realtime;
    end
  end

  task automatic put(input pixel_t p, input bit b, input bit h, input bit v,
                     input int f, input int y, input int x);
    pixel_in <= p; blank <= b; synh <= h; synv <= v;
    cur_f <= f; cur_y <= y; cur_x <= x;
    if (b) n_active_in++;
    @(posedge clk iff pix_clk_o);
  endtask

  initial begin
    foreach (chosen[a, b]) chosen[a][b] = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          case (f % 3)
            0: img[f][y][x] = pixel_t'($urandom);
            1: img[f][y][x] = pixel_t'((((x / 5) + (y / 7)) % 2 != 0 ? 180 : 50) + $urandom_range(12));
            default: img[f][y][x] = pixel_t'(100 + $urandom_range(2));
          endcase
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff pix_clk_o);
    for (int f = 0; f < FRAMES; f++) begin
      repeat (VS) put('0, 0, 1, 0, f, 0, 0);      // frame blanking, SYNV low
      repeat (2) put('0, 0, 1, 1, f, 0, 0);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) put(img[f][y][x], 1, 1, 1, f, y, x);
        for (int k = 0; k < HBL; k++)               // line blanking, SYNH pulse
          put('0, 0, (y == H - 1 || k < 1 || k > HS) ? 1'b1 : 1'b0, 1, f, y, 0);
      end
    end
    repeat (4) put('0, 0, 1, 1, 0, 0, 0);

    $display("active pixels in %0d, results out %0d (%0d border), %0d decided among equal extents",
             n_active_in, n_results, n_border, n_ties);
    $display("frame period %0d pixel periods = %0.3f ms at a 10 MHz pixel rate (%0d measured)",
             FRAME_PERIODS, real'(FRAME_PERIODS) * 1.0e-4, n_frame_periods);
    $display("blanked periods: %0d line, %0d frame; SYNH pulses regenerated %0d; %0d clock cycles",
             n_hblank, n_vblank, n_synh_out, n_cycles);
    checks++;
    if (n_results != n_active_in) failures++;
    if (n_border == 0 || n_ties == 0 || n_hblank == 0 || n_vblank == 0 || n_synh_out == 0 || n_frame_periods == 0) failures++;
    foreach (chosen[a, b]) begin
      $display("sub-window columns +%0d lines +%0d chosen %0d times", a, b, chosen[a][b]);
      if (chosen[a][b] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
