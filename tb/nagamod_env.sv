// nagamod_env -- simulation environment for one Nagamod design instance:
// a video source playing the synchronisation board, the external SRAM
// bank, and an output checker. It streams one W x H frame (dark
// background, bright rectangles, 10 % impulse noise: a synthetic
// inspection image) followed by a few lines of the next frame, checks every
// interior result against a direct evaluation of the filter (nine 3x3
// sub-windows, smallest extent, right column then upper window first on
// ties), checks the regenerated timing, and reports the PSNR between the
// original frame and the smoothed frame (sum / 9, rounded), with
// PSNR = 10 log10(255^2 / MSE) and MSE the mean squared difference over
// the pixels whose window lies inside the frame. Results are reported
// through done / checks / failures.
module nagamod_env #(
  parameter int W      = 256,
  parameter int H      = 256,
  parameter int LINE_W = 512,
  parameter int LINES  = 512
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import nagamod_pkg::*;

  pixel_t pixel_in = '0;
  logic   blank = 1'b0, synh = 1'b1, synv = 1'b1;
  logic   pix_clk_o;
  sum_t   pixel_out;
  logic   border_o, blank_o, synh_o, synv_o;
  logic [18:0] sram_addr;
  word_t  sram_wdata, sram_rdata;
  logic   sram_ce_n, sram_oe_n, sram_we_n;

  pixel_t img [H][W];
  int     cur_y = 0, cur_x = 0;
  real    sq_err = 0.0;
  int     n_err = 0;

  typedef struct { logic b, h, v; int y, x; } smp_t;
  smp_t hist [$];

  nagamod_top #(.LINE_W(LINE_W), .LINES(LINES)) dut (
    .clk, .rst_n, .pixel_in, .blank, .synh, .synv, .pix_clk_o,
    .pixel_out, .border_o, .blank_o, .synh_o, .synv_o,
    .sram_addr, .sram_wdata, .sram_rdata, .sram_ce_n, .sram_oe_n, .sram_we_n
  );

  sram_model u_sram (
    .clk, .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n)
  );

  function automatic int reference(int y, int x);
    int best_e, best_s, mn, mx, sm, v;
    best_e = 1000; best_s = 0;
    for (int h = 2; h >= 0; h--)
      for (int vv = 0; vv < 3; vv++) begin
        mn = 255; mx = 0; sm = 0;
        for (int r = vv; r < vv + 3; r++)
          for (int c = h; c < h + 3; c++) begin
            v = int'(img[y - 4 + r][x - 4 + c]);
            if (v < mn) mn = v;
            if (v > mx) mx = v;
            sm += v;
          end
        if (mx - mn < best_e) begin best_e = mx - mn; best_s = sm; end
      end
    return best_s;
  endfunction

  always @(posedge clk) if (rst_n && pix_clk_o) begin
    smp_t s2;
    int e, d;
    hist.push_front('{blank, synh, synv, cur_y, cur_x});
    if (hist.size() > 3) hist.pop_back();
    if (hist.size() == 3) begin
      s2 = hist[2];
      checks++;
      if (blank_o != s2.b || synh_o != s2.h || synv_o != s2.v) failures++;
      if (s2.b && s2.y < H) begin
        checks++;
        if (border_o != !(s2.y >= 4 && s2.x >= 4)) failures++;
        if (s2.y >= 4 && s2.x >= 4) begin
          e = reference(s2.y, s2.x);
          checks++;
          if (int'(pixel_out) != e) begin
            failures++;
            if (failures < 10) $display("%0dx%0d line %0d col %0d: got %0d expected %0d",
                                        W, H, s2.y, s2.x, pixel_out, e);
          end
          d = (int'(pixel_out) + 4) / 9 - int'(img[s2.y - 2][s2.x - 2]);
          sq_err += real'(d * d);
          n_err++;
        end
      end
    end
  end

  task automatic put(input pixel_t p, input bit b, input bit h, input bit v, input int y, input int x);
    pixel_in <= p; blank <= b; synh <= h; synv <= v; cur_y <= y; cur_x <= x;
    @(posedge clk iff pix_clk_o);
  endtask

  initial begin
    bit bright;
    done = 1'b0; checks = 0; failures = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bright = (x > W / 5 && x < 3 * W / 5 && y > H / 4 && y < 3 * H / 4) ||
                 (x > 2 * W / 3 && x < 9 * W / 10 && y > H / 8 && y < H / 2);
        img[y][x] = pixel_t'((bright ? 190 : 50) + $urandom_range(10));
        if ($urandom_range(9) == 0) img[y][x] = pixel_t'($urandom);
      end
    @(posedge rst_n);
    @(posedge clk iff pix_clk_o);
    repeat (4) put('0, 0, 1, 0, 0, 0);
    repeat (2) put('0, 0, 1, 1, 0, 0);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) put(img[y][x], 1, 1, 1, y, x);
      put('0, 0, 1, 1, y, 0);
      if (y != H - 1) put('0, 0, 0, 1, y, 0);
      put('0, 0, 1, 1, y, 0);
    end
    // frame blanking, then the first lines of the next frame (not checked)
    repeat (4) put('0, 0, 1, 0, 0, 0);
    repeat (2) put('0, 0, 1, 1, 0, 0);
    for (int y = 0; y < 2; y++) begin
      for (int x = 0; x < W; x++) put(pixel_t'($urandom), 1, 1, 1, H, x);
      put('0, 0, 1, 1, H, 0);
      put('0, 0, 0, 1, H, 0);
      put('0, 0, 1, 1, H, 0);
    end
    if (n_err == 0) failures++;
    else $display("%0dx%0d frame: %0d interior pixels checked, PSNR original vs smoothed %0.2f dB",
                  W, H, n_err, 10.0 * $log10(255.0 * 255.0 / (sq_err / real'(n_err) + 1.0e-9)));
    done = 1'b1;
  end
endmodule
