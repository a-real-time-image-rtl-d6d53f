// tb_io_interface -- self-checking test of the video I/O interface.
//
// Generates a few small video frames with line blanking (Blank low, one
// SYNH pulse) and frame blanking (Blank and SYNV low), two clock cycles per
// pixel period, and plays the column counter and the filter result. It
// checks that each pixel and its Blank are handed on one period after they
// were presented, that Blank, SYNH and SYNV come back two periods late,
// that the border flag marks exactly the results whose window reaches
// above line 4 or left of column 4 of the frame, and that the filter's sum
// is passed to the output.
module tb_io_interface;
  import nagamod_pkg::*;

  localparam int W = 12, H = 9, FRAMES = 3;

  logic   clk = 1'b0, rst_n = 1'b0, pix_tick, step;
  pixel_t pixel_in = '0, pix;
  logic   blank = 1'b0, synh = 1'b1, synv = 1'b1, act;
  logic [8:0] col = '0;
  sum_t   res_sum = '0, pixel_out;
  logic   border_o, blank_o, synh_o, synv_o;
  logic   phase = 1'b0;
  int     checks = 0, failures = 0;
  int     n_border = 0, n_inner = 0;

  typedef struct { pixel_t p; logic b, h, v; int y, x; } smp_t;
  smp_t hist [$];

  io_interface dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) phase <= rst_n ? ~phase : 1'b0;
  assign pix_tick = phase;
  assign step = phase & act;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: at the end of every pixel period
  always @(posedge clk) if (rst_n && pix_tick) begin
    smp_t s0, s1, s2;
    hist.push_front('{pixel_in, blank, synh, synv, 0, 0});
    if (hist.size() > 3) begin
      s1 = hist[1]; s2 = hist[2];
      checks++;
      if (act != s1.b || (s1.b && pix != s1.p)) begin
        failures++; $display("sampled pixel wrong");
      end
      checks++;
      if (blank_o != s2.b || synh_o != s2.h || synv_o != s2.v) begin
        failures++; $display("regenerated sync wrong");
      end
    end
  end

  int y_cnt = 0;

  // the sample in process: column counter and border flag
  always @(posedge clk) if (rst_n && step) begin
    int y, x;
    y = cur_y; x = cur_x;
    col <= col + 1;
    res_sum <= sum_t'($urandom);
    @(posedge clk); #1;
    checks++;
    if (border_o != !(y >= 4 && x >= 4) || pixel_out != res_sum) begin
      failures++;
      if (failures < 10) $display("border/result wrong at line %0d col %0d", y, x);
    end
    if (border_o) n_border++; else n_inner++;
  end
  always @(posedge clk) if (pix_tick && !act) col <= '0;

  int cur_y, cur_x, drv_y, drv_x;
  always @(posedge clk) if (pix_tick) begin
    cur_y <= drv_y; cur_x <= drv_x;
  end

  task automatic put(input pixel_t p, input bit b, input bit h, input bit v, input int y, input int x);
    pixel_in <= p; blank <= b; synh <= h; synv <= v; drv_y <= y; drv_x <= x;
    @(posedge clk iff pix_tick);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff pix_tick);
    for (int f = 0; f < FRAMES; f++) begin
      repeat (5) put('0, 0, 1, 0, 0, 0);          // frame blanking, SYNV low
      repeat (2) put('0, 0, 1, 1, 0, 0);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) put(pixel_t'($urandom), 1, 1, 1, y, x);
        put('0, 0, 1, 1, 0, 0);
        if (y != H - 1) put('0, 0, 0, 1, 0, 0);   // SYNH pulse between lines
        put('0, 0, 1, 1, 0, 0);
      end
    end
    repeat (4) put('0, 0, 1, 1, 0, 0);
    if (n_border != FRAMES * (W * H - (W - 4) * (H - 4)) || n_inner != FRAMES * (W - 4) * (H - 4)) begin
      failures++;
      $display("border count %0d interior count %0d", n_border, n_inner);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
