// tb_cmc_datapath -- self-checking test of the line-buffer data path.
//
// The testbench plays the controller (one read cycle, then one write
// cycle per pixel period) and the SRAM (an array, read combinationally,
// written at the end of a write cycle). It streams lines of random pixels
// with blanking periods of random length between them and checks, for
// every active pixel, that the address is the column number, that the
// five-pixel column handed to the filter is the current pixel and the
// pixels of the four lines above at the same column (zero above the first
// lines, the memory starting cleared), and that the word written back is
// the rearranged one. Lines fill the whole buffer (LINE_W pixels).
module tb_cmc_datapath;
  import nagamod_pkg::*;

  localparam int unsigned LW = 32;
  localparam int unsigned AW = 8;
  localparam int unsigned NLINES = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_tick = 1'b0, act = 1'b0, word_ld = 1'b0, step = 1'b0;
  pixel_t pix = '0;
  word_t  sram_rdata, sram_wdata;
  logic [AW-1:0] sram_addr;
  col5_t  col5;
  logic [$clog2(LW)-1:0] col;
  int checks = 0, failures = 0, blank_periods = 0;

  word_t  mem [2**AW];
  pixel_t img [NLINES][LW];

  cmc_datapath #(.LINE_W(LW), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;
  assign sram_rdata = mem[sram_addr];
  always @(posedge clk) if (step) mem[sram_addr] <= sram_wdata;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t above(int y, int x, int k);
    return (y - k >= 0) ? img[y - k][x] : '0;
  endfunction

  task automatic period(input bit a, input pixel_t p);
    act = a; pix = p;
    word_ld = a; step = 1'b0; pix_tick = 1'b0;
    @(posedge clk); #1;
    word_ld = 1'b0; step = a; pix_tick = 1'b1;
    @(posedge clk); #1;
  endtask

  initial begin
    foreach (mem[i]) mem[i] = '0;
    foreach (img[a, b]) img[a][b] = pixel_t'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int y = 0; y < NLINES; y++) begin
      for (int x = 0; x < int'(LW); x++) begin
        act = 1'b1; pix = img[y][x];
        word_ld = 1'b1; step = 1'b0; pix_tick = 1'b0;
        @(posedge clk); #1;
        word_ld = 1'b0; step = 1'b1; pix_tick = 1'b1;
        #1;
        checks++;
        if (sram_addr != AW'(x) || col != $bits(col)'(x) ||
            col5 != {img[y][x], above(y, x, 1), above(y, x, 2), above(y, x, 3), above(y, x, 4)} ||
            sram_wdata != {img[y][x], above(y, x, 1), above(y, x, 2), above(y, x, 3)}) begin
          failures++;
          if (failures < 10)
            $display("line %0d col %0d: addr=%0d col5=%h wdata=%h", y, x, sram_addr, col5, sram_wdata);
        end
        @(posedge clk); #1;
      end
      repeat ($urandom_range(1, 4)) begin
        period(1'b0, pixel_t'($urandom));
        blank_periods++;
        checks++;
        if (col != '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
