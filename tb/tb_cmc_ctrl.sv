// tb_cmc_ctrl -- self-checking test of the memory controller sequencer.
//
// Each pixel period is two clock cycles. The testbench changes "act" once
// per period, at the period boundary, and checks that an active period
// is one read cycle (chip and output enable low) followed by one write
// cycle (chip and write enable low, step and pix_tick high), and that an
// inactive period leaves the memory deselected. It also counts reads and
// writes: exactly one of each per active period.
module tb_cmc_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, act = 1'b0;
  logic phase, pix_tick, word_ld, step, sram_ce_n, sram_oe_n, sram_we_n;
  int   checks = 0, failures = 0;
  int   n_act = 0, n_rd = 0, n_wr = 0, n_idle = 0;

  cmc_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input bit rd_cycle, input bit a);
    logic [5:0] got, exp;
    got = {pix_tick, word_ld, step, sram_ce_n, sram_oe_n, sram_we_n};
    if (rd_cycle) exp = {1'b0, a, 1'b0, !a, !a, 1'b1};
    else          exp = {1'b1, 1'b0, a, !a, 1'b1, !a};
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("cycle %s act=%0b: got %b expected %b", rd_cycle ? "read" : "write", a, got, exp);
    end
    if (!sram_ce_n && !sram_oe_n) n_rd++;
    if (!sram_ce_n && !sram_we_n) n_wr++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < 3000; p++) begin
      act = ($urandom_range(3) != 0);
      if (act) n_act++; else n_idle++;
      #1 expect_cycle(1'b1, act);
      @(posedge clk); #1;
      expect_cycle(1'b0, act);
      @(posedge clk);
    end
    checks++;
    if (n_rd != n_act || n_wr != n_act) begin
      failures++;
      $display("accesses: %0d reads, %0d writes for %0d active periods", n_rd, n_wr, n_act);
    end
    if (n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
