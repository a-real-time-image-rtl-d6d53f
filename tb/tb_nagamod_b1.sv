// tb_nagamod_b1 -- self-checking test of the B1 component.
//
// Drives random pixel triples with a random enable. The testbench keeps
// its own copy of the last three enabled columns (initially zero, as after
// reset) and checks, every cycle, that extent equals the maximum minus the
// minimum of the nine pixels and sum their total, including the cycles
// where en is low and the block must hold its columns.
module tb_nagamod_b1;
  import nagamod_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  pixel_t i1 = '0, i2 = '0, i3 = '0;
  pixel_t extent;
  sum_t   sum;
  int     checks = 0, failures = 0;

  pixel_t hist [2][3];   // [0] previous column, [1] two columns back

  nagamod_b1 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int mn, mx, sm;
    pixel_t px [9];
    px = '{i1, i2, i3, hist[0][0], hist[0][1], hist[0][2],
           hist[1][0], hist[1][1], hist[1][2]};
    mn = 255; mx = 0; sm = 0;
    foreach (px[k]) begin
      if (px[k] < mn) mn = px[k];
      if (px[k] > mx) mx = px[k];
      sm += px[k];
    end
    checks++;
    if (extent != pixel_t'(mx - mn) || sum != sum_t'(sm)) begin
      failures++;
      if (failures < 10)
        $display("B1 mismatch: got ext=%0d sum=%0d, expected ext=%0d sum=%0d",
                 extent, sum, mx - mn, sm);
    end
  endtask

  initial begin
    foreach (hist[a, b]) hist[a][b] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      if (n < 1000) begin
        i1 = pixel_t'($urandom); i2 = pixel_t'($urandom); i3 = pixel_t'($urandom);
      end else begin
        // extremes: saturating values reach the full 12-bit sum
        i1 = $urandom_range(1) ? 8'hFF : 8'h00;
        i2 = $urandom_range(3) ? 8'hFF : pixel_t'($urandom);
        i3 = $urandom_range(3) ? 8'hFF : 8'h00;
      end
      #1 check_now();
      @(posedge clk);
      if (en) begin
        hist[1] = hist[0];
        hist[0] = '{i1, i2, i3};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
