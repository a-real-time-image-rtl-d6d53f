// tb_nagamod_workloads -- runs the frame sizes the design is meant for:
// a 256x256 frame (the size of the inspection images used to assess the
// filter) on the design with its default parameters, and a 720x576 frame
// (conventional TV) on a copy configured for 720-pixel lines. Both run
// side by side from one 20 MHz clock; each result is checked against a
// direct evaluation of the filter and the PSNR between original and
// smoothed frame is reported.
module tb_nagamod_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  logic done_a, done_b;
  int   checks_a, failures_a, checks_b, failures_b;
  int   checks, failures;

  always #25 clk = ~clk;

  nagamod_env #(.W(256), .H(256), .LINE_W(512), .LINES(512)) u_256 (
    .clk, .rst_n, .done(done_a), .checks(checks_a), .failures(failures_a));

  nagamod_env #(.W(720), .H(576), .LINE_W(720), .LINES(576)) u_720 (
    .clk, .rst_n, .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    #(64'd100 * 64'd2 * (64'd720 * 64'd600 + 64'd100000));
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done_a && done_b);
    checks = checks_a + checks_b;
    failures = failures_a + failures_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
