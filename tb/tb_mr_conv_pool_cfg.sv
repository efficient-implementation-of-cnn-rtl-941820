// tb_mr_conv_pool_cfg: the layer at other sizes than its default, with random weights.
//   - 9x7 image, M = 3, L = 2 (6 taps per direction): odd sizes, incomplete last blocks
//   - 29x10 image, M = 2, L = 3: odd line length, three time-varying weights per direction
//   - 512x6 image, M = 2, L = 2: the long scan lines of high-resolution networks (256-word
//     scan-line memories)
// Each runs through conv_pool_harness, which compares with full-rate convolution + decimation.
module tb_mr_conv_pool_cfg;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, k0, c1, f1, k1, c2, f2, k2;
  logic d0, d1, d2;

  conv_pool_harness #(.IMG_W(9),   .IMG_H(7),  .M(3), .L(2), .FRAMES(4)) h0 (.clk, .rst_n, .checks(c0), .failures(f0), .clamps(k0), .done(d0));
  conv_pool_harness #(.IMG_W(29),  .IMG_H(10), .M(2), .L(3), .FRAMES(3)) h1 (.clk, .rst_n, .checks(c1), .failures(f1), .clamps(k1), .done(d1));
  conv_pool_harness #(.IMG_W(512), .IMG_H(6),  .M(2), .L(2), .FRAMES(2)) h2 (.clk, .rst_n, .checks(c2), .failures(f2), .clamps(k2), .done(d2));

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    if (k0 + k1 + k2 == 0) failures++;   // ReLU clamping must have happened somewhere
    $display("clamps: %0d %0d %0d", k0, k1, k2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
