// tb_mr_decim_1d: self-checking test of the time-varying-weight decimating filter.
//
// Three configurations run side by side through decim_harness: the layer's own (M = 2, L = 2)
// as a horizontal filter (DEPTH 1) and as a vertical filter over 5 columns, and a wider one
// (M = 3, L = 3, DEPTH 4) to exercise the generic regrouping of taps. Every result is compared
// with the full-rate FIR followed by decimation, and must appear one clock after the last
// sample of its block.
module tb_mr_decim_1d;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, o0, c1, f1, o1, c2, f2, o2;
  logic d0, d1, d2;
  int checks, failures;

  decim_harness #(.M(2), .L(2), .DEPTH(1)) h0 (.clk, .rst_n, .checks(c0), .failures(f0), .outputs_seen(o0), .done(d0));
  decim_harness #(.M(2), .L(2), .DEPTH(5), .IN_W(23)) h1 (.clk, .rst_n, .checks(c1), .failures(f1), .outputs_seen(o1), .done(d1));
  decim_harness #(.M(3), .L(3), .DEPTH(4)) h2 (.clk, .rst_n, .checks(c2), .failures(f2), .outputs_seen(o2), .done(d2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 3;
    failures = f0 + f1 + f2;
    if (o0 == 0) failures++;
    if (o1 == 0) failures++;
    if (o2 == 0) failures++;
    $display("outputs checked: %0d %0d %0d", o0, o1, o2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
