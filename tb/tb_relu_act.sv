// tb_relu_act: self-checking test of the ReLU stage.
// Random signed inputs with ReLU on and off; checks the one-clock latency, the clamping of
// negative values only when enabled, the clamp flag and the tag.
module tb_relu_act;
  localparam int unsigned W = 37;
  localparam int unsigned TAG_W = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic relu_en, in_valid, out_valid, out_clamped;
  logic signed [W-1:0] in_data, out_data;
  logic [TAG_W-1:0] in_tag, out_tag;
  int checks = 0, failures = 0, clamps = 0, passes_neg = 0;

  relu_act #(.W(W), .TAG_W(TAG_W)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    relu_en = 1'b0; in_valid = 1'b0; in_data = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      automatic longint v;
      automatic bit en, vld;
      @(negedge clk);
      en  = ($urandom_range(1) == 1);
      vld = ($urandom_range(4) != 0);
      v   = longint'({$urandom, $urandom}) >>> 27;   // signed 37-bit range
      relu_en = en; in_valid = vld; in_data = W'(v); in_tag = TAG_W'(t);
      @(posedge clk); #1;
      check(out_valid == vld, "valid latency");
      if (vld) begin
        check(longint'(out_data) == ((en && v < 0) ? 0 : v), $sformatf("data %0d en %0d got %0d", v, en, out_data));
        check(out_clamped == (en && v < 0), "clamp flag");
        check(out_tag == TAG_W'(t), "tag");
        if (en && v < 0) clamps++;
        if (!en && v < 0) passes_neg++;
      end
    end
    check(clamps > 0 && passes_neg > 0, "both modes seen");
    $display("clamped %0d, negative passed %0d", clamps, passes_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
