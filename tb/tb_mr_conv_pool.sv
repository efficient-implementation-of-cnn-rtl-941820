// tb_mr_conv_pool: end-to-end test of the multirate convolution + pooling layer at its default
// size (28x28 image, pooling stride 2, edge-filter weights -3.9, 0, 4, 0 in both directions).
//
// Reference model: the conventional layer, i.e. the full-rate 2-D convolution
//   c[n1][n2] = sum_i sum_j v_i h_j x[n1-i][n2-j]   (x = 0 outside the image)
// followed by keeping lines and columns 0, 2, 4, ... and then ReLU when enabled. The weights are
// written here as integers with 8 fraction bits (round(-3.9 * 256) = -998, 4 * 256 = 1024).
//
// Five frames are streamed: a synthetic digit-like stroke image, random images with ReLU on and
// off, a saturated image, and frames with random idle clocks between pixels, two of them back to
// back. Every output is checked for value, coordinates and its latency of exactly 3 clocks after
// the pixel that completes it; after each frame the feature-map memory is read back in full.
// The test also checks that results never come on two consecutive clocks and counts how often each mechanism occurred: ReLU
// clamping, ReLU bypass of a negative result, idle input clocks, zero-padded edge outputs,
// outputs that used the scan-line memories, back-to-back frames and frame_done pulses.
module tb_mr_conv_pool;
  localparam int W = 28, H = 28, OW = 14, OH = 14;
  localparam int OUT_W = 37;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    pix_valid, relu_en;
  logic [7:0]              pix;
  logic                    out_valid, out_clamped, frame_done;
  logic signed [OUT_W-1:0] out_data;
  logic [3:0]              out_row, out_col, fm_rrow, fm_rcol;
  logic [OUT_W-1:0]        fm_rdata;

  mr_conv_pool dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycle, s);
    end
  endtask

  // reference weights, index = tap
  longint hw [4] = '{-998, 0, 1024, 0};
  longint vw [4] = '{-998, 0, 1024, 0};

  int     img  [H][W];
  longint ref_map [OH][OW];

  typedef struct { int r; int c; longint v; longint due; bit relu; } exp_t;
  exp_t q [$];

  // mechanism counters
  int n_clamp = 0, n_bypass_neg = 0, n_idle = 0, n_edge = 0, n_linemem = 0, n_b2b = 0, n_done = 0;
  int n_frames = 0;

  function automatic longint conv_ref(input int n1, input int n2);
    longint s = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (n1 - i >= 0 && n2 - j >= 0) s += vw[i] * hw[j] * longint'(img[n1 - i][n2 - j]);
    return s;
  endfunction

  task automatic make_image(input int kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        case (kind)
          0: img[r][c] = ((r >= 5 && r <= 7 && c >= 6 && c <= 21) ||             // a "7"
                          (c >= 17 - (r - 7) / 2 && c <= 20 - (r - 7) / 2 && r > 7 && r < 24)) ? 230 : 12;
          1: img[r][c] = $urandom_range(255);
          default: img[r][c] = 255;
        endcase
  endtask

  // Stream one frame; gaps: insert random idle clocks
  task automatic send_frame(input int kind, input bit relu, input bit gaps);
    make_image(kind);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        if (gaps) while ($urandom_range(3) == 0) begin
          @(negedge clk); pix_valid = 1'b0; n_idle++;
        end
        @(negedge clk);
        pix_valid = 1'b1; pix = 8'(img[r][c]); relu_en = relu;
        if (r % 2 == 0 && c % 2 == 0) begin
          automatic exp_t e;
          automatic longint v = conv_ref(r, c);
          ref_map[r / 2][c / 2] = (relu && v < 0) ? 0 : v;
          e.r = r / 2; e.c = c / 2; e.v = v; e.due = cycle + 3; e.relu = relu;
          q.push_back(e);
        end
      end
    n_frames++;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        check(0, "unexpected output");
      end else begin
        automatic exp_t e = q.pop_front();
        automatic longint want = (e.relu && e.v < 0) ? 0 : e.v;
        check(int'(out_row) == e.r && int'(out_col) == e.c,
              $sformatf("coordinates (%0d,%0d) expected (%0d,%0d)", out_row, out_col, e.r, e.c));
        check(longint'(out_data) == want, $sformatf("(%0d,%0d) got %0d expected %0d", e.r, e.c, out_data, want));
        check(cycle == e.due, $sformatf("latency: at %0d due %0d", cycle, e.due));
        check(out_clamped == (e.relu && e.v < 0), "clamp flag");
        if (e.relu && e.v < 0) n_clamp++;
        if (!e.relu && e.v < 0) n_bypass_neg++;
        if (e.r == 0 || e.c == 0) n_edge++;
        if (e.r > 0) n_linemem++;
      end
    end
    if (rst_n && frame_done) n_done++;
  end

  // results come at most at half the pixel rate: never on two consecutive clocks
  logic ov_prev = 1'b0;
  int   n_out = 0;
  always @(posedge clk) begin
    ov_prev <= out_valid;
    if (out_valid) begin
      n_out++;
      check(!ov_prev, "outputs on consecutive clocks");
    end
  end

  task automatic drain_and_readback();
    @(negedge clk); pix_valid = 1'b0;
    repeat (6) @(negedge clk);
    check(q.size() == 0, "all outputs produced");
    for (int r = 0; r < OH; r++)
      for (int c = 0; c < OW; c++) begin
        @(negedge clk); fm_rrow = 4'(r); fm_rcol = 4'(c);
        @(posedge clk); #1;
        check(longint'($signed(fm_rdata)) == ref_map[r][c], $sformatf("feature map (%0d,%0d)", r, c));
      end
  endtask

  initial begin
    pix_valid = 1'b0; pix = '0; relu_en = 1'b1; fm_rrow = '0; fm_rcol = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    send_frame(0, 1'b1, 1'b0);             // digit-like image, ReLU on, full rate
    drain_and_readback();
    check(n_out == OH * OW, $sformatf("outputs per frame %0d", n_out));
    send_frame(1, 1'b0, 1'b1);             // random, ReLU off, idle gaps
    send_frame(1, 1'b1, 1'b0);             // back to back, ReLU on
    n_b2b++;
    drain_and_readback();
    send_frame(2, 1'b0, 1'b1);             // saturated image
    drain_and_readback();
    send_frame(1, 1'b1, 1'b1);             // random, ReLU on, gaps
    drain_and_readback();

    check(n_frames == 5 && n_done == 5, $sformatf("frame_done pulses %0d", n_done));
    check(n_clamp > 0, "ReLU clamping happened");
    check(n_bypass_neg > 0, "ReLU bypass of a negative value happened");
    check(n_idle > 0, "idle input clocks happened");
    check(n_edge > 0, "zero-padded edge outputs happened");
    check(n_linemem > 0, "scan-line memory outputs happened");
    check(n_b2b > 0, "back-to-back frames happened");
    $display("clamp=%0d bypass_neg=%0d idle=%0d edge=%0d linemem=%0d b2b=%0d done=%0d out=%0d",
             n_clamp, n_bypass_neg, n_idle, n_edge, n_linemem, n_b2b, n_done, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
