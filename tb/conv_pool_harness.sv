// conv_pool_harness: stimulus and checker for one mr_conv_pool configuration.
//
// Draws random weights (signed COEF_W bits) for both directions, streams FRAMES random images
// of IMG_W x IMG_H pixels with random idle clocks and alternating ReLU mode, and compares every
// result with the conventional layer: the full-rate separable convolution with zero samples
// outside the image, kept at lines and columns 0, M, 2M, ..., then ReLU when enabled.
// Results must arrive exactly 3 clocks after the pixel that completes them, at the right
// coordinates; each frame must yield ceil(IMG_W/M) x ceil(IMG_H/M) results and one frame_done.
module conv_pool_harness #(
  parameter int unsigned IMG_W  = 9,
  parameter int unsigned IMG_H  = 7,
  parameter int unsigned M      = 3,
  parameter int unsigned L      = 2,
  parameter int unsigned FRAMES = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   clamps,
  output logic done
);

  localparam int unsigned N      = M * L;
  localparam int unsigned COEF_W = 12;
  localparam int unsigned OW     = (IMG_W + M - 1) / M;
  localparam int unsigned OH     = (IMG_H + M - 1) / M;
  localparam int unsigned OUT_W  = 9 + 2 * (COEF_W + $clog2(N));
  localparam int unsigned OCW    = (OW > 1) ? $clog2(OW) : 1;
  localparam int unsigned ORW    = (OH > 1) ? $clog2(OH) : 1;

  // weights drawn once at start (they are parameters of the layer)
  function automatic logic [N-1:0][COEF_W-1:0] draw(input int seed);
    logic [N-1:0][COEF_W-1:0] v;
    for (int j = 0; j < int'(N); j++) v[j] = COEF_W'((seed * 7919 + j * 104729 + j * j * 31) % 4096);
    return v;
  endfunction
  localparam logic [N-1:0][COEF_W-1:0] HC = draw(3 + IMG_W);
  localparam logic [N-1:0][COEF_W-1:0] VC = draw(11 + IMG_H);

  logic                    pix_valid, relu_en, out_valid, out_clamped, frame_done;
  logic [7:0]              pix;
  logic signed [OUT_W-1:0] out_data;
  logic [ORW-1:0]          out_row, fm_rrow;
  logic [OCW-1:0]          out_col, fm_rcol;
  logic [OUT_W-1:0]        fm_rdata;

  mr_conv_pool #(.IMG_W(IMG_W), .IMG_H(IMG_H), .M(M), .L(L), .H_COEF(HC), .V_COEF(VC)) dut (.*);

  longint hw [N], vw [N];
  int     img [IMG_H][IMG_W];
  longint cycle = 0;
  int     n_out = 0, n_done = 0;

  typedef struct { int r; int c; longint v; longint due; } exp_t;
  exp_t q [$];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL [%0dx%0d M=%0d L=%0d] %s", IMG_W, IMG_H, M, L, s);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      if (q.size() == 0) check(0, "unexpected output");
      else begin
        automatic exp_t e = q.pop_front();
        check(int'(out_row) == e.r && int'(out_col) == e.c, "coordinates");
        check(longint'(out_data) == e.v, $sformatf("(%0d,%0d) got %0d expected %0d", e.r, e.c, out_data, e.v));
        check(cycle == e.due, "latency");
        if (out_clamped) clamps++;
      end
    end
    if (rst_n && frame_done) n_done++;
  end

  initial begin
    checks = 0; failures = 0; clamps = 0; done = 1'b0;
    pix_valid = 1'b0; pix = '0; relu_en = 1'b0; fm_rrow = '0; fm_rcol = '0;
    for (int j = 0; j < int'(N); j++) begin
      hw[j] = longint'($signed(HC[j]));
      vw[j] = longint'($signed(VC[j]));
    end
    @(posedge rst_n);
    for (int f = 0; f < int'(FRAMES); f++) begin
      automatic bit relu = f[0];
      for (int r = 0; r < int'(IMG_H); r++)
        for (int c = 0; c < int'(IMG_W); c++) img[r][c] = $urandom_range(255);
      for (int r = 0; r < int'(IMG_H); r++)
        for (int c = 0; c < int'(IMG_W); c++) begin
          while ($urandom_range(4) == 0) begin @(negedge clk); pix_valid = 1'b0; end
          @(negedge clk);
          pix_valid = 1'b1; pix = 8'(img[r][c]); relu_en = relu;
          if (r % int'(M) == 0 && c % int'(M) == 0) begin
            automatic exp_t e;
            automatic longint s = 0;
            for (int i = 0; i < int'(N); i++)
              for (int j = 0; j < int'(N); j++)
                if (r - i >= 0 && c - j >= 0) s += vw[i] * hw[j] * longint'(img[r - i][c - j]);
            e.r = r / int'(M); e.c = c / int'(M); e.v = (relu && s < 0) ? 0 : s; e.due = cycle + 3;
            q.push_back(e);
          end
        end
    end
    @(negedge clk); pix_valid = 1'b0;
    repeat (6) @(negedge clk);
    check(q.size() == 0, "all outputs produced");
    check(n_out == int'(FRAMES * OW * OH), $sformatf("output count %0d", n_out));
    check(n_done == int'(FRAMES), "frame_done per frame");
    done = 1'b1;
  end

endmodule
