// decim_harness: reusable stimulus and checker for one mr_decim_1d configuration.
//
// Streams frames of random samples into a mr_decim_1d instance as a raster: every line ("row")
// presents positions 0..DEPTH-1, each position being an independent 1-D signal along the rows.
// Each frame draws new random weights and a random number of rows, and random idle clocks are
// inserted between samples. The expected output is computed directly from the prototype
// filter, y[n] = sum_j a_j x[n-j] with x = 0 before the first row, kept only at rows n with
// n mod M == 0. The checker requires the result one clock after the phase-0 sample, at the
// right position, and no out_valid at any other time.
module decim_harness #(
  parameter int unsigned M      = 2,
  parameter int unsigned L      = 2,
  parameter int unsigned DEPTH  = 1,
  parameter int unsigned IN_W   = 9,
  parameter int unsigned COEF_W = 12,
  parameter int unsigned FRAMES = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   outputs_seen,
  output logic done
);

  localparam int unsigned N     = M * L;
  localparam int unsigned OUT_W = IN_W + COEF_W + $clog2(N);
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned PW    = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned MAXR  = 4 * N + 3;

  logic                     in_valid;
  logic signed [IN_W-1:0]   in_data;
  logic [AW-1:0]            in_pos;
  logic [PW-1:0]            in_phase;
  logic                     in_first;
  logic [N-1:0][COEF_W-1:0] coef;
  logic                     out_valid;
  logic signed [OUT_W-1:0]  out_data;
  logic [AW-1:0]            out_pos;

  mr_decim_1d #(.IN_W(IN_W), .COEF_W(COEF_W), .M(M), .L(L), .DEPTH(DEPTH)) dut (.*);

  longint x [DEPTH][MAXR];
  longint a [N];

  function automatic longint sext(input longint v, input int w);
    longint m = longint'(1) << (w - 1);
    return ((v & ((m << 1) - 1)) ^ m) - m;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t [M=%0d L=%0d D=%0d] %s", $time, M, L, DEPTH, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; outputs_seen = 0; done = 1'b0;
    in_valid = 1'b0; in_data = '0; in_pos = '0; in_phase = '0; in_first = 1'b0; coef = '0;
    @(posedge rst_n);
    for (int f = 0; f < int'(FRAMES); f++) begin
      automatic int rows = 1 + int'($urandom_range(MAXR - 1));
      for (int j = 0; j < int'(N); j++) begin
        // every few frames use extreme weights to exercise the full width
        if (f % 5 == 4) a[j] = (j % 2 == 0) ? -(longint'(1) << (COEF_W - 1)) : (longint'(1) << (COEF_W - 1)) - 1;
        else            a[j] = sext(longint'($urandom), COEF_W);
        coef[j] = COEF_W'(a[j]);
      end
      for (int p = 0; p < int'(DEPTH); p++)
        for (int n = 0; n < rows; n++)
          x[p][n] = (f % 5 == 4) ? ((p + n) % 2 == 0 ? -(longint'(1) << (IN_W - 1)) : (longint'(1) << (IN_W - 1)) - 1)
                                 : sext(longint'($urandom), IN_W);
      for (int n = 0; n < rows; n++) begin
        for (int p = 0; p < int'(DEPTH); p++) begin
          automatic int     ph = (int'(M) - n % int'(M)) % int'(M);
          automatic longint exp_v = 0;
          // random idle clocks
          while ($urandom_range(3) == 0) begin
            @(negedge clk);
            in_valid = 1'b0;
            @(posedge clk); #1;
            check(!out_valid, "out_valid while idle");
          end
          @(negedge clk);
          in_valid = 1'b1;
          in_data  = IN_W'(x[p][n]);
          in_pos   = AW'(p);
          in_phase = PW'(ph);
          in_first = (n == 0);
          for (int j = 0; j < int'(N); j++) if (n - j >= 0) exp_v += a[j] * x[p][n - j];
          @(posedge clk); #1;
          if (ph == 0) begin
            outputs_seen++;
            check(out_valid, $sformatf("no output after row %0d pos %0d", n, p));
            check(longint'(out_data) == exp_v,
                  $sformatf("row %0d pos %0d: got %0d expected %0d", n, p, out_data, exp_v));
            check(32'(out_pos) == p, "output position");
          end else begin
            check(!out_valid, $sformatf("unexpected output at phase %0d", ph));
          end
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    done = 1'b1;
  end

endmodule
