// mr_decim_1d: 1-D multirate decimating FIR with time-varying weights.
//
// It computes y[m] = sum_{j=0}^{N-1} a_j * x[M*m - j] (an order N-1 FIR followed by keeping every
// M-th output) without ever running the filter at the input rate. The N = M*L taps are split into
// L groups of M consecutive taps; group i is one time-varying weight
//     A_i = a_{iM} + a_{iM+1} z^-1 + ... + a_{iM+M-1} z^-(M-1),
// so that H(Z) = sum_i A_i Z^-i with Z = z^M. Input samples are collected into blocks of M (the
// decimator in front, i.e. a serial-to-parallel commutator); once per block, at the block's last
// sample, every time-varying weight is applied to the block and the L partial sums go through a
// transposed chain of L-1 delays Z^-1 that advance once per block. All arithmetic and every delay
// element therefore work at the block rate Fs/M.
//
// The same module serves both directions of the separable 2-D filter. DEPTH is the number of
// independent filter positions that share the arithmetic: DEPTH = 1 filters along a line
// (horizontal), DEPTH = (line length)/M filters down the columns (vertical), where each delay
// element becomes a scan-line memory of DEPTH words (line_mem) addressed by in_pos.
//
// Interface: in_phase is the sample's offset k before the end of its block (a block is the
// samples with phases M-1, M-2, ..., 0 in that order, and it ends at phase 0). in_first marks
// samples of the first block of a line/frame; older history is then read as zero (zero padding at
// the image edge; the first block may be a single phase-0 sample). Samples of phase k != 0 are
// only stored. At a phase-0 sample the output is registered: out_valid rises one clock later,
// with out_pos = in_pos. Results are exact: OUT_W = IN_W + COEF_W + clog2(N).
// The decomposition follows the document; the block-parallel evaluation, the transposed delay
// chain, the port protocol and the widths are this design's choices.
module mr_decim_1d #(
  parameter int unsigned IN_W   = 9,
  parameter int unsigned COEF_W = 12,
  parameter int unsigned M      = 2,
  parameter int unsigned L      = 2,
  parameter int unsigned DEPTH  = 1,
  localparam int unsigned N     = M * L,
  localparam int unsigned OUT_W = IN_W + COEF_W + $clog2(N),
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [IN_W-1:0]   in_data,
  input  logic [AW-1:0]            in_pos,
  input  logic [PW-1:0]            in_phase,
  input  logic                     in_first,
  input  logic [N-1:0][COEF_W-1:0] coef,      // coef[j] = a_j
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data,
  output logic [AW-1:0]            out_pos
);

  localparam int unsigned PROD_W = IN_W + COEF_W;

  logic blk_end;
  assign blk_end = in_valid && (in_phase == '0);

  // ---- decimator in front: the block of M samples, phase 0 is the current one -------------
  logic signed [IN_W-1:0] blk [M];
  assign blk[0] = in_data;

  for (genvar k = 1; k < M; k++) begin : g_phase
    logic [IN_W-1:0] rd;
    line_mem #(.WIDTH(IN_W), .DEPTH(DEPTH)) u_ph (
      .clk  (clk),
      .we   (in_valid && (32'(in_phase) == k)),
      .waddr(in_pos),
      .wdata(in_data),
      .raddr(in_pos),
      .rdata(rd)
    );
    assign blk[k] = in_first ? '0 : $signed(rd);
  end

  // ---- time-varying weights applied once per block -----------------------------------------
  logic signed [OUT_W-1:0] u [L];  // u[i] = A_i applied to the current block

  always_comb begin
    for (int i = 0; i < L; i++) begin
      u[i] = '0;
      for (int k = 0; k < M; k++) begin
        logic signed [PROD_W-1:0] p;
        p    = $signed(coef[i*M + k]) * blk[k];
        u[i] = u[i] + OUT_W'(p);
      end
    end
  end

  // ---- transposed chain of block-rate delays Z^-1 ------------------------------------------
  // t_old[i] is the partial sum stored for this position at the previous block (i = 1..L-1),
  // t_old[L] is zero. t_new[i] = u[i] + t_old[i+1]; t_new[0] is the filter output.
  logic signed [OUT_W-1:0] t_old [L+1];
  logic signed [OUT_W-1:0] t_new [L];

  assign t_old[L] = '0;
  always_comb begin
    for (int i = 0; i < L; i++) t_new[i] = u[i] + t_old[i+1];
  end

  for (genvar i = 1; i < L; i++) begin : g_delay
    logic [OUT_W-1:0] rd;
    line_mem #(.WIDTH(OUT_W), .DEPTH(DEPTH)) u_z (
      .clk  (clk),
      .we   (blk_end),
      .waddr(in_pos),
      .wdata(t_new[i]),
      .raddr(in_pos),
      .rdata(rd)
    );
    assign t_old[i] = in_first ? '0 : $signed(rd);
  end

  // ---- output register ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_pos   <= '0;
    end else begin
      out_valid <= blk_end;
      if (blk_end) begin
        out_data <= t_new[0];
        out_pos  <= in_pos;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      assert (32'(in_phase) < M) else $error("mr_decim_1d: phase %0d >= M", in_phase);
      assert (32'(in_pos) < DEPTH) else $error("mr_decim_1d: position %0d >= DEPTH", in_pos);
    end
  end

endmodule
