// mr_conv_pool: first CNN stage (convolution + pooling + ReLU) built as a 2-D multirate
// decimating filter.
//
// A separable kernel H(z1, z) = H(z1) H(z) of order N = M*L per direction, followed by pooling
// with stride M in both directions, is the same system as a 2-D decimating filter. Moving the
// decimator in front of the filter and regrouping each direction's taps into L time-varying
// weights (groups of M taps) lets all arithmetic run at the decimated rate: the horizontal
// filter works once per M pixels (Fs/M, e.g. 13.5 MHz for a 27 MHz pixel clock), the vertical
// filter stores scan lines of IMG_W/M words instead of IMG_W and computes only on every M-th
// line, and the output map is (IMG_W/M) x (IMG_H/M). The result equals convolving at full
// rate and then keeping every M-th sample in each direction.
//
// Data path (one clock, enables derived from the raster position):
//   pixel --> mr_decim_1d (horizontal, DEPTH 1) --> mr_decim_1d (vertical, DEPTH IMG_W/M,
//   scan-line memories) --> relu_act --> out_* and fmap_mem.
// rate_ctrl supplies column/line phases and block numbers. The vertical filter's position is
// the horizontal block number, registered for one clock to line up with the horizontal result.
//
// Interface: pix/pix_valid carry unsigned pixels in raster order, any number of idle clocks
// allowed between them; the first pixel after reset is (0,0). Samples before the image edges
// are zero. For each pixel at line M*r and column M*c, out_valid is high 3 clocks later with the
// exact result for output (r, c) in out_data (fraction bits: twice the weight fraction bits),
// after ReLU when relu_en is high. The same values are written into the feature-map memory,
// readable through fm_rrow/fm_rcol with one clock of latency; frame_done pulses once a whole
// map is stored. Weights are parameters, element j of H_COEF/V_COEF being tap a_j/a_1j.
// The defaults are the edge-filter example: M = 2, L = 2, weights {-3.9, 0, 4, 0} in both
// directions, 28x28 input. Pixel and weight formats, the stream interface, latency and the
// feature-map port are this design's choices.
module mr_conv_pool
#(
  parameter int unsigned IMG_W   = mr_pkg::IMG_W,
  parameter int unsigned IMG_H   = mr_pkg::IMG_H,
  parameter int unsigned M       = mr_pkg::POOL_M,
  parameter int unsigned L       = mr_pkg::TV_L,
  parameter int unsigned PIX_W   = mr_pkg::PIX_W,
  parameter int unsigned COEF_W  = mr_pkg::COEF_W,
  parameter logic [M*L-1:0][COEF_W-1:0] H_COEF = mr_pkg::H_COEF_EDGE,
  parameter logic [M*L-1:0][COEF_W-1:0] V_COEF = mr_pkg::V_COEF_EDGE,
  localparam int unsigned N      = M * L,
  localparam int unsigned OW     = (IMG_W + M - 1) / M,
  localparam int unsigned OH     = (IMG_H + M - 1) / M,
  localparam int unsigned HIN_W  = PIX_W + 1,
  localparam int unsigned HOUT_W = HIN_W + COEF_W + $clog2(N),
  localparam int unsigned OUT_W  = HOUT_W + COEF_W + $clog2(N),
  localparam int unsigned OCW    = (OW > 1) ? $clog2(OW) : 1,
  localparam int unsigned ORW    = (OH > 1) ? $clog2(OH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  input  logic [PIX_W-1:0]        pix,
  input  logic                    relu_en,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  output logic [ORW-1:0]          out_row,
  output logic [OCW-1:0]          out_col,
  output logic                    out_clamped,
  output logic                    frame_done,
  input  logic [ORW-1:0]          fm_rrow,
  input  logic [OCW-1:0]          fm_rcol,
  output logic [OUT_W-1:0]        fm_rdata
);

  localparam int unsigned CW = (IMG_W > 1) ? $clog2(IMG_W) : 1;
  localparam int unsigned RW = (IMG_H > 1) ? $clog2(IMG_H) : 1;
  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;

  // ---- raster position and phases ---------------------------------------------------------
  logic [CW-1:0] col, h_blk;
  logic [RW-1:0] row, v_blk;
  logic [PW-1:0] h_phase, v_phase;
  logic          h_first, v_first, h_out, pix_out, eof;

  rate_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H), .M(M)) u_rate (
    .clk, .rst_n,
    .in_valid(pix_valid),
    .col, .row, .h_phase, .h_blk, .h_first, .v_phase, .v_blk, .v_first,
    .h_out, .pix_out, .eof
  );

  // ---- horizontal multirate filter H(Z), Z = z^M --------------------------------------------
  logic                     hf_valid;
  logic signed [HOUT_W-1:0] hf_data;
  logic [0:0]               hf_pos;

  mr_decim_1d #(.IN_W(HIN_W), .COEF_W(COEF_W), .M(M), .L(L), .DEPTH(1)) u_hfilt (
    .clk, .rst_n,
    .in_valid (pix_valid),
    .in_data  ($signed({1'b0, pix})),
    .in_pos   (1'b0),
    .in_phase (h_phase),
    .in_first (h_first),
    .coef     (H_COEF),
    .out_valid(hf_valid),
    .out_data (hf_data),
    .out_pos  (hf_pos)
  );

  // Vertical position/phase of the block the horizontal filter is finishing.
  logic [OCW-1:0] vq_pos;
  logic [PW-1:0]  vq_phase;
  logic           vq_first;
  logic [ORW-1:0] vq_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vq_pos   <= '0;
      vq_phase <= '0;
      vq_first <= 1'b0;
      vq_row   <= '0;
    end else if (h_out) begin
      vq_pos   <= OCW'(h_blk);
      vq_phase <= v_phase;
      vq_first <= v_first;
      vq_row   <= ORW'(v_blk);
    end
  end

  // ---- vertical multirate filter H(Z1), Z1 = z1^M, scan lines of OW words -------------------
  logic                    vf_valid;
  logic signed [OUT_W-1:0] vf_data;
  logic [OCW-1:0]          vf_col;
  logic [ORW-1:0]          vf_row;

  mr_decim_1d #(.IN_W(HOUT_W), .COEF_W(COEF_W), .M(M), .L(L), .DEPTH(OW)) u_vfilt (
    .clk, .rst_n,
    .in_valid (hf_valid),
    .in_data  (hf_data),
    .in_pos   (vq_pos),
    .in_phase (vq_phase),
    .in_first (vq_first),
    .coef     (V_COEF),
    .out_valid(vf_valid),
    .out_data (vf_data),
    .out_pos  (vf_col)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          vf_row <= '0;
    else if (hf_valid && vq_phase == '0) vf_row <= vq_row;
  end

  // ---- activation ----------------------------------------------------------------------------
  relu_act #(.W(OUT_W), .TAG_W(ORW + OCW)) u_relu (
    .clk, .rst_n,
    .relu_en,
    .in_valid   (vf_valid),
    .in_data    (vf_data),
    .in_tag     ({vf_row, vf_col}),
    .out_valid  (out_valid),
    .out_data   (out_data),
    .out_tag    ({out_row, out_col}),
    .out_clamped(out_clamped)
  );

  // ---- feature-map store -------------------------------------------------------------------
  fmap_mem #(.DW(OUT_W), .OW(OW), .OH(OH)) u_fmap (
    .clk, .rst_n,
    .we   (out_valid),
    .wrow (out_row),
    .wcol (out_col),
    .wdata(out_data),
    .rrow (fm_rrow),
    .rcol (fm_rcol),
    .rdata(fm_rdata),
    .frame_done
  );

endmodule
