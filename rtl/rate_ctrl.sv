// rate_ctrl: raster-scan bookkeeping and polyphase phases for the multirate layer.
//
// Pixels arrive one per valid clock in raster order (left to right, top to bottom), IMG_W per
// line and IMG_H lines per frame. The filter downstream keeps every M-th output in both
// directions, at columns and lines 0, M, 2M, ... . Sample n of a line (or line n of a frame)
// belongs to block ceil(n/M) and has phase k = (M - n mod M) mod M, i.e. its distance from the
// block's last sample; block 0 is the lone sample n = 0. This module counts column and line,
// and tracks phase and block number in both directions without a divider: the phase counts
// down M-1 ... 0 and the block number steps when a phase-0 sample has passed.
//
// The outputs describe the pixel presented in the current cycle (combinational from the
// counters); the counters advance at the clock edge when in_valid is high. h_out marks a pixel
// that ends a horizontal block (the horizontal filter produces a result, at rate Fs/M) and
// pix_out one that also lies in a phase-0 line (a pooled output pixel is complete). This is the
// clock-enable form of the Fs -> Fs/M rate change; one clock drives the whole layer.
// The counters, their reset to the start of a frame and the port list are this design's choices.
module rate_ctrl #(
  parameter int unsigned IMG_W = 28,
  parameter int unsigned IMG_H = 28,
  parameter int unsigned M     = 2,
  localparam int unsigned CW   = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned RW   = (IMG_H > 1) ? $clog2(IMG_H) : 1,
  localparam int unsigned PW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic [CW-1:0] col,       // column of the current pixel
  output logic [RW-1:0] row,       // line of the current pixel
  output logic [PW-1:0] h_phase,   // horizontal phase k
  output logic [CW-1:0] h_blk,     // horizontal block = decimated column
  output logic          h_first,   // first horizontal block of the line
  output logic [PW-1:0] v_phase,   // vertical phase k
  output logic [RW-1:0] v_blk,     // vertical block = decimated line
  output logic          v_first,   // first vertical block of the frame
  output logic          h_out,     // valid pixel that ends a horizontal block
  output logic          pix_out,   // valid pixel that completes an output pixel
  output logic          eof        // valid pixel is the last of the frame
);

  localparam logic [PW-1:0] PH_TOP = PW'(M - 1);

  logic last_col, last_row;
  assign last_col = (32'(col) == IMG_W - 1);
  assign last_row = (32'(row) == IMG_H - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col     <= '0;
      row     <= '0;
      h_phase <= '0;
      h_blk   <= '0;
      v_phase <= '0;
      v_blk   <= '0;
    end else if (in_valid) begin
      if (last_col) begin
        col     <= '0;
        h_phase <= '0;
        h_blk   <= '0;
        if (last_row) begin
          row     <= '0;
          v_phase <= '0;
          v_blk   <= '0;
        end else begin
          row     <= row + 1'b1;
          v_phase <= (v_phase == '0) ? PH_TOP : v_phase - 1'b1;
          if (v_phase == '0) v_blk <= v_blk + 1'b1;
        end
      end else begin
        col     <= col + 1'b1;
        h_phase <= (h_phase == '0) ? PH_TOP : h_phase - 1'b1;
        if (h_phase == '0) h_blk <= h_blk + 1'b1;
      end
    end
  end

  assign h_first = (h_blk == '0);
  assign v_first = (v_blk == '0);
  assign h_out   = in_valid && (h_phase == '0);
  assign pix_out = h_out && (v_phase == '0);
  assign eof     = in_valid && last_col && last_row;

endmodule
