// relu_act: ReLU activation stage with a bypass.
//
// Registers a signed result and, when relu_en is high, replaces a negative value with zero
// (max(0, x)); with relu_en low the value passes unchanged, which exposes the bare filter
// output. A tag (for example the output pixel's coordinates) travels alongside.
// Because pooling here is pure decimation, applying ReLU before or after it gives the same
// result, so the stage sits after the decimating filter. Latency is one clock.
// The bypass input, the tag and the register are this design's choices.
module relu_act #(
  parameter int unsigned W     = 37,
  parameter int unsigned TAG_W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                relu_en,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  input  logic [TAG_W-1:0]    in_tag,
  output logic                out_valid,
  output logic signed [W-1:0] out_data,
  output logic [TAG_W-1:0]    out_tag,
  output logic                out_clamped   // this result was negative and was zeroed
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_data    <= '0;
      out_tag     <= '0;
      out_clamped <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_clamped <= relu_en && in_data[W-1];
        out_data    <= (relu_en && in_data[W-1]) ? '0 : in_data;
        out_tag     <= in_tag;
      end else begin
        out_clamped <= 1'b0;
      end
    end
  end

endmodule
