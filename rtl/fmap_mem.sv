// fmap_mem: feature-map memory for the pooled output of the layer.
//
// Holds one OH x OW output map (14x14 for a 28x28 image pooled by 2), the store the next CNN
// layer reads. Pooling in front of the filter means this memory is a quarter of what a
// full-resolution map would need. Results are written as they are produced, at (wrow, wcol);
// a read returns the word at (rrow, rcol) one clock later. frame_done pulses in the cycle
// after the last position (OH-1, OW-1) has been written, so a consumer can start on the map.
// Row-major addressing, the registered read and the done pulse are this design's choices.
module fmap_mem #(
  parameter int unsigned DW = 37,
  parameter int unsigned OW = 14,
  parameter int unsigned OH = 14,
  localparam int unsigned CW = (OW > 1) ? $clog2(OW) : 1,
  localparam int unsigned RW = (OH > 1) ? $clog2(OH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [RW-1:0] wrow,
  input  logic [CW-1:0] wcol,
  input  logic [DW-1:0] wdata,
  input  logic [RW-1:0] rrow,
  input  logic [CW-1:0] rcol,
  output logic [DW-1:0] rdata,
  output logic          frame_done
);

  localparam int unsigned DEPTH = OW * OH;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] waddr, raddr;

  assign waddr = AW'(32'(wrow) * OW + 32'(wcol));
  assign raddr = AW'(32'(rrow) * OW + 32'(rcol));

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) frame_done <= 1'b0;
    else        frame_done <= we && (32'(wrow) == OH - 1) && (32'(wcol) == OW - 1);
  end

  always_ff @(posedge clk) begin
    if (we) assert (32'(wrow) < OH && 32'(wcol) < OW)
      else $error("fmap_mem: write to (%0d,%0d) outside the map", wrow, wcol);
  end

endmodule
