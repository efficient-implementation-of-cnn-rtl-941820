// line_mem: scan-line memory, one word per (decimated) column.
//
// A plain register array with one synchronous write port and one asynchronous read port. It is
// the storage behind the scan-line delays of the multirate filter: because the filter runs after
// the decimator, one line holds IMG_W/M words instead of IMG_W. A read of the address being
// written in the same cycle returns the old word, which is what a delay line needs (the word
// written now is read back one line later). With DEPTH = 1 it degenerates to a single register,
// which is how the horizontal filter uses it for its sample delays.
//
// Timing: wdata is stored at the rising clock edge when we is high; rdata follows raddr
// combinationally. The contents are not reset; the filter never uses a word before writing it.
// The interface and the array form are this design's choices.
module line_mem #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 14,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (we) assert (32'(waddr) < DEPTH) else $error("line_mem: write address %0d out of range", waddr);
  end

endmodule
