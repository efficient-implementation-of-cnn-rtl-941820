// tb_line_mem: self-checking test of the scan-line memory.
// Writes random words at random addresses, keeps a shadow copy, and checks every read,
// including read-during-write of the same address (must return the old word).
module tb_line_mem;
  localparam int unsigned WIDTH = 23;
  localparam int unsigned DEPTH = 14;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  bit               known  [DEPTH];
  int checks = 0, failures = 0, rdw = 0;

  line_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) known[i] = 0;
    // fill every word once
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = WIDTH'($urandom); shadow[i] = wdata; known[i] = 1;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we    = ($urandom_range(1) == 1);
      waddr = AW'($urandom_range(DEPTH - 1));
      raddr = ($urandom_range(3) == 0) ? waddr : AW'($urandom_range(DEPTH - 1));
      wdata = WIDTH'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin
        failures++;
        $display("FAIL addr %0d: got %h expected %h", raddr, rdata, shadow[raddr]);
      end
      if (we && raddr == waddr) rdw++;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    checks++;
    if (rdw == 0) failures++;
    $display("read-during-write cases: %0d", rdw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
