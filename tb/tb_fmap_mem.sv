// tb_fmap_mem: self-checking test of the feature-map memory.
// Writes a full 14x14 map in raster order with random gaps, checks the frame_done pulse, then
// reads every position back in random order with one clock of latency; repeats for two maps.
module tb_fmap_mem;
  localparam int unsigned DW = 37, OW = 14, OH = 14;
  localparam int unsigned CW = $clog2(OW), RW = $clog2(OH);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          we, frame_done;
  logic [RW-1:0] wrow, rrow;
  logic [CW-1:0] wcol, rcol;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] shadow [OH][OW];
  int checks = 0, failures = 0, dones = 0;

  fmap_mem #(.DW(DW), .OW(OW), .OH(OH)) dut (.*);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    we = 1'b0; wrow = '0; wcol = '0; wdata = '0; rrow = '0; rcol = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < OH; r++)
        for (int c = 0; c < OW; c++) begin
          while ($urandom_range(2) == 0) begin
            @(negedge clk); we = 1'b0;
            @(posedge clk); #1; check(!frame_done, "spurious frame_done");
          end
          @(negedge clk);
          we = 1'b1; wrow = RW'(r); wcol = CW'(c); wdata = {$urandom, $urandom};
          shadow[r][c] = wdata;
          @(posedge clk); #1;
          check(frame_done == (r == OH - 1 && c == OW - 1), "frame_done only after the last write");
          if (frame_done) dones++;
        end
      @(negedge clk); we = 1'b0;
      @(posedge clk); #1;
      check(!frame_done, "frame_done is a single pulse");
      for (int t = 0; t < 300; t++) begin
        automatic int r = $urandom_range(OH - 1);
        automatic int c = $urandom_range(OW - 1);
        @(negedge clk); rrow = RW'(r); rcol = CW'(c);
        @(posedge clk); #1;
        check(rdata == shadow[r][c], $sformatf("read (%0d,%0d)", r, c));
      end
    end
    check(dones == 2, "two frames done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
