// tb_rate_ctrl: self-checking test of the raster and phase bookkeeping.
// Two instances (28x28 with M = 2, and 7x5 with M = 3) receive pixels with random idle clocks
// for several frames. For every pixel the test derives column, line, phases
// k = (M - n mod M) mod M and block numbers ceil(n/M) arithmetically and compares; it also
// counts horizontal block ends, completed output pixels and end-of-frame marks per frame.
module tb_rate_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // instance A: 28x28, M = 2
  logic a_valid;
  logic [4:0] a_col, a_row, a_hblk, a_vblk;
  logic [0:0] a_hph, a_vph;
  logic a_hfirst, a_vfirst, a_hout, a_pout, a_eof;
  rate_ctrl #(.IMG_W(28), .IMG_H(28), .M(2)) ua (
    .clk, .rst_n, .in_valid(a_valid), .col(a_col), .row(a_row), .h_phase(a_hph), .h_blk(a_hblk),
    .h_first(a_hfirst), .v_phase(a_vph), .v_blk(a_vblk), .v_first(a_vfirst), .h_out(a_hout),
    .pix_out(a_pout), .eof(a_eof));

  // instance B: 7x5, M = 3
  logic b_valid;
  logic [2:0] b_col, b_row, b_hblk, b_vblk;
  logic [1:0] b_hph, b_vph;
  logic b_hfirst, b_vfirst, b_hout, b_pout, b_eof;
  rate_ctrl #(.IMG_W(7), .IMG_H(5), .M(3)) ub (
    .clk, .rst_n, .in_valid(b_valid), .col(b_col), .row(b_row), .h_phase(b_hph), .h_blk(b_hblk),
    .h_first(b_hfirst), .v_phase(b_vph), .v_blk(b_vblk), .v_first(b_vfirst), .h_out(b_hout),
    .pix_out(b_pout), .eof(b_eof));

  function automatic int ph(input int n, input int m);
    return (m - n % m) % m;
  endfunction
  function automatic int blk(input int n, input int m);
    return (n + m - 1) / m;
  endfunction

  initial begin
    a_valid = 1'b0; b_valid = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // A: 3 frames
    for (int f = 0; f < 3; f++) begin
      automatic int hcount = 0, pcount = 0, ecount = 0;
      for (int r = 0; r < 28; r++)
        for (int c = 0; c < 28; c++) begin
          while ($urandom_range(3) == 0) begin
            @(negedge clk); a_valid = 1'b0; #1;
            check(!a_hout && !a_pout && !a_eof, "A strobes while idle");
          end
          @(negedge clk); a_valid = 1'b1; #1;
          check(a_col == 5'(c) && a_row == 5'(r), $sformatf("A position (%0d,%0d)", r, c));
          check(int'(a_hph) == ph(c, 2) && int'(a_vph) == ph(r, 2), "A phases");
          check(int'(a_hblk) == blk(c, 2) && int'(a_vblk) == blk(r, 2), "A blocks");
          check(a_hfirst == (c == 0) && a_vfirst == (r == 0), "A first flags");
          check(a_hout == (c % 2 == 0), "A h_out");
          check(a_pout == (c % 2 == 0 && r % 2 == 0), "A pix_out");
          check(a_eof == (r == 27 && c == 27), "A eof");
          hcount += int'(a_hout); pcount += int'(a_pout); ecount += int'(a_eof);
        end
      check(hcount == 28 * 14 && pcount == 14 * 14 && ecount == 1, "A per-frame counts");
    end
    @(negedge clk); a_valid = 1'b0;
    // B: 2 frames
    for (int f = 0; f < 2; f++) begin
      automatic int pcount = 0;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 7; c++) begin
          @(negedge clk); b_valid = ($urandom_range(2) != 0);
          while (!b_valid) begin
            #1; check(!b_hout, "B h_out while idle");
            @(negedge clk); b_valid = ($urandom_range(2) != 0);
          end
          #1;
          check(int'(b_col) == c && int'(b_row) == r, "B position");
          check(int'(b_hph) == ph(c, 3) && int'(b_vph) == ph(r, 3), "B phases");
          check(int'(b_hblk) == blk(c, 3) && int'(b_vblk) == blk(r, 3), "B blocks");
          check(b_pout == (c % 3 == 0 && r % 3 == 0), "B pix_out");
          pcount += int'(b_pout);
        end
      check(pcount == 3 * 2, "B outputs per frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
