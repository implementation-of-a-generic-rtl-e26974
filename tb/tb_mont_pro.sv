// tb_mont_pro: 256-bit Montgomery products on random odd moduli. A result is
// accepted when Pn < n and Pn * 2^256 = a * b (mod n), checked with the
// simulator's wide modulo; ni is found by Newton iteration in the testbench.
// Also radices r = 2^k below 2^256 (set by mr). Checks the 3-cycle occupancy (done two edges after the load edge), back-to-back loads, and the 1-cycle direct
// product.
module tb_mont_pro;
  localparam int unsigned W = 256;

  logic           clk = 1'b0, rst_n = 1'b0, load = 1'b0, direct = 1'b0;
  logic [W-1:0]   a, b, n, ni, mr, Pn;
  logic [2*W-1:0] prod;
  logic           done;
  int checks = 0, failures = 0;

  mont_pro dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // -n^-1 mod 2^W for odd n: x <- x*(2 - n*x) doubles the correct bits.
  function automatic logic [W-1:0] neg_inv(input logic [W-1:0] nn);
    logic [W-1:0] xi = nn;
    for (int i = 0; i < 9; i++) xi = xi * (W'(2) - nn * xi);
    return -xi;
  endfunction

  function automatic bit ok(input logic [W-1:0] aa, input logic [W-1:0] bb,
                            input logic [W-1:0] nn, input logic [W-1:0] pp);
    logic [3*W-1:0] lhs, rhs;
    lhs = ({{2*W{1'b0}}, pp} << W) % {{2*W{1'b0}}, nn};
    rhs = ({{2*W{1'b0}}, aa} * {{2*W{1'b0}}, bb}) % {{2*W{1'b0}}, nn};
    return pp < nn && lhs == rhs;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mr = '1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      logic [W-1:0] aa, bb, nn;
      int cyc;
      cyc = 0;
      nn = rnd() | W'(1);
      if (i == 0) nn = '1;
      if (i == 1) nn = W'(120'haf2621d242a00eca3958394623a043);
      aa = rnd() % nn; bb = rnd() % nn;
      if (i == 2) begin aa = nn - 1; bb = nn - 1; end
      a <= aa; b <= bb; n <= nn; ni <= neg_inv(nn); load <= 1'b1;
      @(posedge clk);
      load <= 1'b0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 20);
      checks++;
      if (!ok(aa, bb, nn, Pn)) begin
        failures++; $display("FAIL MonPro(%h, %h) mod %h = %h", aa, bb, nn, Pn);
      end
      checks++;
      if (cyc != 2) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    // Back to back: a new load in the cycle done is high.
    begin
      logic [W-1:0] nn, aa, bb;
      int cyc;
      cyc = 0;
      nn = rnd() | W'(1); aa = rnd() % nn; bb = rnd() % nn;
      n <= nn; ni <= neg_inv(nn); a <= aa; b <= bb; load <= 1'b1;
      @(posedge clk);
      load <= 1'b0;
      do begin @(posedge clk); #1; cyc++; end while (!done);
      a <= Pn; b <= Pn; load <= 1'b1;
      aa = Pn;
      @(posedge clk);
      load <= 1'b0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 20);
      checks++;
      if (!ok(aa, aa, nn, Pn) || cyc != 2) begin failures++; $display("FAIL back to back"); end
    end
    // Smaller radices r = 2^k, k = bit length of mr.
    for (int i = 0; i < 30; i++) begin
      logic [W-1:0] aa, bb, nn;
      logic [3*W-1:0] lhs, rhs;
      int k, cyc;
      k = 2 + ($urandom % (W - 1));
      nn = (rnd() >> (W - k + 1)) | W'(1);
      aa = rnd() % nn; bb = rnd() % nn;
      mr <= (W'(1) << k) - 1;
      a <= aa; b <= bb; n <= nn; ni <= neg_inv(nn); load <= 1'b1;
      @(posedge clk);
      load <= 1'b0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 20);
      lhs = ({{2*W{1'b0}}, Pn} << k) % {{2*W{1'b0}}, nn};
      rhs = ({{2*W{1'b0}}, aa} * {{2*W{1'b0}}, bb}) % {{2*W{1'b0}}, nn};
      checks++;
      if (!(Pn < nn && lhs == rhs)) begin
        failures++; $display("FAIL radix 2^%0d: MonPro(%h, %h) mod %h = %h", k, aa, bb, nn, Pn);
      end
    end
    mr <= '1;
    // Direct multiplication.
    direct <= 1'b1;
    for (int i = 0; i < 20; i++) begin
      logic [W-1:0] aa, bb;
      int cyc;
      cyc = 0;
      aa = rnd(); bb = rnd();
      a <= aa; b <= bb; load <= 1'b1;
      @(posedge clk);
      load <= 1'b0;
      #1;
      checks++;
      if (!done || prod !== {{W{1'b0}}, aa} * {{W{1'b0}}, bb}) begin
        failures++; $display("FAIL direct %h * %h", aa, bb);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
