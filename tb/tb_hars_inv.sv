// tb_hars_inv: 257-bit modular inverses. Results are checked by N*inv mod Mod
// == 1 (or inv == 0 when a gcd computed by the testbench is not 1). The
// cycle count is checked against an iteration count from a behavioural
// model of the algorithm and against the ||N||+||Mod|| bound. Vectors
// include the RSA key of the worked example (d from e and phi, e from d and
// phi) and the Montgomery constant n^-1 mod 2^256.
module tb_hars_inv;
  localparam int unsigned MW = 257;
  localparam int unsigned XW = 2 * MW + 4;

  typedef logic signed [XW-1:0] wide_t;

  logic          clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [MW-1:0] N, Mod, invrs;
  logic          invDn;
  int checks = 0, failures = 0;

  hars_inv dut (.*);

  always #5 clk = ~clk;

  function automatic int blen(input wide_t v);
    wide_t a = v < 0 ? -v : v;
    for (int i = XW - 1; i >= 0; i--) if (a[i]) return i + 1;
    return 0;
  endfunction

  function automatic int model_iters(input wide_t a, input wide_t m);
    wide_t u, v, t;
    int k = 0, f;
    if (a < m) begin u = m; v = a; end else begin u = a; v = m; end
    while (blen(v) > 1) begin
      f = blen(u) - blen(v);
      if ((u < 0) == (v < 0)) u = u - (v <<< f); else u = u + (v <<< f);
      if (blen(u) < blen(v)) begin t = u; u = v; v = t; end
      k++;
    end
    return k;
  endfunction

  function automatic wide_t gcd(input wide_t a, input wide_t b);
    wide_t t;
    while (b != 0) begin t = a % b; a = b; b = t; end
    return a;
  endfunction

  function automatic logic [MW-1:0] rnd(input int bits);
    logic [MW-1:0] v = '0;
    for (int i = 0; i < 9; i++) v[i*32 +: 32] = $urandom;
    if (bits < MW) v &= (MW'(1) << bits) - 1;
    return v;
  endfunction

  task automatic run(input logic [MW-1:0] a, input logic [MW-1:0] m);
    int cyc = 0, k;
    wide_t g, prod;
    k = model_iters(XW'(a), XW'(m));
    g = gcd(XW'(m), XW'(a));
    N <= a; Mod <= m; load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    do begin @(posedge clk); #1; cyc++; end while (!invDn && cyc < 2000);
    checks++;
    if (g == 1) begin
      prod = (XW'(a) * XW'(invrs)) % XW'(m);
      if (prod != 1 || invrs >= m) begin
        failures++;
        $display("FAIL inverse of %h mod %h: got %h", a, m, invrs);
      end
    end else if (invrs != '0) begin
      failures++;
      $display("FAIL gcd>1 case %h mod %h: got %h, want 0", a, m, invrs);
    end
    checks++;
    if (cyc != k + 2 || k > blen(XW'(a)) + blen(XW'(m))) begin
      failures++;
      $display("FAIL cycles %0d, model %0d iterations", cyc, k);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [MW-1:0] PHI = MW'(120'haf2621d2429e5d1e955abfa446a5d0);
  localparam logic [MW-1:0] NN  = MW'(120'haf2621d242a00eca3958394623a043);
  localparam logic [MW-1:0] DD  = MW'(120'h37f9b65af2fb303beb1d008b97e5d1);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(DD, PHI);
    checks++; if (invrs !== MW'(97)) begin failures++; $display("FAIL d^-1 mod phi != 97"); end
    run(MW'(97), PHI);
    checks++; if (invrs !== DD) begin failures++; $display("FAIL 97^-1 mod phi != d"); end
    run(NN, MW'(1) << 256);
    checks++;
    if (MW'((MW'(1) << 256) - invrs) !== MW'(256'h326bc59075b2db636f9c98ef7308fa12285cb17a3e9e11b90f3bfb61689a5395)) begin
      failures++; $display("FAIL -n^-1 mod 2^256");
    end
    run(MW'(17), MW'(120));
    checks++; if (invrs !== MW'(113)) begin failures++; $display("FAIL 17^-1 mod 120"); end
    run(MW'(1), MW'(7));
    run(MW'(6), MW'(9));                        // gcd 3: no inverse
    run(MW'(300), MW'(7));                      // N larger than Mod
    run({1'b0, {256{1'b1}}}, MW'(1) << 256);    // worst-case lengths
    for (int i = 0; i < 60; i++) begin
      logic [MW-1:0] m, a;
      m = rnd(2 + ($urandom % 256));
      if (m < 2) m = MW'(2);
      a = rnd(1 + ($urandom % 256));
      if (a == '0) a = MW'(1);
      if (i % 3 == 0) a = a % m;
      if (a == '0) a = MW'(1);
      run(a, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
