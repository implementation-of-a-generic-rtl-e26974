// tb_mont_exp: 256-bit Montgomery exponentiation against square-and-multiply
// with the simulator's wide modulo. The testbench prepares the Montgomery
// inputs itself (M*r mod n, r mod n, -n^-1 mod r). Covers the worked RSA
// example (97th power and its inverse with d), exponents 0, 1 and all ones,
// random cases, direct-multiply mode, and the example inputs prepared for
// r = 2^255. The cycle count is checked
// against 3*P(e) + 4, P(e) = (bit length - 1) + (Hamming weight - 1).
module tb_mont_exp;
  localparam int unsigned W = 256;

  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0, mode = 1'b0;
  logic [W-1:0]   M, mr, n, Ne, ni, x, Out;
  logic [2*W-1:0] prod;
  logic           Dn;
  int checks = 0, failures = 0;
  int n_mul = 0, n_exp = 0;

  mont_exp dut (.*);

  always #5 clk = ~clk;

  typedef logic [2*W-1:0] dw_t;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [W-1:0] neg_inv(input logic [W-1:0] nn);
    logic [W-1:0] xi = nn;
    for (int i = 0; i < 9; i++) xi = xi * (W'(2) - nn * xi);
    return -xi;
  endfunction

  function automatic logic [W-1:0] modexp(input logic [W-1:0] b, input logic [W-1:0] e,
                                          input logic [W-1:0] nn);
    dw_t acc = dw_t'(1) % dw_t'(nn), base = dw_t'(b) % dw_t'(nn);
    for (int i = W - 1; i >= 0; i--) begin
      acc = (acc * acc) % dw_t'(nn);
      if (e[i]) acc = (acc * base) % dw_t'(nn);
    end
    return W'(acc);
  endfunction

  function automatic int pcount(input logic [W-1:0] e);
    int len = 0, h = 0;
    for (int i = 0; i < W; i++) begin if (e[i]) begin len = i + 1; h++; end end
    return (len == 0) ? 0 : (len - 1) + (h - 1);
  endfunction

  task automatic run_exp(input logic [W-1:0] base, input logic [W-1:0] e, input logic [W-1:0] nn);
    logic [W-1:0] want;
    int cyc = 0;
    want = modexp(base, e, nn);
    M  <= W'((dw_t'(base) << W) % dw_t'(nn));
    x  <= W'((dw_t'(1) << W) % dw_t'(nn));
    ni <= neg_inv(nn);
    n <= nn; Ne <= e; mode <= 1'b0; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do begin @(posedge clk); #1; cyc++; end while (!Dn && cyc < 5000);
    n_exp++;
    checks++;
    if (Out !== want) begin
      failures++; $display("FAIL %h ^ %h mod %h: got %h want %h", base, e, nn, Out, want);
    end
    checks++;
    if (cyc != 3 * pcount(e) + 4) begin
      failures++; $display("FAIL cycles %0d want %0d", cyc, 3 * pcount(e) + 4);
    end
  endtask

  localparam logic [W-1:0] NN = W'(120'haf2621d242a00eca3958394623a043);
  localparam logic [W-1:0] DD = W'(120'h37f9b65af2fb303beb1d008b97e5d1);
  localparam logic [W-1:0] PT = W'(116'ha1124634758798086756746464764);
  localparam logic [W-1:0] CT = W'(120'h47f48d12669e2a2e53e0a5c3d2b4de);

  initial begin
    #5000000;
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
    run_exp(PT, W'(97), NN);
    checks++; if (Out !== CT) begin failures++; $display("FAIL example encryption"); end
    run_exp(CT, DD, NN);
    checks++; if (Out !== PT) begin failures++; $display("FAIL example decryption"); end
    // The exponentiator's own example: inputs prepared with r = 2^255
    // (mr = 2^255 - 1), decrypting the example ciphertext with d.
    M  <= W'(120'habe48431afe586fbdaf48ec6b7611f);
    x  <= W'(120'h3cef0777388aa286db22e9f0817a40);
    ni <= 256'h326bc59075b2db636f9c98ef7308fa12285cb17a3e9e11b90f3bfb61689a5395;
    mr <= {1'b0, {(W-1){1'b1}}};
    n <= NN; Ne <= DD; mode <= 1'b0; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do @(posedge clk); while (!Dn);
    #1;
    checks++;
    if (Out !== PT) begin failures++; $display("FAIL radix 2^255 example: %h", Out); end
    mr <= '1;
    run_exp(PT, '0, NN);
    run_exp(PT, W'(1), NN);
    run_exp(PT, W'(2), NN);
    run_exp(rnd() >> 1, '1, '1);                 // 510 products
    for (int i = 0; i < 6; i++) begin
      logic [W-1:0] nn;
      nn = rnd() | W'(1) | (W'(1) << (W - 1));
      run_exp(rnd() % nn, rnd() >> ($urandom % W), nn);
    end
    // Direct multiplication mode.
    for (int i = 0; i < 5; i++) begin
      logic [W-1:0] aa, bb;
      int cyc;
      cyc = 0;
      aa = rnd(); bb = rnd();
      M <= aa; Ne <= bb; mode <= 1'b1; start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      do begin @(posedge clk); #1; cyc++; end while (!Dn && cyc < 20);
      n_mul++;
      checks++;
      if (prod !== {{W{1'b0}}, aa} * {{W{1'b0}}, bb} || Out !== W'(prod) || cyc != 1) begin
        failures++; $display("FAIL direct mode %h * %h (%0d cycles)", aa, bb, cyc);
      end
    end
    checks++;
    if (n_mul == 0 || n_exp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
