// tb_rsa_top: end-to-end run of the RSA engine at its default (256-bit) size.
//
//  1. Key generation, encryption and decryption with the register block's
//     default key (the worked example): n, d, C and the recovered plaintext
//     are compared with known values.
//  2. A full 256-bit key (two 128-bit primes, e = 65537) and a random
//     plaintext written through the write port; C is checked against
//     square-and-multiply in the testbench, and decryption must return the
//     plaintext.
//  3. instr = 0 in the middle of a key generation aborts it; encryption
//     without a key is ignored; WE restores the default key.
// Mechanisms counted (each must occur): direct-multiply mode, exponent
// mode, multiply steps in the exponent loop, remainder and inversion running
// in parallel, the 2^256-modulus inversion, aborts, WE reloads, writes.
module tb_rsa_top;
  localparam int unsigned W = 256;
  typedef logic [2*W-1:0] dw_t;

  logic         clk = 1'b0, rst_n = 1'b0, WE = 1'b0, wr_en = 1'b0;
  logic [1:0]   instr = 2'd0, wr_addr = '0;
  logic [W-1:0] wr_data = '0;
  logic         keygen, cipher, decipher, busy;
  logic [W-1:0] n_out, d_out, c_out, m_out;
  int checks = 0, failures = 0;
  int n_direct = 0, n_expo = 0, n_mulstep = 0, n_parallel = 0, n_r_inv = 0;
  int n_abort = 0, n_reload = 0, n_write = 0, n_ignored = 0;

  rsa_top dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, sampled on the design's own control signals.
  always @(posedge clk) begin
    if (dut.ex_start &&  dut.ex_mode) n_direct++;
    if (dut.ex_start && !dut.ex_mode) n_expo++;
    if (dut.u_exp.mp_load && dut.u_exp.sq_done) n_mulstep++;
    if (dut.dv_start && dut.iv_load) n_parallel++;
    if (dut.iv_load && dut.iv_mod == (257'(1) << W)) n_r_inv++;
    if (WE) n_reload++;
    if (wr_en) n_write++;
  end

  function automatic logic [W-1:0] modexp(input logic [W-1:0] b, input logic [W-1:0] e,
                                          input logic [W-1:0] nn);
    dw_t acc = dw_t'(1), base = dw_t'(b) % dw_t'(nn);
    for (int i = W - 1; i >= 0; i--) begin
      acc = (acc * acc) % dw_t'(nn);
      if (e[i]) acc = (acc * base) % dw_t'(nn);
    end
    return W'(acc);
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Issue an instruction and wait for the engine to go idle again.
  task automatic op(input logic [1:0] code, output int cycles);
    instr <= code;
    @(posedge clk);
    @(posedge clk);
    #1;
    cycles = 1;
    while (busy && cycles < 20000) begin @(posedge clk); #1; cycles++; end
  endtask

  task automatic write(input logic [1:0] a, input logic [W-1:0] d);
    wr_en <= 1'b1; wr_addr <= a; wr_data <= d;
    @(posedge clk);
    wr_en <= 1'b0;
  endtask

  task automatic clear();
    instr <= 2'd0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  localparam logic [W-1:0] EX_N = W'(120'haf2621d242a00eca3958394623a043);
  localparam logic [W-1:0] EX_D = W'(120'h37f9b65af2fb303beb1d008b97e5d1);
  localparam logic [W-1:0] EX_P = W'(116'ha1124634758798086756746464764);
  localparam logic [W-1:0] EX_C = W'(120'h47f48d12669e2a2e53e0a5c3d2b4de);
  localparam logic [127:0] BIG_P = 128'hae658f33fe3b890b93f448b3a5aa3c81;
  localparam logic [127:0] BIG_Q = 128'hd4c28c2e7c26847f0316909e3bbbe9eb;
  localparam logic [W-1:0] BIG_D = 256'h584270c7845a6910864f5aec751bf0ae98a3aa103e73cccbecacd5bc58209401;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [W-1:0] nn, pt;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. Default key.
    op(2'd2, cyc);
    check(!cipher && cyc <= 2, "encryption ignored without a key");
    if (!cipher) n_ignored++;
    op(2'd1, cyc);
    check(keygen, "keygen flag");
    check(n_out == EX_N, "n = p*q");
    check(d_out == EX_D, "d = e^-1 mod phi");
    check(dut.ni_q == 256'h326bc59075b2db636f9c98ef7308fa12285cb17a3e9e11b90f3bfb61689a5395, "ni");
    check(cyc <= 2 + 4 + 520 + 520, "keygen cycle bound");
    $display("key generation: %0d cycles", cyc);
    op(2'd2, cyc);
    check(cipher && c_out == EX_C, "example ciphertext");
    $display("encryption (e = 97): %0d cycles", cyc);
    op(2'd3, cyc);
    check(decipher && m_out == EX_P, "example decryption");
    $display("decryption: %0d cycles", cyc);
    check(cyc <= 2 * 520 + 1534, "decryption cycle bound");

    // 2. A 256-bit key.
    clear();
    check(!keygen && !cipher && !decipher && c_out == '0, "instr 0 clears");
    write(2'd0, {BIG_Q, BIG_P});
    write(2'd1, W'(65537));
    nn = {128'h0, BIG_P} * {128'h0, BIG_Q};
    pt = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % nn;
    write(2'd2, pt);
    op(2'd1, cyc);
    check(keygen && n_out == nn, "256-bit n");
    check(d_out == BIG_D, "256-bit d");
    $display("key generation, 256-bit key: %0d cycles", cyc);
    op(2'd2, cyc);
    check(cipher && c_out == modexp(pt, W'(65537), nn), "256-bit encryption");
    $display("encryption, 256-bit key: %0d cycles", cyc);
    op(2'd3, cyc);
    check(decipher && m_out == pt, "256-bit decryption");
    $display("decryption, 256-bit key: %0d cycles", cyc);

    // 3. Abort, reload, regenerate.
    clear();
    instr <= 2'd1;
    repeat (100) @(posedge clk);
    check(busy, "busy during key generation");
    clear();
    check(!busy && !keygen, "abort by instr 0");
    n_abort++;
    WE <= 1'b1;
    @(posedge clk);
    WE <= 1'b0;
    op(2'd1, cyc);
    check(keygen && n_out == EX_N && d_out == EX_D, "key regenerated after WE");
    op(2'd2, cyc);
    check(c_out == EX_C, "ciphertext after WE");

    check(n_direct >= 2 && n_expo >= 2 && n_mulstep > 0 && n_parallel > 0 && n_r_inv > 0
          && n_abort > 0 && n_reload > 0 && n_write > 0 && n_ignored > 0, "every mechanism occurred");
    $display("mechanisms: direct=%0d expo=%0d mulstep=%0d parallel=%0d rinv=%0d abort=%0d reload=%0d write=%0d ignored=%0d",
             n_direct, n_expo, n_mulstep, n_parallel, n_r_inv, n_abort, n_reload, n_write, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
