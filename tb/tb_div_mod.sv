// tb_div_mod: 512-bit by 256-bit remainders at full size, checked against the
// simulator's wide modulo. Also checks the worked examples 3019 mod 53 = 51
// and 586491296780565 mod 1587421 = 0x8dfe3, and that done rises exactly
// L+1 cycles after start, L being the dividend's bit length.
module tb_div_mod;
  localparam int unsigned W  = 256;
  localparam int unsigned DW = 512;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [DW-1:0] dividend;
  logic [W-1:0]  divisor, rem;
  logic          done;
  int checks = 0, failures = 0;

  div_mod dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DW-1:0] rnd(input int bits);
    logic [DW-1:0] v = '0;
    for (int i = 0; i < DW / 32; i++) v[i*32 +: 32] = $urandom;
    if (bits < DW) v &= (DW'(1) << bits) - 1;
    return v;
  endfunction

  function automatic int blen(input logic [DW-1:0] v);
    for (int i = DW - 1; i >= 0; i--) if (v[i]) return i + 1;
    return 0;
  endfunction

  task automatic run(input logic [DW-1:0] t, input logic [W-1:0] n);
    logic [W-1:0] want;
    int cyc = 0;
    want = W'(t % {{(DW-W){1'b0}}, n});
    dividend <= t; divisor <= n; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do begin @(posedge clk); #1; cyc++; end while (!done);
    #1;
    checks++;
    if (rem !== want) begin
      failures++;
      $display("FAIL %h mod %h: got %h want %h", t, n, rem, want);
    end
    checks++;
    if (cyc != blen(t) + 1 && t != '0) begin
      failures++;
      $display("FAIL latency %0d, want %0d", cyc, blen(t) + 1);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(DW'(3019), W'(53));
    checks++;
    if (rem !== W'(51)) begin failures++; $display("FAIL 3019 mod 53"); end
    run(DW'(64'd586491296780565), W'(1587421));
    checks++;
    if (rem !== W'(20'h8dfe3)) begin failures++; $display("FAIL doc example"); end
    run('0, W'(7));
    run(DW'(5), W'(7));                        // dividend below divisor
    run(DW'(7), W'(7));
    run({DW{1'b1}}, {W{1'b1}});                 // worst case, 512 steps
    run({DW{1'b1}}, W'(1));
    run(DW'(1) << W, {1'b1, {(W-1){1'b0}}} | W'(1));   // r mod n
    for (int i = 0; i < 40; i++) begin
      logic [W-1:0] n;
      n = W'(rnd(1 + ($urandom % W)));
      if (n == '0) n = W'(3);
      run(rnd(1 + ($urandom % DW)), n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
