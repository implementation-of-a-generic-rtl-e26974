// tb_div_loop: checks one non-restoring step against integer arithmetic on a
// 30-bit instance: remainder in [-n, n), each dividend bit value, random and
// extreme divisors.
module tb_div_loop;
  localparam int unsigned W = 30;

  logic signed [W+1:0] rem, dpos, dneg, nxt;
  logic                bit_in;
  int checks = 0, failures = 0;

  div_loop #(.W(W)) dut (.rem(rem), .bit_in(bit_in), .div_pos(dpos), .div_neg(dneg), .rem_nxt(nxt));

  task automatic check(input longint r, input longint n, input bit b);
    longint want;
    rem = (W+2)'(r); dpos = (W+2)'(n); dneg = (W+2)'(-n); bit_in = b;
    want = (r >= 0) ? 2 * r + b - n : 2 * r + b + n;
    #1;
    checks++;
    if (longint'(nxt) != want) begin
      failures++;
      $display("FAIL rem=%0d n=%0d bit=%0d got %0d want %0d", r, n, b, longint'(nxt), want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n, r;
    check(0, 53, 1);
    check(-53, 53, 0);
    check(52, 53, 1);
    check(-1, 1, 1);
    check(0, (longint'(1) << W) - 1, 0);
    check((longint'(1) << W) - 2, (longint'(1) << W) - 1, 1);
    check(-((longint'(1) << W) - 1), (longint'(1) << W) - 1, 1);
    for (int i = 0; i < 2000; i++) begin
      n = longint'($urandom_range(1, 32'h3fff_ffff));
      r = longint'($urandom) % (2 * n) - n;
      check(r, n, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
