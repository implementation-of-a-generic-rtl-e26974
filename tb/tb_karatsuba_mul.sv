// tb_karatsuba_mul: checks the 256x256 Karatsuba multiplier against the
// simulator's own wide multiply, on corner operands and random ones, and
// also the 128-bit configuration (27 leaf multipliers, 256-bit product) and
// an odd width (W = 75) that exercises the uneven split.
module tb_karatsuba_mul;
  localparam int unsigned W  = 256;
  localparam int unsigned WO = 75;
  localparam int unsigned WH = 128;

  logic [W-1:0]    a, b;
  logic [2*W-1:0]  p;
  logic [WO-1:0]   ao, bo;
  logic [2*WO-1:0] po;
  logic [WH-1:0]   ah, bh;
  logic [2*WH-1:0] ph;
  int checks = 0, failures = 0;

  karatsuba_mul #(.W(W))  dut   (.a(a),  .b(b),  .p(p));
  karatsuba_mul #(.W(WO)) dut_o (.a(ao), .b(bo), .p(po));
  karatsuba_mul #(.W(WH)) dut_h (.a(ah), .b(bh), .p(ph));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [2*W-1:0] ref_p;
    a = x; b = y; ref_p = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    #1;
    checks++;
    if (p !== ref_p) begin
      failures++;
      $display("FAIL %h * %h: got %h want %h", x, y, p, ref_p);
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
    // Operands of the document's own example.
    check(256'd3458674973089012312, 256'd4812909827000423452);
    check('0, '0);
    check('1, '1);                 // every half sum carries
    check('1, 256'd1);
    check({W{1'b1}}, {1'b1, {(W-1){1'b0}}});
    check({128'h0, {128{1'b1}}}, {{128{1'b1}}, 128'h0});
    for (int i = 0; i < 300; i++) check(rnd(), rnd());
    for (int i = 0; i < 50; i++) check(rnd() | {W{1'b1}} << 8, rnd() | {W{1'b1}} << 16);
    for (int i = 0; i < 200; i++) begin
      logic [2*WO-1:0] r;
      ao = WO'({$urandom, $urandom, $urandom}); bo = WO'({$urandom, $urandom, $urandom});
      if (i == 0) begin ao = '1; bo = '1; end
      r = {{WO{1'b0}}, ao} * {{WO{1'b0}}, bo};
      #1; checks++;
      if (po !== r) begin failures++; $display("FAIL odd width %h * %h", ao, bo); end
    end
    for (int i = 0; i < 200; i++) begin
      logic [2*WH-1:0] r;
      ah = {$urandom, $urandom, $urandom, $urandom};
      bh = {$urandom, $urandom, $urandom, $urandom};
      if (i == 0) begin ah = '1; bh = '1; end
      if (i == 1) begin ah = 128'd3458674973089012312; bh = 128'd4812909827000423452; end
      r = {{WH{1'b0}}, ah} * {{WH{1'b0}}, bh};
      #1; checks++;
      if (ph !== r) begin failures++; $display("FAIL 128-bit %h * %h", ah, bh); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
