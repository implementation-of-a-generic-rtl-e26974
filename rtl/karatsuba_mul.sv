// karatsuba_mul: combinational Karatsuba-Ofman multiplier.
//
// p = a * b for two W-bit operands, in one clock cycle of pure logic. Each
// node of the Karatsuba tree splits its operands into halves of H =
// ceil(Wn/2) bits and forms
//   t0 = a0*b0, t2 = a1*b1, u = (a0+a1)*(b0+b1), t1 = u - t0 - t2,
//   p  = t2*2^(2H) + t1*2^H + t0.
// The half sums are H+1 bits wide. As in the source design, their top bit is
// removed so that the middle product also works on exactly H bits, and the
// dropped carries Cx, Cy are put back with shifted additions:
//   (sx + Cx*2^H)(sy + Cy*2^H) = sx*sy + 2^H(Cy*sx + Cx*sy) + Cx*Cy*2^(2H).
// This keeps every leaf the same size. Splitting stops once the width is at
// most LEAF (17, the operand width of an FPGA's 18x18 hard multiplier), so
// W = 256 gives four levels and 3^4 = 81 leaf multipliers of 16x16 bits, and
// W = 128 gives 27. The leaves use the * operator and are left to the
// synthesis tool.
//
// The recursion is laid out as a flat tree: node 0 is the whole product,
// level l holds 3^l nodes starting at index (3^l-1)/2, and node j of level l
// has children 3j, 3j+1, 3j+2 (low halves, high halves, half sums) on level
// l+1. Operands flow down the tree and products flow back up, all in logic.
//
// Interface: a, b (W bits) in, p (2W bits) out, no clock.
module karatsuba_mul #(
  parameter int unsigned W    = 256,
  parameter int unsigned LEAF = 17
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // Operand width on tree level l.
  function automatic int unsigned lvl_w(input int unsigned l);
    int unsigned w = W;
    for (int unsigned i = 0; i < l; i++) w = (w + 1) / 2;
    return w;
  endfunction

  // Number of splitting levels.
  function automatic int unsigned depth();
    int unsigned d = 0;
    while (lvl_w(d) > LEAF) d++;
    return d;
  endfunction

  function automatic int unsigned pow3(input int unsigned l);
    int unsigned r = 1;
    for (int unsigned i = 0; i < l; i++) r *= 3;
    return r;
  endfunction

  localparam int unsigned D     = depth();
  localparam int unsigned NODES = (pow3(D + 1) - 1) / 2;

  logic [W-1:0]   na [NODES];   // node operands, zero-extended
  logic [W-1:0]   nb [NODES];
  logic [2*W-1:0] np [NODES];   // node products, zero-extended

  assign na[0] = a;
  assign nb[0] = b;
  assign p     = np[0];

  for (genvar l = 0; l < D; l++) begin : g_lvl
    localparam int unsigned WL  = lvl_w(l);
    localparam int unsigned H   = lvl_w(l + 1);
    localparam int unsigned OFF = (pow3(l) - 1) / 2;
    localparam int unsigned COF = (pow3(l + 1) - 1) / 2;

    for (genvar j = 0; j < pow3(l); j++) begin : g_node
      localparam int unsigned ID = OFF + j;
      localparam int unsigned C0 = COF + 3 * j;

      logic [H-1:0]   a0, a1, b0, b1;
      logic [H:0]     sum_x, sum_y;
      logic [2*H+1:0] u, t1;
      logic [2*W-1:0] acc;

      assign a0 = na[ID][H-1:0];
      assign b0 = nb[ID][H-1:0];
      assign a1 = H'(na[ID][WL-1:H]);
      assign b1 = H'(nb[ID][WL-1:H]);

      assign sum_x = {1'b0, a0} + {1'b0, a1};
      assign sum_y = {1'b0, b0} + {1'b0, b1};

      assign na[C0]     = W'(a0);
      assign nb[C0]     = W'(b0);
      assign na[C0 + 1] = W'(a1);
      assign nb[C0 + 1] = W'(b1);
      assign na[C0 + 2] = W'(sum_x[H-1:0]);
      assign nb[C0 + 2] = W'(sum_y[H-1:0]);

      // Middle product with the carries of the half sums put back.
      always_comb begin
        u = (2*H+2)'(np[C0 + 2][2*H-1:0]);
        if (sum_x[H]) u = u + ((2*H+2)'(sum_y[H-1:0]) << H);
        if (sum_y[H]) u = u + ((2*H+2)'(sum_x[H-1:0]) << H);
        if (sum_x[H] && sum_y[H]) u = u + ((2*H+2)'(1) << (2*H));
      end

      assign t1 = u - (2*H+2)'(np[C0][2*H-1:0]) - (2*H+2)'(np[C0 + 1][2*H-1:0]);

      always_comb begin
        acc = (2*W)'(np[C0][2*H-1:0]);
        acc = acc + ((2*W)'(t1) << H);
        acc = acc + ((2*W)'(np[C0 + 1][2*H-1:0]) << (2*H));
      end

      // The product of a WL-bit node fits in 2*WL bits.
      assign np[ID] = (2*W)'(acc[2*WL-1:0]);
    end
  end

  // Leaves: plain multipliers of at most LEAF bits.
  for (genvar j = 0; j < pow3(D); j++) begin : g_leaf
    localparam int unsigned WD = lvl_w(D);
    localparam int unsigned ID = (pow3(D) - 1) / 2 + j;
    logic [2*WD-1:0] pl;
    assign pl     = na[ID][WD-1:0] * nb[ID][WD-1:0];
    assign np[ID] = (2*W)'(pl);
  end

endmodule
