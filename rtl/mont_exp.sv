// mont_exp: MSB-first Montgomery modular exponentiation (the exponent loop).
//
// Out = M^Ne mod n, given the operand already in Montgomery form
// M = Mplain * r mod n, x = r mod n (the Montgomery form of 1), the modulus
// n (odd), ni = -n^-1 mod r and mr = r - 1. The radix r = 2^k is set by mr
// (see mont_pro); the RSA top uses r = 2^W.
//
// On start a priority encoder finds the leading one of Ne at bit k. The
// running value y starts at M (the leading one needs no product) and the
// bits k-1 .. 0 are scanned: each costs a Montgomery squaring, and a one
// bit a further Montgomery multiplication by M. A final MonPro(y, 1) leaves
// Montgomery form. For Ne = 0, y starts at x and the result is 1. With P(e) =
// k + H(e) - 1 products in the loop (H = Hamming weight), the run takes
// 3*P(e) + 3 cycles of Montgomery products plus one cycle for the start:
// 1534 cycles from start to Dn for a 256-bit exponent of all ones.
//
// mode = 1 turns the block into a direct multiplier: prod = M * Ne (full 2W
// bits) and Out = its low W bits, with Dn high one cycle after the start
// edge. The RSA top uses it
// for n = p*q and phi = (p-1)(q-1), so no second multiplier is needed.
//
// Timing: start is sampled on a rising edge while idle; Dn rises when Out is
// valid and holds until the next start. Inputs must stay stable meanwhile.
module mont_exp
  import rsa_pkg::*;
#(
  parameter int unsigned W = RSA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           mode,
  input  logic [W-1:0]   M,
  input  logic [W-1:0]   mr,
  input  logic [W-1:0]   n,
  input  logic [W-1:0]   Ne,
  input  logic [W-1:0]   ni,
  input  logic [W-1:0]   x,
  output logic [W-1:0]   Out,
  output logic [2*W-1:0] prod,
  output logic           Dn
);

  localparam int unsigned IW = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_LOOP} state_e;

  state_e          state;
  logic            first;     // no product issued yet in this run
  logic            sq_done;   // squaring for bit idx issued, multiply pending
  logic            fin;       // final conversion issued
  logic [IW-1:0]   left;      // exponent bits still to scan
  logic [IW-1:0]   idx;       // next exponent bit
  logic [W-1:0]    y0;        // initial running value
  logic [W-1:0]    y;
  logic            mp_load, mp_done;
  logic [W-1:0]    mp_a, mp_b, mp_pn;
  logic [2*W-1:0]  mp_prod;
  logic [IW-1:0]   lead;

  mont_pro #(.W(W)) u_mp (
    .clk, .rst_n,
    .load  (mp_load),
    .direct(state == S_MUL || (state == S_IDLE && mode)),
    .a     (mp_a),
    .b     (mp_b),
    .n, .ni, .mr,
    .Pn    (mp_pn),
    .prod  (mp_prod),
    .done  (mp_done)
  );

  assign lead = IW'(bitlen((RSA_DW+1)'(Ne)));
  assign y    = first ? y0 : mp_pn;

  // Which product to issue next, in the cycle a previous one completes.
  always_comb begin
    mp_load = 1'b0;
    mp_a    = M;
    mp_b    = Ne;
    if (state == S_IDLE) begin
      mp_load = start && mode;
    end else if (state == S_LOOP && (first || mp_done) && !fin) begin
      mp_load = 1'b1;
      if (left == '0) begin
        mp_a = y;  mp_b = W'(1);
      end else if (!sq_done) begin
        mp_a = y;  mp_b = y;
      end else begin
        mp_a = M;  mp_b = y;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      first   <= 1'b0;
      sq_done <= 1'b0;
      fin     <= 1'b0;
      left    <= '0;
      idx     <= '0;
      y0      <= '0;
      Out     <= '0;
      prod    <= '0;
      Dn      <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          Dn <= 1'b0;
          if (mode) begin
            state <= S_MUL;
          end else begin
            state   <= S_LOOP;
            first   <= 1'b1;
            sq_done <= 1'b0;
            fin     <= 1'b0;
            if (lead == '0) begin
              y0 <= x;  left <= '0;        idx <= '0;
            end else begin
              y0 <= M;  left <= lead - 1'b1; idx <= lead - IW'(2);
            end
          end
        end
        S_MUL: if (mp_done) begin
          prod  <= mp_prod;
          Out   <= mp_prod[W-1:0];
          Dn    <= 1'b1;
          state <= S_IDLE;
        end
        S_LOOP: begin
          if (fin) begin
            if (mp_done) begin
              Out   <= mp_pn;
              Dn    <= 1'b1;
              state <= S_IDLE;
            end
          end else if (mp_load) begin
            first <= 1'b0;
            if (left == '0) begin
              fin <= 1'b1;
            end else if (!sq_done && Ne[idx[$clog2(W)-1:0]]) begin
              sq_done <= 1'b1;
            end else begin
              sq_done <= 1'b0;
              left    <= left - 1'b1;
              idx     <= idx - 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
