// hars_inv: modular inverse by the shifting extended Euclidean algorithm of
// L. Hars (no division, no multiplication).
//
// invrs = N^-1 mod Mod, or 0 when gcd(N, Mod) != 1. Mod may be even, so the
// same unit finds the private exponent d = e^-1 mod phi(n) and, with
// Mod = 2^256 (hence 257 bits), the Montgomery constant n^-1 mod r.
//
// Algorithm: U, V start as the larger and smaller of (Mod, N), with R, S
// their cofactors (U = R*N, V = S*N mod Mod). Each iteration shifts V left by
// f = ||U|| - ||V|| (|| || = bit length of the magnitude) and subtracts it
// from U when U, V have the same sign, adds it otherwise, doing the same to
// R with S; then, if U became shorter than V, the pairs are swapped. The
// length of U drops by at least one bit per iteration, so the loop ends after
// at most ||N|| + ||Mod|| iterations, when V is 0 (no inverse) or +-1. Then
// S is negated if V = -1 and brought into [0, Mod).
//
// Hardware: one iteration per clock. Two priority encoders find the bit
// lengths (before and after the reduction), a barrel shifter forms V<<f and
// S<<f, and two adder/subtractors update U and R. All four variables are
// signed and MW+2 bits wide; |U|, |V|, |R|, |S| never exceed Mod.
//
// Timing: load is sampled on a rising edge while idle (or after a finished
// run) and latches N and Mod. invDn rises k+2 cycles later for k iterations
// and holds, with invrs, until the next load. Worst case for 257-bit
// operands is about 514 cycles. The inputs must satisfy 0 < N and 1 < Mod.
module hars_inv
  import rsa_pkg::*;
#(
  parameter int unsigned MW = RSA_W + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [MW-1:0] N,
  input  logic [MW-1:0] Mod,
  output logic [MW-1:0] invrs,
  output logic          invDn
);

  localparam int unsigned SW = MW + 2;
  localparam int unsigned LW = $clog2(SW + 1);

  typedef logic signed [SW-1:0] sval_t;
  typedef enum logic [1:0] {S_IDLE, S_ITER, S_FIN} state_e;

  state_e        state;
  sval_t         u_q, v_q, r_q, s_q, m_q;
  sval_t         u_red, r_red, sv, s_fix;
  logic [LW-1:0] len_u, len_v, len_ur, f;

  function automatic logic [LW-1:0] mag_len(input sval_t x);
    sval_t a;
    a = x[SW-1] ? -x : x;
    return LW'(bitlen((RSA_DW+1)'(unsigned'(a))));
  endfunction

  // One reduction step.
  always_comb begin
    len_u = mag_len(u_q);
    len_v = mag_len(v_q);
    f     = len_u - len_v;
    if (u_q[SW-1] == v_q[SW-1]) begin
      u_red = u_q - (v_q <<< f);
      r_red = r_q - (s_q <<< f);
    end else begin
      u_red = u_q + (v_q <<< f);
      r_red = r_q + (s_q <<< f);
    end
    len_ur = mag_len(u_red);
  end

  // Final sign and range correction of S.
  always_comb begin
    sv = v_q[SW-1] ? -s_q : s_q;
    if (sv > m_q)         s_fix = sv - m_q;
    else if (sv[SW-1])    s_fix = sv + m_q;
    else                  s_fix = sv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      u_q   <= '0;
      v_q   <= '0;
      r_q   <= '0;
      s_q   <= '0;
      m_q   <= '0;
      invrs <= '0;
      invDn <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (load) begin
          m_q   <= SW'(Mod);
          invDn <= 1'b0;
          if (N < Mod) begin
            u_q <= SW'(Mod); v_q <= SW'(N);   r_q <= '0;     s_q <= SW'(1);
          end else begin
            v_q <= SW'(Mod); u_q <= SW'(N);   s_q <= '0;     r_q <= SW'(1);
          end
          state <= S_ITER;
        end
        S_ITER: begin
          if (len_v <= LW'(1)) begin
            state <= S_FIN;
          end else if (len_ur < len_v) begin
            u_q <= v_q;   v_q <= u_red;
            r_q <= s_q;   s_q <= r_red;
          end else begin
            u_q <= u_red;
            r_q <= r_red;
          end
        end
        S_FIN: begin
          invrs <= (v_q == '0) ? '0 : MW'(s_fix);
          invDn <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
