// mont_pro: Montgomery product Pn = a * b * r^-1 mod n, r = 2^k <= 2^W, built
// around one combinational Karatsuba multiplier that is used three times.
//
//   cycle 1: T = a * b                      (2W bits)
//   cycle 2: m = (T mod r) * ni mod r       (ni = -n^-1 mod r)
//   cycle 3: u = (T + m * n) / r;  Pn = u >= n ? u - n : u
//
// The Montgomery radix is given by its mask mr = r - 1 = 2^k - 1: the mod-r
// reductions are ANDs with mr, and the division by r is a right shift by k,
// the bit length of mr (a priority encoder feeds a barrel shifter). The RSA
// top uses r = 2^W (mr all ones); smaller radices such as 2^(W-1) work as
// long as n < r. ni must be -n^-1 mod r (the low k bits of -n^-1 mod 2^W will
// do). The operands must be below n and n must be odd; then u < 2n and one
// conditional subtraction gives Pn < n.
//
// With direct = 1 the block is a plain multiplier: prod = a * b after one
// cycle. This is the "mode" of the source design that lets the RSA key
// generation reuse the exponentiator's multiplier for n = p*q.
//
// Timing: the multiplier is busy for 3 clock cycles per product: the cycle in
// which load is high (T is formed from the a, b inputs and captured at the
// edge that samples load) and the two that follow. done is high for one
// cycle after the second edge following the load edge; the block is idle
// again in that cycle, so loads can follow back to back every 3 cycles. In
// direct mode prod is captured at the load edge itself and done is high in
// the next cycle. Pn and prod hold until a later operation overwrites them.
module mont_pro
  import rsa_pkg::*;
#(
  parameter int unsigned W = RSA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           direct,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   n,
  input  logic [W-1:0]   ni,
  input  logic [W-1:0]   mr,
  output logic [W-1:0]   Pn,
  output logic [2*W-1:0] prod,
  output logic           done
);

  typedef enum logic [1:0] {S_IDLE, S_RED, S_FIN} state_e;

  state_e         state;
  logic [W-1:0]   mul_a, mul_b, m_q;
  logic [2*W-1:0] mul_p, t_q;
  logic [2*W:0]   sum;
  logic [W:0]     u;
  logic [$clog2(W+1)-1:0] k;            // log2(r)

  assign k = ($clog2(W+1))'(bitlen((RSA_DW+1)'(mr)));

  karatsuba_mul #(.W(W)) u_kom (.a(mul_a), .b(mul_b), .p(mul_p));

  always_comb begin
    unique case (state)
      S_RED:   begin mul_a = t_q[W-1:0] & mr; mul_b = ni; end
      S_FIN:   begin mul_a = m_q;             mul_b = n;  end
      default: begin mul_a = a;               mul_b = b;  end
    endcase
  end

  assign sum = {1'b0, t_q} + {1'b0, mul_p};
  assign u   = (W+1)'(sum >> k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t_q   <= '0;
      m_q   <= '0;
      Pn    <= '0;
      prod  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (load) begin
          if (direct) begin
            prod <= mul_p;
            done <= 1'b1;
          end else begin
            t_q   <= mul_p;
            state <= S_RED;
          end
        end
        S_RED: begin
          m_q   <= mul_p[W-1:0] & mr;
          state <= S_FIN;
        end
        S_FIN: begin
          Pn    <= (u >= {1'b0, n}) ? W'(u - {1'b0, n}) : W'(u);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
