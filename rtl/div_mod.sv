// div_mod: remainder of a DW-bit dividend by a W-bit divisor (t mod n).
//
// Bit-serial non-restoring division that keeps only the remainder. On start
// the dividend and divisor are latched, the two's complement of the divisor
// is formed once, and the bit length L of the dividend is found with a
// priority encoder: leading zero bits are skipped and the counter starts at
// L. Each clock, div_loop consumes one dividend bit (from the MSB down) and
// the counter counts down; when it reaches zero a final restore adds n back
// to a negative remainder. The divisor is never shifted, so only a W+2-bit
// remainder register is needed instead of DW-bit shifted copies.
//
// Timing: start is sampled on a rising clock edge while idle; done rises
// L+1 cycles later (L steps plus the restore) and stays high, with rem
// valid, until the next start. A zero dividend gives rem = 0 after one
// cycle. A zero divisor is not detected; rem is then meaningless.
//
// The source design loops without a clock, by switching between its two
// modules; here the loop is clocked, one bit per cycle.
module div_mod
  import rsa_pkg::*;
#(
  parameter int unsigned W  = RSA_W,
  parameter int unsigned DW = RSA_DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [W-1:0]  divisor,
  output logic [W-1:0]  rem,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_FIX} state_e;

  localparam int unsigned CW = $clog2(DW + 1);

  state_e              state;
  logic [DW-1:0]       t_q;
  logic signed [W+1:0] r_q, n_pos, n_neg, r_nxt;
  logic [CW-1:0]       cnt;
  logic [$clog2(DW)-1:0] bidx;     // dividend bit consumed this step

  assign bidx = ($clog2(DW))'(cnt - 1'b1);

  div_loop #(.W(W)) u_step (
    .rem    (r_q),
    .bit_in (t_q[bidx]),
    .div_pos(n_pos),
    .div_neg(n_neg),
    .rem_nxt(r_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t_q   <= '0;
      r_q   <= '0;
      n_pos <= '0;
      n_neg <= '0;
      cnt   <= '0;
      rem   <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          t_q   <= dividend;
          n_pos <= (W+2)'(divisor);
          n_neg <= -(W+2)'(divisor);
          r_q   <= '0;
          cnt   <= CW'(bitlen((DW+1)'(dividend)));
          done  <= 1'b0;
          state <= (dividend == '0) ? S_FIX : S_STEP;
        end
        S_STEP: begin
          r_q <= r_nxt;
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) state <= S_FIX;
        end
        S_FIX: begin
          rem   <= W'(r_q[W+1] ? r_q + n_pos : r_q);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
