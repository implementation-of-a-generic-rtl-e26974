// rsa_top: RSA cryptosystem generic up to a 256-bit modulus.
//
// Key generation, encryption and decryption are built from four units: the
// register block (primes p, q, exponent e, plaintext), the Montgomery
// exponentiator (whose direct-multiply mode also provides the multiplier),
// the bit-serial remainder unit and the Hars inverter. Sequencing:
//
//   key generation (instr = 1)
//     1. n    = p * q                 exponentiator, multiply mode
//     2. phi  = (p-1) * (q-1)         exponentiator, multiply mode
//     3. x    = 2^256 mod n           remainder unit  } in parallel
//        d    = e^-1 mod phi          inverter        }
//     4. ni   = -(n^-1 mod 2^256)     inverter, 257-bit modulus
//   encryption (instr = 2)
//     1. Mbar = (P * 2^256) mod n     remainder unit
//     2. C    = MonExp(Mbar, e)       exponentiator
//   decryption (instr = 3)
//     1. Cbar = (C * 2^256) mod n     remainder unit, C from the last encryption
//     2. P'   = MonExp(Cbar, d)       exponentiator
//
// The source design drives the sequence from an instr port and reports
// completion on keygen, cipher and decipher; the details below are this
// design's choices. An operation starts when instr takes a non-zero value
// that differs from the last one accepted, while the engine is idle. The
// flag of a finished operation stays high. instr = 0 clears the flags and
// the results and holds the arithmetic units in reset (through a register,
// so their reset is glitch free); this also rearms the last instruction.
// Encryption and decryption are ignored until a key has been generated.
// WE reloads the register block's defaults; wr_en/wr_addr/wr_data write one
// of its words (0: {q, p}, 1: e, 2: plaintext).
//
// Worst-case timing at 256 bits: key generation about 2 + 2 + 514 + 260
// cycles, encryption and decryption each up to 514 + 1534 cycles.
module rsa_top
  import rsa_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        instr,
  input  logic              WE,
  input  logic              wr_en,
  input  logic [1:0]        wr_addr,
  input  logic [RSA_W-1:0]  wr_data,
  output logic              keygen,
  output logic              cipher,
  output logic              decipher,
  output logic              busy,
  output logic [RSA_W-1:0]  n_out,
  output logic [RSA_W-1:0]  d_out,
  output logic [RSA_W-1:0]  c_out,
  output logic [RSA_W-1:0]  m_out
);

  localparam int unsigned W  = RSA_W;
  localparam int unsigned DW = RSA_DW;
  localparam int unsigned MW = RSA_W + 1;

  typedef enum logic [3:0] {
    S_IDLE, S_K_N, S_K_PHI, S_K_XD, S_K_NI, S_E_DIV, S_E_EXP, S_D_DIV, S_D_EXP
  } state_e;

  state_e         state;
  logic           go;          // the current step's units have been started
  logic [1:0]     last_instr;
  logic           sub_rst_q;
  logic           sub_rst_n;

  // Key material and results.
  logic [W-1:0]   n_q, phi_q, d_q, ni_q, x_q, bar_q, c_q, m_q;

  // Register block.
  logic [W/2-1:0] rb_p, rb_q;
  logic [W-1:0]   rb_e, rb_pt;

  // Units.
  logic           ex_start, ex_mode, ex_dn;
  logic [W-1:0]   ex_m, ex_ne, ex_out;
  logic [2*W-1:0] ex_prod;
  logic           dv_start, dv_done;
  logic [DW-1:0]  dv_t;
  logic [W-1:0]   dv_rem;
  logic           iv_load, iv_dn;
  logic [MW-1:0]  iv_n, iv_mod, iv_res;
  logic           step_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sub_rst_q <= 1'b0;
    else        sub_rst_q <= (instr != INSTR_RESET);
  end
  assign sub_rst_n = rst_n & sub_rst_q;

  reg_block u_regs (
    .clk, .rst_n, .WE, .wr_en, .wr_addr, .wr_data,
    .p(rb_p), .q(rb_q), .e(rb_e), .pt(rb_pt)
  );

  mont_exp u_exp (
    .clk, .rst_n(sub_rst_n),
    .start(ex_start), .mode(ex_mode),
    .M(ex_m), .mr({W{1'b1}}), .n(n_q), .Ne(ex_ne), .ni(ni_q), .x(x_q),
    .Out(ex_out), .prod(ex_prod), .Dn(ex_dn)
  );

  div_mod u_div (
    .clk, .rst_n(sub_rst_n),
    .start(dv_start), .dividend(dv_t), .divisor(n_q),
    .rem(dv_rem), .done(dv_done)
  );

  hars_inv u_inv (
    .clk, .rst_n(sub_rst_n),
    .load(iv_load), .N(iv_n), .Mod(iv_mod),
    .invrs(iv_res), .invDn(iv_dn)
  );

  // Operands of each step, held for the whole step.
  always_comb begin
    ex_mode = 1'b0;
    ex_m    = bar_q;
    ex_ne   = rb_e;
    dv_t    = DW'(1) << W;
    iv_n    = MW'(rb_e);
    iv_mod  = MW'(phi_q);
    unique case (state)
      S_K_N:   begin ex_mode = 1'b1; ex_m = W'(rb_p);          ex_ne = W'(rb_q); end
      S_K_PHI: begin ex_mode = 1'b1; ex_m = W'(rb_p - 1'b1);   ex_ne = W'(rb_q - 1'b1); end
      S_K_NI:  begin iv_n = MW'(n_q); iv_mod = MW'(1) << W; end
      S_E_DIV: dv_t = {rb_pt, {W{1'b0}}};
      S_D_DIV: dv_t = {c_q, {W{1'b0}}};
      S_E_EXP: ex_ne = rb_e;
      S_D_EXP: ex_ne = d_q;
      default: ;
    endcase
  end

  assign ex_start = !go && (state inside {S_K_N, S_K_PHI, S_E_EXP, S_D_EXP});
  assign dv_start = !go && (state inside {S_K_XD, S_E_DIV, S_D_DIV});
  assign iv_load  = !go && (state inside {S_K_XD, S_K_NI});

  always_comb begin
    unique case (state)
      S_K_N, S_K_PHI, S_E_EXP, S_D_EXP: step_done = ex_dn;
      S_K_XD:                           step_done = dv_done && iv_dn;
      S_K_NI:                           step_done = iv_dn;
      S_E_DIV, S_D_DIV:                 step_done = dv_done;
      default:                          step_done = 1'b0;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      go         <= 1'b0;
      last_instr <= INSTR_RESET;
      keygen     <= 1'b0;
      cipher     <= 1'b0;
      decipher   <= 1'b0;
      n_q        <= '0;
      phi_q      <= '0;
      d_q        <= '0;
      ni_q       <= '0;
      x_q        <= '0;
      bar_q      <= '0;
      c_q        <= '0;
      m_q        <= '0;
    end else if (instr == INSTR_RESET) begin
      state      <= S_IDLE;
      go         <= 1'b0;
      last_instr <= INSTR_RESET;
      keygen     <= 1'b0;
      cipher     <= 1'b0;
      decipher   <= 1'b0;
      n_q        <= '0;
      phi_q      <= '0;
      d_q        <= '0;
      ni_q       <= '0;
      x_q        <= '0;
      bar_q      <= '0;
      c_q        <= '0;
      m_q        <= '0;
    end else if (state == S_IDLE) begin
      if (instr != last_instr) begin
        last_instr <= instr;
        go         <= 1'b0;
        unique case (instr)
          INSTR_KEYGEN:  begin state <= S_K_N; keygen <= 1'b0; end
          INSTR_ENCRYPT: if (keygen) begin state <= S_E_DIV; cipher <= 1'b0; end
          INSTR_DECRYPT: if (keygen) begin state <= S_D_DIV; decipher <= 1'b0; end
          default: ;
        endcase
      end
    end else if (!go) begin
      go <= 1'b1;                      // units started this cycle
    end else if (step_done) begin
      go <= 1'b0;
      unique case (state)
        S_K_N:   begin n_q   <= ex_out; state <= S_K_PHI; end
        S_K_PHI: begin phi_q <= ex_out; state <= S_K_XD;  end
        S_K_XD:  begin x_q <= dv_rem; d_q <= W'(iv_res); state <= S_K_NI; end
        S_K_NI:  begin ni_q <= W'(-iv_res); keygen <= 1'b1; state <= S_IDLE; end
        S_E_DIV: begin bar_q <= dv_rem; state <= S_E_EXP; end
        S_E_EXP: begin c_q <= ex_out; cipher <= 1'b1; state <= S_IDLE; end
        S_D_DIV: begin bar_q <= dv_rem; state <= S_D_EXP; end
        S_D_EXP: begin m_q <= ex_out; decipher <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign n_out = n_q;
  assign d_out = d_q;
  assign c_out = c_q;
  assign m_out = m_q;

  // A result flag of encryption or decryption implies a generated key, and
  // the engine never starts a unit while it is idle.
  a_flags_need_key: assert property (@(posedge clk) disable iff (!rst_n)
    (cipher || decipher) |-> keygen);
  a_no_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE) |-> !(ex_start || dv_start || iv_load));

endmodule
