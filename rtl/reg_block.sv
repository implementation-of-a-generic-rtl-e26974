// reg_block: the 3 x 256-bit register block that holds the RSA inputs.
//
//   word 0: {q, p}     the two 128-bit primes (p in the low half)
//   word 1: e          the public (encryption) exponent, up to 256 bits
//   word 2: plaintext  the message to encrypt, below n
//
// The defaults are the key and message of the source design's example run
// (p = 113680897410347, q = 7999808077935876437321, e = 97). Reset and
// a high WE on a clock edge reload all three words with these defaults. The
// write port (wr_en, wr_addr, wr_data) replaces one word and is this
// design's addition, so other keys and messages can be loaded; WE wins over
// it. Address 3 is ignored. The outputs are the registers themselves.
module reg_block
  import rsa_pkg::*;
#(
  parameter int unsigned  W      = RSA_W,
  parameter logic [W-1:0] P_DEF  = W'(47'd113680897410347),
  parameter logic [W-1:0] Q_DEF  = W'(73'd7999808077935876437321),
  parameter logic [W-1:0] E_DEF  = W'(97),
  parameter logic [W-1:0] PT_DEF = W'(116'ha1124634758798086756746464764)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         WE,
  input  logic         wr_en,
  input  logic [1:0]   wr_addr,
  input  logic [W-1:0] wr_data,
  output logic [W/2-1:0] p,
  output logic [W/2-1:0] q,
  output logic [W-1:0] e,
  output logic [W-1:0] pt
);

  logic [W-1:0] mem [3];
  logic [W-1:0] defaults [3];

  assign defaults[0] = {Q_DEF[W/2-1:0], P_DEF[W/2-1:0]};
  assign defaults[1] = E_DEF;
  assign defaults[2] = PT_DEF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) mem[i] <= defaults[i];
    end else if (WE) begin
      for (int i = 0; i < 3; i++) mem[i] <= defaults[i];
    end else if (wr_en && wr_addr != 2'd3) begin
      mem[wr_addr] <= wr_data;
    end
  end

  assign p  = mem[0][W/2-1:0];
  assign q  = mem[0][W-1:W/2];
  assign e  = mem[1];
  assign pt = mem[2];

endmodule
