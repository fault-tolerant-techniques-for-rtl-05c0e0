// rns_decoder: residue-to-binary decoder for three residues (xa, xb, xc) with
// moduli (MA, MB, MC), producing the 15-bit binary value five bits at a time
// by repeated base extension to the modulus 32.
//
// How it works. The value X < MA*MB*MC is first rebuilt in mixed radix form
// from the three residues (B1, B2, B4), which gives X mod 32 (B5, the low
// slice) without ever forming X. The residues of floor(X/32) modulo MB and MC
// are then (x - B5) * 32^-1 (B6, B7); a second base extension gives its low
// five bits (B8, B9) and a third step gives the top slice (B10):
//   B1 = (xb - xc) * MC^-1  mod MB      B6  = (xb - B5) * 32^-1 mod MB
//   B2 = (xa - xc) * MC^-1  mod MA      B7  = (xc - B5) * 32^-1 mod MC
//   B3 = (B1 * MC + xc)     mod 32      B8  = (B6 - B7) * MC^-1 mod MB
//   B4 = (B2 - B1) * MB^-1  mod MA      B9  = (B8 * MC + B7)    mod 32
//   B5 = (B3 + B4*MB*MC)    mod 32      B10 = (B7 - B9) * 32^-1 mod MC
//   X  = {B10, B9, B5}
// These ten formulas and the seven-row arrangement are the source paper's (its
// roles m2, m3, m1 are MB, MC, MA here). Every box is an rns_block made of the
// generic fault-detecting cell; operands that skip a row go through an
// identity rns_block, so the whole decoder is checked. The result is correct
// when X < 32*MB*MC, X < 1024*MC and X < MA*MB*MC, which holds for the
// moduli of rns_pkg and X below 23*25*27.
//
// Interface: residues in as rns_word_t; y is the binary result and fault the OR
// of every flag that fed it (the three channel flags and all cell checks) and
// of a parity check on the three output slices (this design's addition).
// Timing: 7 rows of 6 clocks, latency 42 clocks, one sample per clock.
module rns_decoder
  import rns_pkg::*;
#(
  parameter int unsigned MA = M1,
  parameter int unsigned MB = M2,
  parameter int unsigned MC = M3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rns_word_t        xa,
  input  rns_word_t        xb,
  input  rns_word_t        xc,
  output logic [BIN_W-1:0] y,
  output logic             fault
);
  localparam int unsigned ICB  = mod_inv(MC, MB);
  localparam int unsigned ICA  = mod_inv(MC, MA);
  localparam int unsigned IBA  = mod_inv(MB, MA);
  localparam int unsigned I32B = mod_inv(BASE2, MB);
  localparam int unsigned I32C = mod_inv(BASE2, MC);

  localparam rns_word_t ZERO = '0;

  rns_word_t xb1, xc1, xb2, xc2, xb3, xc3;
  rns_word_t b1, b2, b3, b4, b5, b6, b7, b8, b9, b10;
  rns_word_t b5_4, b5_5, b5_6, b5_7, b7_5, b7_6, b9_7;

  // Row 1
  rns_block #(.MOD(MB), .KA(ICB), .KB(mod_neg(ICB, MB))) u_b1 (clk, rst_n, xb, xc, b1);
  rns_block #(.MOD(MA), .KA(ICA), .KB(mod_neg(ICA, MA))) u_b2 (clk, rst_n, xa, xc, b2);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p1b (clk, rst_n, xb, ZERO, xb1);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p1c (clk, rst_n, xc, ZERO, xc1);
  // Row 2
  rns_block #(.MOD(BASE2), .KA(MC % BASE2), .KB(1)) u_b3 (clk, rst_n, b1, xc1, b3);
  rns_block #(.MOD(MA), .KA(IBA), .KB(mod_neg(IBA, MA))) u_b4 (clk, rst_n, b2, b1, b4);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p2b (clk, rst_n, xb1, ZERO, xb2);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p2c (clk, rst_n, xc1, ZERO, xc2);
  // Row 3
  rns_block #(.MOD(BASE2), .KA(1), .KB((MB * MC) % BASE2)) u_b5 (clk, rst_n, b3, b4, b5);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p3b (clk, rst_n, xb2, ZERO, xb3);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p3c (clk, rst_n, xc2, ZERO, xc3);
  // Row 4
  rns_block #(.MOD(MB), .KA(I32B), .KB(mod_neg(I32B, MB))) u_b6 (clk, rst_n, xb3, b5, b6);
  rns_block #(.MOD(MC), .KA(I32C), .KB(mod_neg(I32C, MC))) u_b7 (clk, rst_n, xc3, b5, b7);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p4 (clk, rst_n, b5, ZERO, b5_4);
  // Row 5
  rns_block #(.MOD(MB), .KA(ICB), .KB(mod_neg(ICB, MB))) u_b8 (clk, rst_n, b6, b7, b8);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p5a (clk, rst_n, b7, ZERO, b7_5);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p5b (clk, rst_n, b5_4, ZERO, b5_5);
  // Row 6
  rns_block #(.MOD(BASE2), .KA(MC % BASE2), .KB(1)) u_b9 (clk, rst_n, b8, b7_5, b9);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p6a (clk, rst_n, b7_5, ZERO, b7_6);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p6b (clk, rst_n, b5_5, ZERO, b5_6);
  // Row 7
  rns_block #(.MOD(MC), .KA(I32C), .KB(mod_neg(I32C, MC))) u_b10 (clk, rst_n, b7_6, b9, b10);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p7a (clk, rst_n, b9, ZERO, b9_7);
  rns_block #(.MOD(BASE2), .KA(1), .KB(0)) u_p7b (clk, rst_n, b5_6, ZERO, b5_7);

  assign y = {b10.v, b9_7.v, b5_7.v};

  // No cell reads the three output slices, so their content parity is checked
  // here, as the next cell's address parity check would do: a fault in the
  // data plane of a last cell is flagged like any other.
  logic par_err;
  assign par_err = ((^b10.v) ^ b10.p) | ((^b9_7.v) ^ b9_7.p) | ((^b5_7.v) ^ b5_7.p);
  assign fault   = b10.f | b9_7.f | b5_7.f | par_err;

endmodule
