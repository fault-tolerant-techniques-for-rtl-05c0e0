// rns_block: one block of the RNS-to-binary decoder,
//     r = (KA*a + KB*b) mod MOD,
// built entirely from the generic fault-detecting cell.
//
// Every block of the decoder has the form {A + B} x K over some ring: a
// difference of two residues scaled by a constant inverse, or a residue scaled
// and added to another. Writing it as KA*a + KB*b with constants KA and KB
// covers all of them (a subtraction is a multiplication by MOD-1 folded into
// KB), and b may be any 5-bit value, not necessarily reduced modulo MOD.
//
// How it works: cell 0 runs in preload mode and looks up KA*a mod MOD (its ROM
// also checks the address parity of a against the parity that came with a).
// Cells 1..B are ordinary IPSP cells that add 2^i*KB mod MOD when bit i of b is
// set, so the row is bit-sliced over b exactly like ipsp_m. The parity that
// came with b seeds the X parity chain, which must end at 0. The output fault
// flag is the OR of both input flags, every cell's check and that chain check.
// With KA = 1, KB = 0 and MOD = 2^B the block is a checked pipeline delay; the
// decoder uses it to carry operands alongside the computing blocks.
//
// Interface: a, b and r are rns_word_t (value, content parity, fault flag).
// Timing: latency B+1 clocks (RNS_W+1 = 6), one sample per clock.
//
// The block form is the source paper's; the split into a preload cell followed by
// B bit-sliced cells and the use of the operand parity are this design's.
module rns_block
  import rns_pkg::*;
#(
  parameter int unsigned MOD = 23,
  parameter int unsigned KA  = 1,
  parameter int unsigned KB  = 22
) (
  input  logic      clk,
  input  logic      rst_n,
  input  rns_word_t a,
  input  rns_word_t b,
  output rns_word_t r
);
  localparam int unsigned B = RNS_W;

  logic [B-1:0] y_c [B+2];
  logic [B-1:0] x_c [B+2];
  logic         pc_c [B+2];
  logic         px_c [B+2];
  logic         f_c [B+2];

  assign y_c[0]  = a.v;
  assign pc_c[0] = a.p;
  assign x_c[0]  = b.v;
  assign px_c[0] = b.p;
  assign f_c[0]  = a.f | b.f;

  ft_bipsp_cell #(.B(B), .MOD(MOD), .KY(KA % MOD), .C(0), .PRELOAD(1'b1)) u_pre (
    .clk(clk), .rst_n(rst_n),
    .y_in(y_c[0]), .pcon_in(pc_c[0]), .x_in(x_c[0]), .px_in(px_c[0]), .f_in(f_c[0]),
    .y_out(y_c[1]), .pcon_out(pc_c[1]), .x_out(x_c[1]), .px_out(px_c[1]), .f_out(f_c[1])
  );

  for (genvar i = 0; i < B; i++) begin : g_cell
    localparam int unsigned CI = ((2 ** i) * (KB % MOD)) % MOD;
    ft_bipsp_cell #(.B(B), .MOD(MOD), .KY(1), .C(CI), .PRELOAD(1'b0)) u_cell (
      .clk(clk), .rst_n(rst_n),
      .y_in(y_c[i+1]), .pcon_in(pc_c[i+1]), .x_in(x_c[i+1]), .px_in(px_c[i+1]),
      .f_in(f_c[i+1]),
      .y_out(y_c[i+2]), .pcon_out(pc_c[i+2]), .x_out(x_c[i+2]), .px_out(px_c[i+2]),
      .f_out(f_c[i+2])
    );
  end

  // x_c[B+1] is the b operand back in its original order; only its parity
  // chain is needed here.
  logic [B-1:0] unused_x;
  assign unused_x = x_c[B+1];

  assign r.v = y_c[B+1];
  assign r.p = pc_c[B+1];
  assign r.f = f_c[B+1] | px_c[B+1];

endmodule
