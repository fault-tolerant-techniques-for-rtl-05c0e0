// ipsp_m: word-level inner product step processor with a fixed multiplier over
// the ring R(MOD):  Y_out = (Y_in + A*X) mod MOD.
//
// How it works: the product is split over the bits of X,
//     Y_out = Y_in + sum_i x[i] * (2^i * A)  (mod MOD),
// and each term is one ft_bipsp_cell whose ROM adds the constant 2^i*A mod MOD
// when its steering bit x[i] is set. B cells form a linear systolic array; X
// travels with Y, rotated one place per cell, and leaves in its original bit
// order. The source paper gives this decomposition and the cell. The X parity bit
// that enters the X parity chain is generated here from x_in, XORed with
// xerr_in; the chain must end at 0, otherwise the fault flag is raised at the
// output. The end of the chain also leaves as xerr_out: fed to the xerr_in of
// the next row that uses the same X word, it keeps an X word corrupted here
// flagged in every later row (own choice; the source paper does not say where
// the X parity comes from).
//
// Interface: y_in must be a reduced residue (< MOD) with its content parity
// pcon_in; f_in is the fault flag arriving with the sample. Outputs are the new
// residue with its content parity, the X word (delayed, original order) and the
// fault flag, which is set if any cell of this row or any earlier stage saw a
// parity mismatch.
//
// Timing: latency B clocks, one new sample per clock.
module ipsp_m #(
  parameter int unsigned B   = 4,
  parameter int unsigned MOD = 13,
  parameter int unsigned A   = 5   // fixed multiplier, A < MOD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [B-1:0] y_in,
  input  logic         pcon_in,
  input  logic         f_in,
  input  logic [B-1:0] x_in,
  input  logic         xerr_in,
  output logic [B-1:0] y_out,
  output logic         pcon_out,
  output logic [B-1:0] x_out,
  output logic         xerr_out,
  output logic         f_out
);

  logic [B-1:0] y_c [B+1];
  logic [B-1:0] x_c [B+1];
  logic         pc_c [B+1];
  logic         px_c [B+1];
  logic         f_c [B+1];

  assign y_c[0]  = y_in;
  assign pc_c[0] = pcon_in;
  assign x_c[0]  = x_in;
  assign px_c[0] = (^x_in) ^ xerr_in;
  assign f_c[0]  = f_in;

  for (genvar i = 0; i < B; i++) begin : g_cell
    localparam int unsigned CI = ((2 ** i) * A) % MOD;
    ft_bipsp_cell #(.B(B), .MOD(MOD), .KY(1), .C(CI), .PRELOAD(1'b0)) u_cell (
      .clk     (clk),
      .rst_n   (rst_n),
      .y_in    (y_c[i]),
      .pcon_in (pc_c[i]),
      .x_in    (x_c[i]),
      .px_in   (px_c[i]),
      .f_in    (f_c[i]),
      .y_out   (y_c[i+1]),
      .pcon_out(pc_c[i+1]),
      .x_out   (x_c[i+1]),
      .px_out  (px_c[i+1]),
      .f_out   (f_c[i+1])
    );
  end

  assign y_out    = y_c[B];
  assign pcon_out = pc_c[B];
  assign x_out    = x_c[B];
  assign xerr_out = px_c[B];
  assign f_out    = f_c[B] | px_c[B];

endmodule
