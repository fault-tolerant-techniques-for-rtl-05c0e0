// rns_fir_channel: one residue channel of the processor, an FIR filter
//     y(n) = sum_k H[k] * x(n-k)  (mod MOD)
// built from fault-detecting IPSP_m rows.
//
// How it works: the binary input is reduced to its residue (bin_to_residue).
// Tap k is an ipsp_m row with the fixed multiplier H[k] mod MOD. The partial
// sum y moves from tap to tap through the rows; the X word leaves each row
// after the same B clocks and passes one extra register before the next row,
// so tap k meets x(n-k) when the partial sum of y(n) arrives. The fault flag
// rides with the partial sum: it is set at the output if any cell of any tap
// saw a parity mismatch. An X word found corrupted by the X parity chain of
// one tap stays marked (xerr) as it moves on, so every later output that uses
// it is flagged too.
//
// The source paper says only that the channels are processing arrays of the
// generic cells, an FIR filter with encoding from binary for example; the
// systolic arrangement, the tap count and the coefficients are this design's.
//
// tap_fault exposes the flag after every tap for monitoring; since the flag is
// cumulative, the first tap whose flag rises locates the fault.
//
// Timing: latency 1 + TAPS*RNS_W clocks from x_bin to y, one sample per clock;
// tap_fault[k] belongs to the sample that leaves tap k in the same clock.
module rns_fir_channel
  import rns_pkg::*;
#(
  parameter int unsigned MOD        = M1,
  parameter int unsigned XW         = 8,
  parameter int unsigned TAPS       = 4,
  parameter int unsigned H [TAPS]   = '{3, 7, 11, 5}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x_bin,
  output rns_word_t     y,
  output logic [TAPS-1:0] tap_fault  // fault flag at the output of each tap
);
  localparam int unsigned B = RNS_W;

  rns_word_t enc;
  bin_to_residue #(.XW(XW), .MOD(MOD)) u_enc (.clk(clk), .rst_n(rst_n), .x_bin(x_bin), .r(enc));

  logic [B-1:0] y_c  [TAPS+1];
  logic         pc_c [TAPS+1];
  logic         f_c  [TAPS+1];
  logic [B-1:0] x_in [TAPS];
  logic [B-1:0] x_out [TAPS];
  logic         xe_in  [TAPS];
  logic         xe_out [TAPS];

  assign y_c[0]  = '0;
  assign pc_c[0] = 1'b0;
  assign f_c[0]  = enc.f;
  assign x_in[0] = enc.v;
  assign xe_in[0] = 1'b0;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    ipsp_m #(.B(B), .MOD(MOD), .A(H[k] % MOD)) u_tap (
      .clk(clk), .rst_n(rst_n),
      .y_in(y_c[k]), .pcon_in(pc_c[k]), .f_in(f_c[k]), .x_in(x_in[k]),
      .xerr_in(xe_in[k]),
      .y_out(y_c[k+1]), .pcon_out(pc_c[k+1]), .x_out(x_out[k]),
      .xerr_out(xe_out[k]), .f_out(f_c[k+1])
    );
    if (k + 1 < TAPS) begin : g_xdly
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          x_in[k+1]  <= '0;
          xe_in[k+1] <= 1'b0;
        end else begin
          x_in[k+1]  <= x_out[k];
          xe_in[k+1] <= xe_out[k];
        end
      end
    end
  end

  // The X word leaving the last tap and the encoder's parity bit (the taps
  // regenerate the X parity themselves) are not needed further.
  logic unused;
  assign unused = ^x_out[TAPS-1] ^ xe_out[TAPS-1] ^ enc.p;

  for (genvar k = 0; k < TAPS; k++) begin : g_tf
    assign tap_fault[k] = f_c[k+1];
  end

  assign y.v = y_c[TAPS];
  assign y.p = pc_c[TAPS];
  assign y.f = f_c[TAPS];

endmodule
