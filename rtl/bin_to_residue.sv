// bin_to_residue: encoder from an unsigned binary sample to its residue
// modulo MOD, the entry point of one RNS channel.
//
// The residue is x_bin mod MOD (reduction by a constant, left to synthesis),
// registered together with its content parity so that the first cell that
// uses it can check it. The fault flag leaves the encoder clear (a constant 0:
// nothing upstream can flag a sample). The source paper
// only names the binary encoding; this simple form is this design's.
//
// Timing: one clock of latency, one sample per clock; asynchronous active-low
// reset to the zero residue.
module bin_to_residue
  import rns_pkg::*;
#(
  parameter int unsigned XW  = 8,   // binary sample width
  parameter int unsigned MOD = M1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x_bin,
  output rns_word_t     r
);
  logic [RNS_W-1:0] res;

  assign res = RNS_W'(x_bin % XW'(MOD));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0;
    end else begin
      r.v <= res;
      r.p <= ^res;
      r.f <= 1'b0;
    end
  end

endmodule
