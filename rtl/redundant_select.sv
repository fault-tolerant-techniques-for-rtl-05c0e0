// redundant_select: picks a fault-free output among the N_DEC redundant
// decoders.
//
// Each decoder works on a different choice of L of the L+1 residue channels,
// and its fault flag is already the OR of the flags of the channels it uses and
// of its own cell checks, i.e. the OR over one combination of channel flags.
// The first decoder (lowest index) whose flag is clear gives the output. With a
// single faulty channel at least one decoder avoids it, so ok stays high; ok
// low means every decoder saw a fault and the output cannot be trusted.
//
// The selection rule is the source paper's; registering the result (one clock)
// and reporting the chosen index are this design's.
module redundant_select
  import rns_pkg::*;
#(
  parameter int unsigned N_DEC = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [BIN_W-1:0]         dec_y     [N_DEC],
  input  logic [N_DEC-1:0]         dec_fault,
  output logic [BIN_W-1:0]         y,
  output logic [$clog2(N_DEC)-1:0] sel,
  output logic                     ok
);
  logic [BIN_W-1:0]         y_d;
  logic [$clog2(N_DEC)-1:0] sel_d;
  logic                     ok_d;

  always_comb begin
    y_d   = '0;
    sel_d = '0;
    ok_d  = 1'b0;
    for (int i = N_DEC - 1; i >= 0; i--) begin
      if (!dec_fault[i]) begin
        y_d   = dec_y[i];
        sel_d = $clog2(N_DEC)'(i);
        ok_d  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y   <= '0;
      sel <= '0;
      ok  <= 1'b0;
    end else begin
      y   <= y_d;
      sel <= sel_d;
      ok  <= ok_d;
    end
  end

endmodule
