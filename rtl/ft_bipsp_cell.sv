// ft_bipsp_cell: universal bit-level inner product step cell over the ring
// R(MOD), with built-in parity fault detection.
//
// Function. One cell of a linear systolic array. With the cell's steering bit
// s (bit 0 of the rotated X word) it computes
//     y_out = s ? (KY*y + C) mod MOD : y
// For an IPSP_m stage i of a fixed multiplier A, KY = 1 and C = 2^i*A mod MOD,
// so B cells in a row form Y + A*X mod MOD. With PRELOAD = 1 the cell always
// takes the ROM path and does not consume an X bit; the decoder blocks use this
// for their first step (KY*A mod MOD).
//
// Structure, as in the source paper's universal cell with fault detection:
//  * latches on every input (y, its content parity, X, X parity, fault);
//  * a ROM of 2^B words of B+2 bits, addressed by the latched y, holding
//    {P_ad, P_con, data}: data = (KY*y + C) mod MOD, P_con = parity(data),
//    P_ad = parity(address);
//  * steering switches choosing between the ROM word {P_con, data} and the
//    latched input {P_con_in, y};
//  * the check: fault_out = fault_in | (P_ad ^ P_con_in). In a fault-free
//    array the address parity looked up here equals the content parity that
//    came with y from the previous cell, so a single fault in the ROM planes,
//    the address decoder, the switches or the y latches raises the flag. The
//    check runs whatever the steering bit is.
//  * the X word is rotated by one position per cell, so after B cells it is
//    back in its original order and every cell has the same wiring;
//  * the extra X parity chain: px_out = px_in ^ s. Fed with parity(X) at the
//    start of a B-cell row it ends at 0 unless an X bit was corrupted before
//    it steered a cell.
//
// Timing: all outputs are combinational from the input latches, so a cell adds
// one clock of latency and a row of cells moves y, X and the flags together.
// Reset (asynchronous, active low) clears the latches to the all-zero word,
// which has consistent parity.
//
// Own choices: the ROM has 2^B rows (every address, so an out-of-range address
// still reads a word with consistent parities), the steering bit is taken from
// bit 0 and the rotation is to the right, and the reset.
module ft_bipsp_cell #(
  parameter int unsigned B       = 4,   // ring element width (16 x 6 ROM)
  parameter int unsigned MOD     = 13,  // ring modulus, MOD <= 2**B
  parameter int unsigned KY      = 1,   // multiplier applied to y by the ROM
  parameter int unsigned C       = 1,   // constant added by the ROM
  parameter bit          PRELOAD = 1'b0 // 1: always steer to ROM, X untouched
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [B-1:0] y_in,
  input  logic         pcon_in,
  input  logic [B-1:0] x_in,
  input  logic         px_in,
  input  logic         f_in,
  output logic [B-1:0] y_out,
  output logic         pcon_out,
  output logic [B-1:0] x_out,
  output logic         px_out,
  output logic         f_out
);
  import rns_pkg::parity_of;

  localparam int unsigned ROWS = 2 ** B;
  typedef logic [B+1:0] rom_word_t;  // {P_ad, P_con, data[B-1:0]}

  function automatic rom_word_t rom_entry(input int unsigned addr);
    int unsigned d;
    rom_word_t   w;
    d = (KY * addr + C) % MOD;
    w[B-1:0] = B'(d);
    w[B]     = parity_of(d, B);
    w[B+1]   = parity_of(addr, B);
    return w;
  endfunction

  // The ROM contents are fixed at elaboration.
  rom_word_t rom [ROWS];
  for (genvar a = 0; a < ROWS; a++) begin : g_rom
    assign rom[a] = rom_entry(a);
  end

  logic [B-1:0] y_q, x_q;
  logic         pc_q, px_q, f_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q  <= '0;
      pc_q <= 1'b0;
      x_q  <= '0;
      px_q <= 1'b0;
      f_q  <= 1'b0;
    end else begin
      y_q  <= y_in;
      pc_q <= pcon_in;
      x_q  <= x_in;
      px_q <= px_in;
      f_q  <= f_in;
    end
  end

  rom_word_t rom_q;
  logic      steer;
  logic      p_ad;

  assign rom_q = rom[y_q];
  assign p_ad  = rom_q[B+1];
  assign steer = PRELOAD ? 1'b1 : x_q[0];

  always_comb begin
    if (steer) begin
      y_out    = rom_q[B-1:0];
      pcon_out = rom_q[B];
    end else begin
      y_out    = y_q;
      pcon_out = pc_q;
    end
    f_out = f_q | (p_ad ^ pc_q);
    if (PRELOAD) begin
      x_out  = x_q;
      px_out = px_q;
    end else begin
      x_out  = {x_q[0], x_q[B-1:1]};
      px_out = px_q ^ x_q[0];
    end
  end

endmodule
