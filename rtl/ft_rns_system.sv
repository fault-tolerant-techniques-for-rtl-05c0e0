// ft_rns_system: fault-tolerant residue number system FIR processor with one
// redundant channel (L = 3 moduli plus r = 1 redundant modulus).
//
// Idea. Arithmetic is split over independent residue channels, so a fault
// stays inside one channel. Every cell of every channel and decoder checks
// itself by parity and passes a fault flag along with the sample. Knowing
// which channel is wrong, one redundant channel is enough to correct a single
// faulty channel: it is dropped and the value is rebuilt from the other three.
//
// Structure:
//  * four rns_fir_channel instances, moduli M1, M2, M3 and the redundant MR
//    (rns_pkg), each encoding the binary input and filtering it with the same
//    coefficients H reduced modulo its modulus;
//  * four rns_decoder instances, each converting a different set of three
//    channels back to 15-bit binary (decoder 1 drops MR, decoder 2 drops M3,
//    decoder 3 drops M2, decoder 4 drops M1), their operand roles following
//    the source paper's decoder drawing;
//  * redundant_select, which outputs the first decoder whose flags are clear;
//  * fault_counter instances after every tap of every channel (the last tap's
//    counter counts the channel output) and on each decoder output, so the
//    whole pipeline can be monitored.
//
// Interface: x_bin is one unsigned sample per clock. y is the filtered value
// sum_k H[k]*x(n-k), valid while it stays below M1*M2*M3 = 15525 (true for
// the default 8-bit input and coefficients). ok is low only when no decoder is
// fault free; sel tells which decoder was used. ch_fault and dec_fault are the
// raw flags; tap_fault_count[k][t] counts flagged samples after tap t of
// channel k and dec_fault_count[d] those of decoder d, since reset or
// clear_counts.
//
// Timing: latency 1 + TAPS*5 + 42 + 1 clocks (64 with TAPS = 4) from x_bin to
// y, one sample per clock, no stalls.
//
// The moduli values, the filter (tap count, coefficients, input width) and the
// counter width are this design's choices; the source paper gives the structure
// and the decoder but not these numbers.
module ft_rns_system
  import rns_pkg::*;
#(
  parameter int unsigned XW         = 8,
  parameter int unsigned TAPS       = 4,
  parameter int unsigned H [TAPS]   = '{3, 7, 11, 5},
  parameter int unsigned CNT_W      = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [XW-1:0]    x_bin,
  input  logic             clear_counts,
  output logic [BIN_W-1:0] y,
  output logic             ok,
  output logic [1:0]       sel,
  output logic [3:0]       ch_fault,
  output logic [3:0]       dec_fault,
  output logic [CNT_W-1:0] tap_fault_count [4][TAPS],
  output logic [CNT_W-1:0] dec_fault_count [4]
);
  localparam int unsigned MODS [4] = '{M1, M2, M3, MR};

  rns_word_t        ch [4];
  logic [BIN_W-1:0] dec_y [4];

  for (genvar k = 0; k < 4; k++) begin : g_ch
    logic [TAPS-1:0] tap_fault;
    rns_fir_channel #(.MOD(MODS[k]), .XW(XW), .TAPS(TAPS), .H(H)) u_chan (
      .clk(clk), .rst_n(rst_n), .x_bin(x_bin), .y(ch[k]), .tap_fault(tap_fault)
    );
    assign ch_fault[k] = ch[k].f;
    // One monitor counter after every tap; the last one counts the channel
    // output.
    for (genvar t = 0; t < TAPS; t++) begin : g_tcnt
      fault_counter #(.W(CNT_W)) u_cnt (
        .clk(clk), .rst_n(rst_n), .clear(clear_counts), .fault(tap_fault[t]),
        .count(tap_fault_count[k][t])
      );
    end
  end

  // Decoder k uses the channels in roles (a, b, c); ch index 3 is MR.
  rns_decoder #(.MA(M1), .MB(M2), .MC(M3)) u_dec1 (
    .clk(clk), .rst_n(rst_n), .xa(ch[0]), .xb(ch[1]), .xc(ch[2]),
    .y(dec_y[0]), .fault(dec_fault[0]));
  rns_decoder #(.MA(M2), .MB(M1), .MC(MR)) u_dec2 (
    .clk(clk), .rst_n(rst_n), .xa(ch[1]), .xb(ch[0]), .xc(ch[3]),
    .y(dec_y[1]), .fault(dec_fault[1]));
  rns_decoder #(.MA(M3), .MB(M1), .MC(MR)) u_dec3 (
    .clk(clk), .rst_n(rst_n), .xa(ch[2]), .xb(ch[0]), .xc(ch[3]),
    .y(dec_y[2]), .fault(dec_fault[2]));
  rns_decoder #(.MA(MR), .MB(M2), .MC(M3)) u_dec4 (
    .clk(clk), .rst_n(rst_n), .xa(ch[3]), .xb(ch[1]), .xc(ch[2]),
    .y(dec_y[3]), .fault(dec_fault[3]));

  for (genvar k = 0; k < 4; k++) begin : g_dcnt
    fault_counter #(.W(CNT_W)) u_cnt (
      .clk(clk), .rst_n(rst_n), .clear(clear_counts), .fault(dec_fault[k]),
      .count(dec_fault_count[k])
    );
  end

  redundant_select #(.N_DEC(4)) u_sel (
    .clk(clk), .rst_n(rst_n), .dec_y(dec_y), .dec_fault(dec_fault),
    .y(y), .sel(sel), .ok(ok)
  );

endmodule
