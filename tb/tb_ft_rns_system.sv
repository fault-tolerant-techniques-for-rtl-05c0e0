// tb_ft_rns_system: end-to-end test of the fault-tolerant RNS FIR processor at
// its default parameters (4 taps, coefficients 3, 7, 11, 5, 8-bit input).
//
// A random 8-bit sample enters every clock. The output must be
// sum_k H[k]*x(n-k) exactly 64 clocks later whenever ok is high, and ok must
// stay high throughout, since at most one fault is present at a time. Single
// stuck-at faults are then placed, one after another, on internal bits:
//   1. a ROM data bit in channel m1,
//   2. a ROM data bit at the last cell of a tap in channel m2,
//   3. a ROM data bit at the last cell of channel m3 (caught by the decoders),
//   4. a y latch bit in the redundant channel,
//   5. a ROM bit inside decoder 1,
//   6. an X latch bit in channel m2 (caught by the X parity chain).
// Each must be detected (its channel or decoder flag rises) and corrected
// (another decoder takes over, output still right); faults 1-3 and 5 must
// make the selection move away from decoder 1. In fault-free stretches all
// flags must be clear and decoder 1 selected. At the end the eight fault
// counters must match the flags counted here, and clear_counts must zero them.
module tb_ft_rns_system;
  import rns_pkg::*;
  localparam int unsigned TAPS = 4;
  localparam int unsigned H [TAPS] = '{3, 7, 11, 5};
  localparam int LAT = 1 + int'(TAPS * RNS_W) + 7 * int'(RNS_W + 1) + 1;
  localparam int PH = 300;   // cycles a fault is held
  localparam int GAP = 100;  // fault-free cycles after each fault
  localparam int N_PH = 6;
  localparam int N = 200 + N_PH * (PH + GAP) + 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x_bin;
  logic clear_counts;
  logic [BIN_W-1:0] y;
  logic ok;
  logic [1:0] sel;
  logic [3:0] ch_fault, dec_fault;
  logic [15:0] tap_fault_count [4][TAPS];
  logic [15:0] dec_fault_count [4];

  ft_rns_system dut (
    .clk, .rst_n, .x_bin, .clear_counts, .y, .ok, .sel, .ch_fault, .dec_fault,
    .tap_fault_count, .dec_fault_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int unsigned xs [N + 10];
  bit done = 1'b0;
  int phase = 0;            // 0: none, 1..6: fault number held
  int last_fault_cyc = -1000;
  int ch_tally [4], dec_tally [4];
  int moved [N_PH + 1];     // outputs taken from decoders 2-4, per fault
  int seen [N_PH + 1];      // flags raised, per fault

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d expected %0d", what, cyc, got, exp);
    end
  endtask

  initial begin
    repeat (N + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checks and input drive at each negative edge.
  always @(negedge clk) begin
    if (rst_n && !done) begin
      int n;
      int unsigned acc;
      int attr;
      for (int k = 0; k < 4; k++) begin
        ch_tally[k]  += int'(ch_fault[k]);
        dec_tally[k] += int'(dec_fault[k]);
      end
      // The fault whose effects may still be in the pipeline.
      attr = (phase != 0) ? phase : ((cyc - last_fault_cyc < GAP) ? -1 : 0);
      if (attr > 0) begin
        if (sel != 2'd0) moved[attr]++;
        if (ch_fault != 4'd0 || dec_fault != 4'd0) seen[attr]++;
      end
      n = cyc - LAT;
      if (n >= 0) begin
        acc = 0;
        for (int k = 0; k < int'(TAPS); k++) if (n - k >= 0) acc += H[k] * xs[n - k];
        check("ok", int'(ok), 1);
        check("y", int'(y), int'(acc));
        if (attr == 0) begin
          check("decoder 1 selected", int'(sel), 0);
          check("channel flags clear", int'(ch_fault), 0);
          check("decoder flags clear", int'(dec_fault), 0);
        end
      end
      xs[cyc] = $urandom_range(0, 255);
      x_bin <= 8'(xs[cyc]);
      cyc++;
    end
  end

  task automatic hold(input int p);
    phase = p;
    repeat (PH) @(negedge clk);
    last_fault_cyc = cyc;
  endtask

  task automatic gap();
    phase = 0;
    repeat (GAP) @(negedge clk);
  endtask

  initial begin
    x_bin = '0;
    clear_counts = 1'b0;
    for (int k = 0; k < 4; k++) begin ch_tally[k] = 0; dec_tally[k] = 0; end
    for (int k = 0; k <= N_PH; k++) begin moved[k] = 0; seen[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (200) @(negedge clk);

    force dut.g_ch[0].u_chan.g_tap[2].u_tap.g_cell[1].u_cell.rom_q[0] = 1'b1;
    hold(1);
    release dut.g_ch[0].u_chan.g_tap[2].u_tap.g_cell[1].u_cell.rom_q[0];
    gap();
    force dut.g_ch[1].u_chan.g_tap[0].u_tap.g_cell[4].u_cell.rom_q[3] = 1'b0;
    hold(2);
    release dut.g_ch[1].u_chan.g_tap[0].u_tap.g_cell[4].u_cell.rom_q[3];
    gap();
    force dut.g_ch[2].u_chan.g_tap[3].u_tap.g_cell[4].u_cell.rom_q[1] = 1'b1;
    hold(3);
    release dut.g_ch[2].u_chan.g_tap[3].u_tap.g_cell[4].u_cell.rom_q[1];
    gap();
    force dut.g_ch[3].u_chan.g_tap[1].u_tap.g_cell[2].u_cell.y_q[2] = 1'b0;
    hold(4);
    release dut.g_ch[3].u_chan.g_tap[1].u_tap.g_cell[2].u_cell.y_q[2];
    gap();
    force dut.u_dec1.u_b4.g_cell[1].u_cell.rom_q[2] = 1'b1;
    hold(5);
    release dut.u_dec1.u_b4.g_cell[1].u_cell.rom_q[2];
    gap();
    force dut.g_ch[1].u_chan.g_tap[0].u_tap.g_cell[1].u_cell.x_q[2] = 1'b0;
    hold(6);
    release dut.g_ch[1].u_chan.g_tap[0].u_tap.g_cell[1].u_cell.x_q[2];
    gap();
    repeat (100) @(negedge clk);

    for (int p = 1; p <= N_PH; p++) begin
      $display("fault %0d: flagged cycles %0d, outputs from a redundant decoder %0d", p, seen[p], moved[p]);
      check($sformatf("fault %0d detected", p), int'(seen[p] > 20), 1);
      if (p != 4 && p != 6) check($sformatf("fault %0d corrected by another decoder", p), int'(moved[p] > 20), 1);
    end
    check("redundant channel flagged by fault 4", int'(ch_tally[3] > 20), 1);
    check("X parity chain flagged fault 6", int'(moved[6] > 0), 1);
    // Fault 1 sits in tap 2 of channel m1: its tap 0 and 1 counters stay at 0.
    check("tap counters locate fault 1", int'(tap_fault_count[0][0] == 0 && tap_fault_count[0][1] == 0 && tap_fault_count[0][2] > 0), 1);
    done = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      check($sformatf("channel %0d fault counter", k), int'(tap_fault_count[k][TAPS-1]), ch_tally[k]);
      check($sformatf("decoder %0d fault counter", k), int'(dec_fault_count[k]), dec_tally[k]);
    end
    clear_counts = 1'b1;
    @(negedge clk);
    clear_counts = 1'b0;
    for (int k = 0; k < 4; k++) begin
      for (int t = 0; t < int'(TAPS); t++)
        check("cleared tap counter", int'(tap_fault_count[k][t]), 0);
      check("cleared decoder counter", int'(dec_fault_count[k]), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
