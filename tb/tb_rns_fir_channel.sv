// tb_rns_fir_channel: self-checking test of one residue channel (modulus 27,
// four taps 3, 7, 11, 5) fed with random 8-bit samples.
//
// The output must equal sum_k H[k]*x(n-k) mod 27, with its parity and a clear
// flag, exactly 1 + 4*5 = 21 clocks after x(n) is applied. Then one ROM bit of
// a cell in the second tap is held stuck at 0: no output may be wrong without
// its fault flag, and some outputs must be flagged.
module tb_rns_fir_channel;
  import rns_pkg::*;
  localparam int unsigned MOD = 27;
  localparam int unsigned TAPS = 4;
  localparam int unsigned H [TAPS] = '{3, 7, 11, 5};
  localparam int unsigned LAT = 1 + TAPS * RNS_W;
  localparam int unsigned N = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x_bin;
  rns_word_t y;
  logic [TAPS-1:0] tap_fault;
  int tap_seen [TAPS];

  int checks = 0, failures = 0, cyc = 0, detected = 0;
  bit faulty = 0;
  int unsigned xs [N];

  rns_fir_channel #(.MOD(MOD), .XW(8), .TAPS(TAPS), .H(H)) dut (.clk, .rst_n, .x_bin, .y, .tap_fault);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d expected %0d", what, cyc, got, exp);
    end
  endtask

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      int n;
      int unsigned acc;
      n = cyc - int'(LAT);
      if (n >= 0) begin
        acc = 0;
        for (int k = 0; k < int'(TAPS); k++) if (n - k >= 0) acc += H[k] * xs[n - k];
        acc = acc % MOD;
        if (faulty) begin
          for (int t = 0; t < int'(TAPS); t++) tap_seen[t] += int'(tap_fault[t]);
          if (y.f) detected++;
          else check("unflagged output correct", int'(y.v), int'(acc));
        end else begin
          check("value", int'(y.v), int'(acc));
          check("parity", int'(y.p), int'(^RNS_W'(acc)));
          check("flag", int'(y.f), 0);
          check("tap flags", int'(tap_fault), 0);
        end
      end
      if (cyc == N - 1) begin
        check("fault detected", int'(detected > 50), 1);
        // The stuck bit sits in tap 1: tap 0 stays clean, later taps flag.
        check("tap 0 clean", tap_seen[0], 0);
        check("tap 2 flags", int'(tap_seen[2] > 50), 1);
        $display("detected=%0d", detected);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      xs[cyc] = $urandom_range(0, 255);
      x_bin <= 8'(xs[cyc]);
      cyc++;
    end
  end

  initial begin
    x_bin = '0;
    for (int t = 0; t < int'(TAPS); t++) tap_seen[t] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (cyc == 2000);
    faulty = 1;
    force dut.g_tap[1].u_tap.g_cell[3].u_cell.rom_q[2] = 1'b0;
  end
endmodule
