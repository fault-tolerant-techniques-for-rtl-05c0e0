// tb_rns_decoder: self-checking test of the residue-to-binary decoder.
//
// Two decoders are fed the residues of the same random X < 23*25*27, one per
// clock: one with the moduli (23, 25, 27) and one with (31, 25, 27), the
// arrangement of the decoder that uses the redundant channel in place of the
// first. 42 clocks later both must output X with a clear flag. About one
// sample in eight carries a channel fault flag or a wrong residue parity on
// one input; it must come out flagged. Finally one ROM bit of the last cell
// of the first decoder is held at 1: no wrong value may leave unflagged.
module tb_rns_decoder;
  import rns_pkg::*;
  localparam int unsigned LAT = 7 * (RNS_W + 1);
  localparam int unsigned N = 3000;
  localparam int unsigned M = M1 * M2 * M3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  rns_word_t xa, xb, xc, xr;
  logic [BIN_W-1:0] y1, y4;
  logic f1, f4;

  int checks = 0, failures = 0, cyc = 0, n_wrong = 0;
  bit stuck = 1'b0;
  int unsigned xs [N];
  logic ef [N];

  rns_decoder #(.MA(M1), .MB(M2), .MC(M3)) dut (.clk, .rst_n, .xa(xa), .xb(xb), .xc(xc), .y(y1), .fault(f1));
  rns_decoder #(.MA(MR), .MB(M2), .MC(M3)) dut4 (.clk, .rst_n, .xa(xr), .xb(xb), .xc(xc), .y(y4), .fault(f4));

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

  function automatic rns_word_t enc(input int unsigned x, input int unsigned m);
    rns_word_t w;
    w.v = RNS_W'(x % m);
    w.p = ^w.v;
    w.f = 1'b0;
    return w;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      int n, kind;
      int unsigned x;
      n = cyc - int'(LAT);
      if (n >= 0 && stuck) begin
        // A stuck ROM bit in the last block of the first decoder: any wrong
        // output must be flagged.
        if (int'(y1) != int'(xs[n])) begin
          checks++;
          if (!f1) begin failures++; $display("FAIL unflagged wrong output at cycle %0d", cyc); end
          n_wrong++;
        end
      end else if (n >= 0) begin
        check("flag", int'(f1), int'(ef[n]));
        check("flag (redundant set)", int'(f4), int'(ef[n]));
        if (!ef[n]) begin
          check("value", int'(y1), int'(xs[n]));
          check("value (redundant set)", int'(y4), int'(xs[n]));
        end
      end
      if (cyc == N - 1) begin
        check("stuck bit produced wrong outputs", int'(n_wrong > 20), 1);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      x = (cyc % 50 == 0) ? ((cyc / 50) % 2 == 0 ? 0 : M - 1) : $urandom_range(0, M - 1);
      xs[cyc] = x;
      kind = $urandom_range(0, 15);
      xa <= enc(x, M1);
      xr <= enc(x, MR);
      xb <= enc(x, M2) ^ {RNS_W'(0), 1'b0, kind == 0};  // channel flag
      xc <= enc(x, M3) ^ {RNS_W'(0), kind == 1, 1'b0};  // wrong parity
      ef[cyc] = (kind <= 1);
      cyc++;
    end
  end

  initial begin
    xa = '0; xb = '0; xc = '0; xr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (cyc == 2400);
    force dut.u_b10.g_cell[4].u_cell.rom_q[3] = 1'b1;
    stuck = 1'b1;
  end
endmodule
