// tb_ipsp_m: self-checking test of the word-level IPSP_m row
// (B = 5, modulus 23, fixed multiplier 9).
//
// Phase 1 streams one random (Y, X) pair per clock and checks, B clocks later,
// Y + 9*X mod 23, the content parity, the returned X word and a clear fault
// flag; the latency itself is checked by the index of the sample that comes
// out. Phase 2 sends samples with a wrong Y parity, which must be flagged.
// Phase 3 makes one ROM data bit of the middle cell stuck at 1 and one X latch
// bit of the first cell stuck at 0, one at a time: every output that comes out
// wrong must carry the fault flag, and some must come out flagged.
module tb_ipsp_m;
  localparam int unsigned B = 5;
  localparam int unsigned MOD = 23;
  localparam int unsigned A = 9;
  localparam int unsigned N = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [B-1:0] y_in, x_in, y_out, x_out;
  logic pcon_in, f_in, pcon_out, f_out, xerr_out;

  int checks = 0, failures = 0;
  int cyc = 0;
  int unsigned ys [N + 64];
  int unsigned xs [N + 64];
  logic bad [N + 64];
  int phase = 0, detected = 0, silent = 0;

  ipsp_m #(.B(B), .MOD(MOD), .A(A)) dut (
    .clk, .rst_n, .y_in, .pcon_in, .f_in, .x_in, .xerr_in(1'b0), .y_out, .pcon_out, .x_out, .xerr_out, .f_out);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d expected %0d", what, cyc, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Each negative edge first checks the sample driven B clocks earlier, then
  // drives the next one.
  always @(negedge clk) begin
    if (rst_n) begin
      int unsigned y, x, exp_y;
      int n;
      n = cyc - int'(B);
      if (n >= 0) begin
        exp_y = (ys[n] + A * xs[n]) % MOD;
        if (phase == 2 || phase == 3) begin
          if (int'(y_out) != int'(exp_y) || int'(x_out) != int'(xs[n])) begin
            checks++;
            if (!f_out) begin silent++; failures++; end
          end
          if (f_out) detected++;
        end else if (bad[n]) begin
          check("flag on bad parity", int'(f_out), 1);
        end else begin
          check("y_out", int'(y_out), int'(exp_y));
          check("pcon_out", int'(pcon_out), int'(^B'(exp_y)));
          check("x_out", int'(x_out), int'(xs[n]));
          check("f_out", int'(f_out), 0);
          check("xerr_out", int'(xerr_out), 0);
        end
      end
      y = $urandom_range(0, MOD - 1);
      x = $urandom_range(0, 2 ** B - 1);
      ys[cyc] = y; xs[cyc] = x;
      bad[cyc] = (phase == 1) && ($urandom_range(0, 3) == 0);
      y_in <= B'(y); x_in <= B'(x);
      pcon_in <= (^B'(y)) ^ bad[cyc];
      f_in <= 1'b0;
      cyc++;
    end
  end

  initial begin
    y_in = '0; x_in = '0; pcon_in = 0; f_in = 0;
    for (int i = 0; i < N + 64; i++) bad[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (cyc == 1000); phase = 1;
    wait (cyc == 1500); phase = 0;
    wait (cyc == 1600);
    phase = 2;
    force dut.g_cell[2].u_cell.rom_q[1] = 1'b1;
    wait (cyc == 2000);
    release dut.g_cell[2].u_cell.rom_q[1];
    wait (cyc == 2010);  // let the affected samples leave the row
    phase = 0;
    wait (cyc == 2100);
    phase = 3;
    force dut.g_cell[0].u_cell.x_q[3] = 1'b0;
    wait (cyc == 2500);
    release dut.g_cell[0].u_cell.x_q[3];
    check("faults were detected", int'(detected > 50), 1);
    check("no silent corruption", silent, 0);
    $display("detected=%0d", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
