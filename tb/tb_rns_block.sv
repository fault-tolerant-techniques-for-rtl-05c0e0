// tb_rns_block: self-checking test of one decoder block,
// r = (4*a + 19*b) mod 23, with 5-bit operands that need not be reduced.
//
// One random (a, b) pair per clock; 6 clocks later the result, its content
// parity and the fault flag (the OR of the two input flags) are compared with
// values computed here. Some inputs arrive with a fault flag set and some with
// a wrong parity on a or on b: both must leave flagged, the latter through the
// address check of the preload cell and the X parity chain respectively.
module tb_rns_block;
  import rns_pkg::*;
  localparam int unsigned LAT = RNS_W + 1;
  localparam int unsigned N = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  rns_word_t a, b, r;

  int checks = 0, failures = 0, cyc = 0, n_flag = 0;
  int unsigned as_ [N], bs_ [N];
  logic ef [N];

  rns_block #(.MOD(23), .KA(4), .KB(19)) dut (.clk, .rst_n, .a, .b, .r);

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
      int n, kind;
      int unsigned exp_v;
      n = cyc - int'(LAT);
      if (n >= 0) begin
        exp_v = (4 * as_[n] + 19 * bs_[n]) % 23;
        check("fault flag", int'(r.f), int'(ef[n]));
        if (!ef[n]) begin
          check("value", int'(r.v), int'(exp_v));
          check("parity", int'(r.p), int'(^RNS_W'(exp_v)));
        end
      end
      if (cyc == N - 1) begin
        check("flagged samples seen", int'(n_flag > 200), 1);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      as_[cyc] = $urandom_range(0, 31);
      bs_[cyc] = $urandom_range(0, 31);
      kind = $urandom_range(0, 15);
      a.v <= RNS_W'(as_[cyc]);
      b.v <= RNS_W'(bs_[cyc]);
      a.p <= (^RNS_W'(as_[cyc])) ^ (kind == 0);
      b.p <= (^RNS_W'(bs_[cyc])) ^ (kind == 1);
      a.f <= (kind == 2);
      b.f <= (kind == 3);
      ef[cyc] = (kind <= 3);
      if (kind <= 3) n_flag++;
      cyc++;
    end
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end
endmodule
