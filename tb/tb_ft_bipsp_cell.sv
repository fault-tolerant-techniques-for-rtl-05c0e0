// tb_ft_bipsp_cell: self-checking test of the fault-detecting ring cell.
//
// Two cells are driven with random inputs: an IPSP cell (B = 4, modulus 13,
// adds 5 when its steering bit is set) and a preload cell (multiplies by 7).
// After every clock the outputs are compared with a reference worked out here:
// the ROM result or the bypassed input, the content parity, the rotated X
// word, the X parity chain and the fault flag. About one input in eight
// carries a wrong content parity, which the cell must flag, and fault flags
// arriving at the input must be passed on.
module tb_ft_bipsp_cell;
  localparam int unsigned B = 4;
  localparam int unsigned MOD = 13;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [B-1:0] y_in, x_in, y_out, x_out, y2_out, x2_out;
  logic pcon_in, px_in, f_in, pcon_out, px_out, f_out, pcon2_out, px2_out, f2_out;

  int checks = 0, failures = 0, flagged = 0;

  ft_bipsp_cell #(.B(B), .MOD(MOD), .KY(1), .C(5), .PRELOAD(1'b0)) dut (
    .clk, .rst_n, .y_in, .pcon_in, .x_in, .px_in, .f_in,
    .y_out, .pcon_out, .x_out, .px_out, .f_out);
  ft_bipsp_cell #(.B(B), .MOD(MOD), .KY(7), .C(0), .PRELOAD(1'b1)) dut2 (
    .clk, .rst_n, .y_in, .pcon_in, .x_in, .px_in, .f_in,
    .y_out(y2_out), .pcon_out(pcon2_out), .x_out(x2_out), .px_out(px2_out), .f_out(f2_out));

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned y, x, exp_y, exp2;
    logic bad_par, exp_f, xs;
    y_in = '0; x_in = '0; pcon_in = 0; px_in = 0; f_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      y = $urandom_range(0, 2 ** B - 1);
      x = $urandom_range(0, 2 ** B - 1);
      bad_par = ($urandom_range(0, 7) == 0);
      y_in = B'(y); x_in = B'(x);
      pcon_in = (^y_in) ^ bad_par;
      px_in = $urandom_range(0, 1);
      f_in = ($urandom_range(0, 15) == 0);
      @(negedge clk);
      xs = x_in[0];
      exp_y = xs ? (y + 5) % MOD : y;
      exp_f = f_in | bad_par;
      if (exp_f) flagged++;
      check("y_out", int'(y_out), int'(exp_y));
      check("pcon_out", int'(pcon_out), xs ? int'(^B'(exp_y)) : int'(pcon_in));
      check("x_out", int'(x_out), int'({x_in[0], x_in[B-1:1]}));
      check("px_out", int'(px_out), int'(px_in ^ xs));
      check("f_out", int'(f_out), int'(exp_f));
      exp2 = (7 * y) % MOD;
      check("pre y_out", int'(y2_out), int'(exp2));
      check("pre pcon_out", int'(pcon2_out), int'(^B'(exp2)));
      check("pre x_out", int'(x2_out), int'(x_in));
      check("pre px_out", int'(px2_out), int'(px_in));
      check("pre f_out", int'(f2_out), int'(exp_f));
    end
    check("some inputs flagged", int'(flagged > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
