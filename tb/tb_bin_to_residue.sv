// tb_bin_to_residue: exhaustive test of the binary-to-residue encoder for
// 8-bit inputs and the moduli 23 and 31: residue, parity and clear flag one
// clock after each input.
module tb_bin_to_residue;
  import rns_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x_bin;
  rns_word_t r23, r31;
  int checks = 0, failures = 0;

  bin_to_residue #(.XW(8), .MOD(23)) dut (.clk, .rst_n, .x_bin, .r(r23));
  bin_to_residue #(.XW(8), .MOD(31)) dut31 (.clk, .rst_n, .x_bin, .r(r31));

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_bin = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int x = 0; x < 256; x++) begin
      x_bin = 8'(x);
      @(negedge clk);
      check("residue mod 23", int'(r23.v), x % 23);
      check("parity", int'(r23.p), int'(^5'(x % 23)));
      check("flag", int'(r23.f), 0);
      check("residue mod 31", int'(r31.v), x % 31);
      check("parity 31", int'(r31.p), int'(^5'(x % 31)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
