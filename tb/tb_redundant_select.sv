// tb_redundant_select: random test of the decoder selection. Each clock four
// random decoder outputs and fault flags are applied; one clock later the
// output must be the first fault-free decoder's value and index, and ok must
// be low exactly when all four are flagged.
module tb_redundant_select;
  import rns_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [BIN_W-1:0] dec_y [4];
  logic [3:0] dec_fault;
  logic [BIN_W-1:0] y;
  logic [1:0] sel;
  logic ok;
  int checks = 0, failures = 0, n_none = 0;

  redundant_select #(.N_DEC(4)) dut (.clk, .rst_n, .dec_y, .dec_fault, .y, .sel, .ok);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first;
    for (int i = 0; i < 4; i++) dec_y[i] = '0;
    dec_fault = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) dec_y[i] = BIN_W'($urandom);
      dec_fault = 4'($urandom);
      first = -1;
      for (int i = 3; i >= 0; i--) if (!dec_fault[i]) first = i;
      @(negedge clk);
      check("ok", int'(ok), int'(first >= 0));
      if (first >= 0) begin
        check("sel", int'(sel), first);
        check("y", int'(y), int'(dec_y[first]));
      end else n_none++;
    end
    check("all-faulty case seen", int'(n_none > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
