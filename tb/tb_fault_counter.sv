// tb_fault_counter: random test of the fault monitor counter with a 4-bit
// count, so that saturation is reached. A reference count is kept here and
// compared every clock, including the synchronous clear.
module tb_fault_counter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear, fault;
  logic [3:0] count;
  int checks = 0, failures = 0, ref_cnt = 0, n_sat = 0;

  fault_counter #(.W(4)) dut (.clk, .rst_n, .clear, .fault, .count);

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
    clear = 0; fault = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      clear = ($urandom_range(0, 60) == 0);
      fault = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (clear) ref_cnt = 0;
      else if (fault && ref_cnt < 15) ref_cnt++;
      if (ref_cnt == 15) n_sat++;
      check("count", int'(count), ref_cnt);
    end
    check("saturation reached", int'(n_sat > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
