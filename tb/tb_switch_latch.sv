// tb_switch_latch: self-checking test of the push-button debounce latch.
// Each simulated press bounces on the normally-open contact (it opens and
// closes several times) and each release bounces on the normally-closed one.
// The output must change exactly once per press and once per release, and
// q_n must always be the complement of q.
module tb_switch_latch;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n, s_n, r_n, q, q_n, q_prev;
  int checks = 0, failures = 0, rises = 0, falls = 0;

  switch_latch dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    q_prev <= q;
    if (rst_n && q && !q_prev) rises++;
    if (rst_n && !q && q_prev) falls++;
  end

  initial begin
    rst_n = 0; s_n = 1; r_n = 0;
    repeat (3) @(posedge clk);
    #1 check(!q && q_n, "power-on clear");
    rst_n = 1;
    for (int p = 0; p < 10; p++) begin
      // press: leave the normally-closed contact, bounce on the open one
      r_n = 1; repeat ($urandom_range(1, 4)) @(posedge clk);
      for (int b = 0; b < 5; b++) begin
        s_n = 0; repeat ($urandom_range(1, 3)) @(posedge clk);
        s_n = 1; repeat ($urandom_range(1, 3)) @(posedge clk);
      end
      s_n = 0; repeat (5) @(posedge clk);
      #1 check(q && !q_n, $sformatf("pressed %0d", p));
      // release
      s_n = 1; repeat ($urandom_range(1, 4)) @(posedge clk);
      for (int b = 0; b < 5; b++) begin
        r_n = 0; repeat ($urandom_range(1, 3)) @(posedge clk);
        r_n = 1; repeat ($urandom_range(1, 3)) @(posedge clk);
      end
      r_n = 0; repeat (5) @(posedge clk);
      #1 check(!q && q_n, $sformatf("released %0d", p));
    end
    check(rises == 10, $sformatf("%0d rising transitions for 10 presses", rises));
    check(falls == 10, $sformatf("%0d falling transitions for 10 releases", falls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
