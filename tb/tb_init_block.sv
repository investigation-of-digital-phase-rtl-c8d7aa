// tb_init_block: exhaustive self-checking test of the initialization block.
module tb_init_block;
  timeunit 1ns; timeprecision 1ps;

  logic r, neg, pd34, clr_n, pd3_set1_n, pd4_set1_n;
  int checks = 0, failures = 0;

  init_block dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {r, neg, pd34} = 3'(v);
      #1;
      check(clr_n == !r, $sformatf("clear, case %0d", v));
      check(pd3_set1_n == !(r && neg && !pd34), $sformatf("PD3 preset, case %0d", v));
      check(pd4_set1_n == !(r && neg &&  pd34), $sformatf("PD4 preset, case %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
