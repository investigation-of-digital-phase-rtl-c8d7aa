// tb_pd_counter: self-checking test of the expanded-range counter detector.
// fi and fo get rising edges at random, coincident ones included. The
// testbench counts the edges itself and, one clk later, expects
// diff = (fi edges - fo edges - 7) mod 16 after a load of B with 7, and the
// DAC code equal to diff with its top bit inverted. It also checks the
// reset, that the load wins over counting, and that the code sweeps the
// whole 0..15 range (wrapping) when fo runs slightly faster than fi.
module tb_pd_counter;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n, fi, fo, load_n;
  logic [3:0] cnt_a, cnt_b, diff, dac_code;
  int checks = 0, failures = 0;

  pd_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int na, nb, seen;
    logic [3:0] exp_d;
    fi = 0; fo = 0; rst_n = 0; load_n = 1;
    repeat (3) @(posedge clk);
    #1 check(cnt_a == 0 && cnt_b == 0, "reset clears both counters");
    @(negedge clk) begin rst_n = 1; load_n = 0; fo = 1; end
    @(negedge clk) begin load_n = 1; fo = 0; end
    check(cnt_b == 4'd7, "load of 0111 wins over an fo edge");
    na = 0; nb = 0;
    for (int k = 0; k < 2000; k++) begin
      bit ei, eo;
      ei = ($urandom_range(0, 2) == 0);
      eo = ($urandom_range(0, 2) == 0);
      @(negedge clk) begin fi = ei; fo = eo; end
      @(negedge clk) begin fi = 0; fo = 0; end
      na += int'(ei); nb += int'(eo);
      exp_d = 4'(na - nb - 7);
      check(diff == exp_d && dac_code == (exp_d ^ 4'b1000),
            $sformatf("after %0d/%0d edges: diff %0d code %0d", na, nb, diff, dac_code));
    end
    // fo faster than fi: the code must pass every value
    seen = 0;
    for (int t = 0; t < 17 * 16 * 16; t++) begin
      @(negedge clk);
      fo = (t % 16) < 8;
      fi = (t % 17) < 8;
      seen |= 1 << dac_code;
    end
    check(seen == 32'hFFFF, $sformatf("codes seen %h", seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
