// tb_pd_edge_sr: self-checking test of the type-2 edge phase detector.
// fo is a 16-cycle square wave and fi the same wave lagging by d cycles.
// After settling, the output must be high 16 - d cycles per period (from an
// fi edge to the next fo edge; always high for d = 0 because the fi preset
// wins). It also checks the reset value and that fo edges without fi edges
// toggle the flip-flop (its D input is its inverted output).
module tb_pd_edge_sr;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  localparam int P = 16;
  logic clk = 0, rst_n, fi, fo, pd, pd_n;
  pump_t pump;
  int checks = 0, failures = 0;

  pd_edge_sr dut (.*);

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
    fi = 0; fo = 0; rst_n = 0;
    repeat (3) @(posedge clk);
    #1 check(pd == 1'b1 && pd_n == 1'b0, "reset loads 1");
    for (int d = 0; d < P; d++) begin
      int high;
      high = 0;
      @(negedge clk) rst_n = 0;
      @(negedge clk) rst_n = 1;
      for (int t = 0; t < 4 * P; t++) begin
        @(negedge clk);
        fo = (t % P) < P / 2;
        fi = (((t - d + 4 * P) % P) < P / 2);
        @(posedge clk); #1;
        if (t >= 3 * P) high += int'(pd);
        if (pump.up != pd || pump.dn == pd) failures++;
      end
      check(high == ((d == 0) ? P : P - d), $sformatf("lag %0d: high %0d of %0d", d, high, P));
    end
    // fo edges alone toggle the flip-flop
    @(negedge clk) begin fi = 0; fo = 0; rst_n = 0; end
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) fo = 1;
      @(negedge clk) fo = 0;
      check(pd == k[0], $sformatf("fo edge %0d toggles to %0d", k, pd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
