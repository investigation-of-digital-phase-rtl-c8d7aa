// pd_edge_sr: type-2 phase detector working on the rising edges of fi and fo.
//
// In the reference circuit a pulse former (three inverters and a NAND gate)
// turns each rising edge of fi into a short low pulse on the asynchronous
// preset of a D flip-flop, so the flip-flop goes to 1. The flip-flop is
// clocked by fo and its D input is wired to its own inverted output, so a
// rising edge of fo clocks it back to 0 after it has been set. The mean of
// the output is therefore the fraction of a period from an fi edge to the
// next fo edge: a sawtooth phase-voltage response over 2*pi.
//
// This version is synchronous: fi and fo are sampled on clk, which must be
// much faster than them (in the tester it runs at least at f_osc, 16 times
// the signal rate). A sampled rising edge of fi stands for the preset pulse
// and, like the preset, wins over a simultaneous fo edge. With the D = /Q
// wiring kept, a second fo edge without an fi edge in between toggles the
// flip-flop back to 1, as the schematic does. Reset (rst_n low, synchronous)
// loads the flip-flop with INIT, whose default 1 is the initial condition of
// the reference simulation. Latency: one clk from an input edge to pd.
module pd_edge_sr
  import pd_pkg::*;
#(
  parameter bit INIT = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fi,
  input  logic  fo,
  output logic  pd,
  output logic  pd_n,
  output pump_t pump
);

  logic fi_d, fo_d, q;
  logic fi_rise, fo_rise;

  assign fi_rise = fi & ~fi_d;
  assign fo_rise = fo & ~fo_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fi_d <= fi;
      fo_d <= fo;
      q    <= INIT;
    end else begin
      fi_d <= fi;
      fo_d <= fo;
      if (fi_rise)      q <= 1'b1;   // preset pulse from the pulse former
      else if (fo_rise) q <= ~q;     // clocked by fo, D = /Q
    end
  end

  always_comb begin
    pd      = q;
    pd_n    = ~q;
    pump.up = q;
    pump.dn = ~q;
  end

endmodule
