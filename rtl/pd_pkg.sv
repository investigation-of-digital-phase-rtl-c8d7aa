// pd_pkg: types and constants shared by the phase detectors and the tester.
//
// pump_t is the drive of a detector output that feeds a charge pump or a
// filter: `up` connects the output node to the positive supply (the
// p-channel transistor of the pump is on), `dn` connects it to ground (the
// n-channel transistor is on), and neither leaves the node floating so the
// filter holds its voltage. A plain logic output is represented as up = level,
// dn = ~level. pd_sel_e names the six detector modules that the tester can
// route to its test outputs; in the bench hardware this choice is made by
// plugging a module into the socket.
package pd_pkg;

  typedef struct packed {
    logic up;
    logic dn;
  } pump_t;

  typedef enum logic [2:0] {
    PD_XOR      = 3'd0,  // type 1, XOR gate
    PD_EDGE_SR  = 3'd1,  // type 2, set by fi edge, clocked by fo edge
    PD_PFD_ONE  = 3'd2,  // frequency sensitive, rising edges
    PD_PFD_BOTH = 3'd3,  // frequency sensitive, both edges
    PD_CASUAL   = 3'd4,  // for casual (intermittent) fi
    PD_COUNTER  = 3'd5   // expanded range, counters and subtractor
  } pd_sel_e;

  // Tester geometry: an 8-bit Johnson counter gives a 16-state cycle, so
  // f_osc = 16 * f_o and one tap is a phase step of pi/8.
  localparam int unsigned JOHNSON_BITS = 8;
  localparam int unsigned STEP_BITS    = 4;   // phase-step counter, 16 steps
  localparam int unsigned STEPS        = 16;

endpackage
