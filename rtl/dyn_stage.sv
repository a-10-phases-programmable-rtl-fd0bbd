// dyn_stage: one two-phase dynamic storage stage of the phase chain.
//
// In the circuit the stored bit lives on the parasitic capacitance at the
// inputs of two inverters. SWITCH1 is closed while clk1 is high and charges
// the input of NOT2 from d; SWITCH2 is closed while clk2 is high and passes
// NOT2's output to the input of NOT3. q is NOT3's output, so each complete
// clk1-then-clk2 sequence moves d to q. Each capacitive node is written here
// as a level-sensitive latch, which is what the switch plus node amounts to;
// the latches are therefore intended and the latch warnings of lint tools
// stand. So do loop warnings on chains built from this stage: a loop that
// contains one stage is never transparent while the clocks do not overlap.
// The leakage of the capacitance (the node holds its value only for a short
// time) is not modelled.
//
// Reset (active high, asynchronous, overriding the clocks) follows the
// circuit: an NMOS pulls the NOT2 input to ground and a PMOS, gated by the
// inverted Reset (NOT4), pulls the NOT3 input to VDD, so q reads '0'.
//
// Interface: clk1, clk2 must be non-overlapping (supplied from outside).
// Timing: q changes only while clk2 is high (or on reset) and holds the value
// d had when clk1 last went low.
module dyn_stage (
  input  logic clk1,  // closes SWITCH1 while high
  input  logic clk2,  // closes SWITCH2 while high
  input  logic rst,   // Reset, active high
  input  logic d,     // value offered to SWITCH1
  output logic q      // output of NOT3
);

  logic not2_in;  // node behind SWITCH1
  logic not3_in;  // node behind SWITCH2

  always_latch begin
    if (rst)       not2_in = 1'b0;
    else if (clk1) not2_in = d;
  end

  always_latch begin
    if (rst)       not3_in = 1'b1;
    else if (clk2) not3_in = ~not2_in;
  end

  assign q = ~not3_in;

endmodule
