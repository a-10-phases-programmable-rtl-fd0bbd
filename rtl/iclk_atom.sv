// iclk_atom: one section (ICLK_ATOM) of the programmable multi-phase clock
// generator. It produces one clock phase.
//
// How it works. The section's OR gate is '1' when the section holds the
// circulating '1' (the token). It gets the token either from the preceding
// section (clk1st_in2) or, if the section is the programmed first one, from
// the chain's input block (clk1st_in1, offered to all sections at once). The
// section is the first one when its own programming bit Bprog1 is '0' and the
// BlockIn chain is still '1', i.e. when no section above it had a '0' bit:
//   AND1 = ~Bprog1 & BlockIn & clk1st_in1      (NOT1 feeds ~Bprog1)
//   OR   = AND1 | clk1st_in2
//   BlockOut = BlockIn & Bprog1                (AND5: a '0' blocks all below)
// The OR output is the clock phase, trimmed by CLK_FILL (AND4, NOT5):
//   Nclk = CLK_FILL & OR,  Pclk = ~Nclk
// and is reported to the restart NOR only if Bprog2 (the next bit down) lets
// the token continue:  to_nor = Bprog2 & OR  (AND3).
// The OR output then passes one two-phase dynamic stage (SWITCH1, NOT2,
// SWITCH2, NOT3) and AND2 with Bprog2: clk1st_out = Bprog2 & stage output.
// A '0' in Bprog2 thus ends the chain after this section.
//
// All gates and connections follow the section's schematic. The naming
// Nclk = AND4 output (active high, for NMOS gates) and Pclk = its complement
// follows the text, which says Nclk drives the NMOS transistors.
//
// Timing: the token entering on clk2 high of one cycle leaves on clk2 high of
// the next cycle, so OR (and Nclk, where CLK_FILL is high) is '1' for one
// full clk1/clk2 period.
module iclk_atom (
  input  logic clk1,        // first clock phase (SWITCH1)
  input  logic clk2,        // second clock phase (SWITCH2)
  input  logic rst,         // Reset, active high
  input  logic clk_fill,    // CLK_FILL: shapes the width of Nclk/Pclk
  input  logic bprog1,      // this section's programming bit
  input  logic bprog2,      // programming bit of the next section down
  input  logic block_in,    // BlockIn: '1' while no '0' bit above
  input  logic clk1st_in1,  // new token offered by the chain's input block
  input  logic clk1st_in2,  // token from the preceding section
  output logic block_out,   // BlockOut to the next section
  output logic clk1st_out,  // token to the next section
  output logic to_nor,      // token report to the restart NOR
  output logic nclk,        // clock phase, active high
  output logic pclk         // complementary clock phase, active low
);

  logic and1;
  logic or_out;
  logic held;

  assign and1      = ~bprog1 & block_in & clk1st_in1;
  assign or_out    = and1 | clk1st_in2;
  assign block_out = block_in & bprog1;
  assign to_nor    = bprog2 & or_out;
  assign nclk      = clk_fill & or_out;
  assign pclk      = ~nclk;

  dyn_stage u_stage (
    .clk1 (clk1),
    .clk2 (clk2),
    .rst  (rst),
    .d    (or_out),
    .q    (held)
  );

  assign clk1st_out = bprog2 & held;

endmodule
