// iclk_atom_in: the input block (ICLK_ATOM_IN) at the head of the phase chain.
//
// It receives the '1' made by the restart NOR (clk1st_in) and, one
// clk1/clk2 sequence later, offers it on clk1st_out to every section at once;
// only the section programmed as the first one takes it. The delay is the
// same two-phase dynamic stage as in a section (SWITCH1, NOT, SWITCH2, NOT,
// with the Reset transistors). Like a section it also has a phase output
// shaped by CLK_FILL: Nclk = CLK_FILL & clk1st_in, Pclk = ~Nclk.
//
// Structure follows the block's schematic; Nclk as the AND output (active
// high) follows the text's naming, as in iclk_atom.
//
// Timing: clk1st_out takes the value clk1st_in had at the end of the clk1
// pulse, while clk2 is high. Reset (active high) clears it.
module iclk_atom_in (
  input  logic clk1,        // first clock phase (SWITCH1)
  input  logic clk2,        // second clock phase (SWITCH2)
  input  logic rst,         // Reset, active high
  input  logic clk_fill,    // CLK_FILL
  input  logic clk1st_in,   // new token from the restart NOR
  output logic clk1st_out,  // token offered to all sections
  output logic nclk,        // CLK_FILL-shaped copy of clk1st_in
  output logic pclk         // its complement
);

  assign nclk = clk_fill & clk1st_in;
  assign pclk = ~nclk;

  dyn_stage u_stage (
    .clk1 (clk1),
    .clk2 (clk2),
    .rst  (rst),
    .d    (clk1st_in),
    .q    (clk1st_out)
  );

endmodule
