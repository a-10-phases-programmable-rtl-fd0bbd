// clkgen_10phase: programmable multi-phase clock generator for the control of
// a SAR ADC (ten phases by default).
//
// A single '1' (the token) circulates down a chain of sections, one section
// per cycle of an external non-overlapping two-phase clock (clk1, clk2). Each
// section holding the token drives its clock phase Nclk[k] (active high,
// trimmed by CLK_FILL) and its complement Pclk[k]. The token is stored
// dynamically between the switches of each section, not in flip-flops.
//
// Programming: bsi[NPHASES-1:0] (Bsi9..Bsi0). Section k (k = NPHASES-1..1)
// gets Bprog1 = bsi[k] and Bprog2 = bsi[k-1]. The phases start at the section
// of the first '0' counted from the top bit and stop at the section just above
// the second '0'. Without a second '0' the token leaves the last section on
// Nclk[0], the unshaped clk1st_out of section 1 (Pclk[0] is its inverse);
// bsi[0] = '0' switches Nclk[0] off. Example: 1111011110 gives phases 5..1,
// 0111111111 gives all ten.
//
// Restart: every section reports a token it will pass on to a NOR; when no
// section reports one, the NOR makes a new '1', the input block holds it for
// one cycle and offers it to all sections, and the programmed first section
// takes it. Because the last active section does not report (its Bprog2 is
// '0'), the new token arrives just as the old one dies, so the phases repeat
// with a period equal to the number of active phases.
//
// The topology (input block, chain of sections, BlockIn tied high and
// clk1st_in2 tied low at the top section, Pclk[0] made by an inverter)
// follows the generator's block diagram. NPHASES may be raised to lengthen
// the chain by more sections, as the design allows.
//
// Reset: active high, asynchronous; clears every stored token. After release
// the first clk1/clk2 sequence makes a token, and the first active phase is
// high from the second clk2 pulse on, for one full clock period.
// Latches: the dynamic storage nodes are level-sensitive latches by design.
// Lint and synthesis tools report a combinational loop from the input block's
// storage through the sections' OR gates and the restart NOR back to the input
// block. It stands: the loop passes one latch open on clk1 and one open on
// clk2, and with non-overlapping clocks it is never transparent end to end.
module clkgen_10phase #(
  parameter int unsigned NPHASES = 10  // number of clock phases (sections + 1)
) (
  input  logic               clk1,      // external clock, first phase
  input  logic               clk2,      // external clock, second phase
  input  logic               rst,       // Reset, active high
  input  logic               clk_fill,  // CLK_FILL: width of the phases
  input  logic [NPHASES-1:0] bsi,       // programming bits Bsi
  output logic [NPHASES-1:0] nclk,      // clock phases, active high
  output logic [NPHASES-1:0] pclk,      // complementary clock phases
  output logic               nclk_x,    // phase output of the input block
  output logic               pclk_x     // its complement
);

  localparam int unsigned NSEC = NPHASES - 1;  // sections k = NSEC..1

  logic               first_tok;  // input block's clk1st_out
  logic               restart;    // restart NOR output
  logic [NPHASES-1:0] blk;        // blk[k]: BlockIn of section k
  logic [NPHASES-1:0] tok;        // tok[k]: clk1st_in2 of section k
  logic [NSEC:1]      to_nor;

  iclk_atom_in u_in (
    .clk1       (clk1),
    .clk2       (clk2),
    .rst        (rst),
    .clk_fill   (clk_fill),
    .clk1st_in  (restart),
    .clk1st_out (first_tok),
    .nclk       (nclk_x),
    .pclk       (pclk_x)
  );

  assign blk[NSEC] = 1'b1;  // BlockIn of the top section tied to VDD
  assign tok[NSEC] = 1'b0;  // clk1st_in2 of the top section tied to ground

  for (genvar k = NSEC; k >= 1; k--) begin : g_sec
    iclk_atom u_atom (
      .clk1       (clk1),
      .clk2       (clk2),
      .rst        (rst),
      .clk_fill   (clk_fill),
      .bprog1     (bsi[k]),
      .bprog2     (bsi[k-1]),
      .block_in   (blk[k]),
      .clk1st_in1 (first_tok),
      .clk1st_in2 (tok[k]),
      .block_out  (blk[k-1]),
      .clk1st_out (tok[k-1]),
      .to_nor     (to_nor[k]),
      .nclk       (nclk[k]),
      .pclk       (pclk[k])
    );
  end

  // The token leaving section 1 is phase 0, taken without CLK_FILL shaping.
  assign nclk[0] = tok[0];
  assign pclk[0] = ~tok[0];

  restart_nor #(.N(NSEC)) u_nor (
    .to_nor  (to_nor),
    .restart (restart)
  );

  // blk[0] (BlockOut of section 1) is left open, as in the block diagram.
  logic unused_blk0;
  assign unused_blk0 = blk[0];

endmodule
