// restart_nor: the wide NOR that keeps a '1' circulating in the phase chain.
//
// Each section reports whether it holds the token and will pass it on
// (its to_nor output). When none does, this gate outputs '1', which the input
// block injects as a new token. In the generator with ten phases it has nine
// inputs, one per section; N sets that number. It is purely combinational.
module restart_nor #(
  parameter int unsigned N = 9  // number of sections reporting
) (
  input  logic [N-1:0] to_nor,  // token reports of the sections
  output logic         restart  // '1' when no section reports a token
);

  assign restart = ~|to_nor;

endmodule
