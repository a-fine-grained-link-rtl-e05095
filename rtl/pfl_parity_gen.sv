// Error coding of the PFL encoder: appends an even-parity bit to a flit.
//
// The receiver only has to notice that a wire went bad; a single parity bit
// detects any single-bit error, which is what a newly failed wire causes
// (see pfl_decoder). The code word is {parity, flit}: the parity bit travels
// on the top wire of the link. Purely combinational.
//
// The document asks for a basic code that detects a single bit fault; choosing
// even parity, and its position on the top wire, is this design's own choice.
module pfl_parity_gen #(
  parameter int unsigned W = 40            // link width in wires
) (
  input  logic [W-2:0] flit_i,             // flit content
  output logic [W-1:0] code_o              // code word driven onto the link
);
  always_comb code_o = {^flit_i, flit_i};
endmodule
