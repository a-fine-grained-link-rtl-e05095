// Error detection of the PFL decoder: checks the even parity of a received
// code word and returns the flit content.
//
// err_o is high when the word holds an odd number of ones, i.e. when a single
// wire (or any odd number of wires) delivered a wrong value. Combinational.
// The single-bit-fault detector follows the document; the parity code is this
// design's own choice and pairs with pfl_parity_gen.
module pfl_parity_chk #(
  parameter int unsigned W = 40            // link width in wires
) (
  input  logic [W-1:0] code_i,             // received (re-assembled) code word
  output logic [W-2:0] flit_o,             // flit content
  output logic         err_o               // parity violated
);
  always_comb begin
    flit_o = code_i[W-2:0];
    err_o  = ^code_i;
  end
endmodule
