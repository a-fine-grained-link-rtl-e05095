// Fault vector calculation of the PFL decoder.
//
// Receives the two test vectors of a diagnosis on consecutive link beats
// (tv_valid_i). The first received word is held; when the second arrives the
// fault vector fv_o is loaded with their XOR: bit i is 1 when wire i carried
// both values (good wire) and 0 when it did not (faulty wire). fv_valid_o
// pulses for one cycle with the new vector, one cycle after the second beat.
// After reset the vector is all ones (every wire assumed good).
// The XOR of the two received test vectors is the document's; holding the
// first vector in a register is this design's own choice.
module pfl_fv_calc #(
  parameter int unsigned W = 40            // link width in wires
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tv_valid_i,         // a test vector beat arrives
  input  logic [W-1:0] tv_i,               // received test vector
  output logic [W-1:0] fv_o,               // fault vector, 1 = good wire
  output logic         fv_valid_o          // fv_o was just updated
);
  logic         second_q;                  // next beat is the second vector
  logic [W-1:0] first_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second_q   <= 1'b0;
      first_q    <= '0;
      fv_o       <= '1;
      fv_valid_o <= 1'b0;
    end else begin
      fv_valid_o <= 1'b0;
      if (tv_valid_i) begin
        if (!second_q) begin
          first_q  <= tv_i;
          second_q <= 1'b1;
        end else begin
          fv_o       <= first_q ^ tv_i;
          fv_valid_o <= 1'b1;
          second_q   <= 1'b0;
        end
      end
    end
  end
endmodule
