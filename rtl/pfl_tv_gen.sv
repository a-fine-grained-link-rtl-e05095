// Test vector generator of the PFL encoder.
//
// On start_i it drives two link beats on consecutive cycles: TV1 = 1010...
// (wire 0 carries 1) and then its complement TV2 = 0101... Because the two
// patterns put both values on every wire, a wire stuck at either value
// delivers the same bit twice, and the receiver's XOR of the two received
// words is 0 exactly on the faulty wires.
// Timing: start_i in cycle t gives TV1 in cycle t+1 and TV2 in cycle t+2
// (registered outputs); done_o is high together with TV2. A start_i while busy
// is ignored.
// The two complementary patterns are those of the document's demonstration;
// the start/done handshake is this design's own.
module pfl_tv_gen #(
  parameter int unsigned W = 40            // link width in wires
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,            // begin a test vector pair
  output logic         valid_o,            // a test vector is on tv_o
  output logic [W-1:0] tv_o,               // test vector
  output logic         done_o              // second vector is on tv_o
);
  typedef enum logic [1:0] {TV_IDLE, TV_FIRST, TV_SECOND} tv_state_e;
  tv_state_e state_q;

  function automatic logic [W-1:0] pattern_1010();
    logic [W-1:0] p;
    for (int unsigned i = 0; i < W; i++) p[i] = (i % 2 == 0);
    return p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= TV_IDLE;
    else begin
      unique case (state_q)
        TV_IDLE:   if (start_i) state_q <= TV_FIRST;
        TV_FIRST:  state_q <= TV_SECOND;
        TV_SECOND: state_q <= TV_IDLE;
        default:   state_q <= TV_IDLE;
      endcase
    end
  end

  always_comb begin
    valid_o = (state_q != TV_IDLE);
    done_o  = (state_q == TV_SECOND);
    tv_o    = (state_q == TV_SECOND) ? ~pattern_1010() : pattern_1010();
  end
endmodule
