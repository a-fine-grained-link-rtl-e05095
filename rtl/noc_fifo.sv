// Flit FIFO: used as one virtual-channel input buffer and as the output
// buffer of each router port.
//
// A circular buffer of DEPTH entries. push_i writes din_i at the tail,
// pop_i removes the head; both may happen in the same cycle. dout_o shows
// the head whenever empty_o is low (first-word fall-through). Pushing into a
// full FIFO or popping an empty one is a protocol error (asserted).
// The buffer depth default of 6 flits per VC follows the evaluated system;
// the FIFO organisation is this design's own choice.
module noc_fifo #(
  parameter int unsigned WIDTH = 39,
  parameter int unsigned DEPTH = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,
  input  logic [WIDTH-1:0] din_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] dout_o,
  output logic             empty_o,
  output logic             full_o
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_q, wr_q;
  logic [PW:0]      cnt_q;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    dout_o  = mem[rd_q];
    empty_o = (cnt_q == '0);
    full_o  = (cnt_q == (PW+1)'(DEPTH));
  end

  always_ff @(posedge clk) begin
    if (push_i) mem[wr_q] <= din_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push_i) wr_q <= inc(wr_q);
      if (pop_i)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (PW+1)'(push_i) - (PW+1)'(pop_i);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push_i |-> (!full_o || pop_i));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o);
endmodule
