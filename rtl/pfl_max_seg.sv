// Max fault segment size calculation of the PFL decoder.
//
// Returns m, the length of the longest run of adjacent faulty wires (zeros of
// the fault vector). Runs are counted around the link circularly, because the
// sender rotates flits circularly: a run that wraps from the top wire to wire
// 0 is one run. m = W when every wire is faulty (link unusable).
// A flit then needs L = m + 1 beats. Combinational: one pass over the vector
// written twice end to end, so that wrapped runs are seen whole.
// The quantity m and L = m + 1 are the document's; the circular counting is
// what the rotation requires.
module pfl_max_seg #(
  parameter int unsigned W     = 40,               // link width in wires
  parameter int unsigned SEG_W = $clog2(W + 1)     // width of m (0..W)
) (
  input  logic [W-1:0]     fv_i,           // fault vector, 1 = good wire
  output logic [SEG_W-1:0] m_o             // longest faulty run, 0..W
);
  always_comb begin
    logic [SEG_W:0] run, best;
    run  = '0;
    best = '0;
    for (int unsigned i = 0; i < 2 * W; i++) begin
      if (fv_i[i % W]) run = '0;
      else             run = run + 1'b1;
      if (run > best)  best = run;
    end
    m_o = (best > (SEG_W+1)'(W)) ? SEG_W'(W) : best[SEG_W-1:0];
  end
endmodule
