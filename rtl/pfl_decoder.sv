// PFL decoder: receiver side of one partially faulty link.
//
// How it works. A demultiplexer separates test vector beats (link_tv_i) from
// data beats. Healthy link (m = 0): the beat is the code word; it is parity
// checked and passed to the input buffer (fault-free path). Degraded link
// (m > 0): a flit arrives as m + 1 beats, beat k rotated left by k wires. The
// barrel de-shifter rotates beat k back by k; the fault vector, de-shifted by
// one wire per beat by the single-bit de-shifter, marks which of those bits
// came over good wires; the first good copy of each bit is written into the
// flit re-assembly buffer and later copies of that bit are ignored, so a wire
// that fails after the last diagnosis corrupts at most the bits it is the
// first good wire for.
// After the last beat the re-assembled word is parity checked and delivered
// (data recovery path). A parity error raises nack_o in that same cycle; the
// flit is dropped and data beats are ignored until the sender's two test
// vectors arrive (reconfiguration path). Their XOR is the new fault vector,
// its longest faulty run the new m, which is kept here and sent back on
// m_valid_o/m_o.
//
// Interface. link_* inputs come from the sender. flit_o/valid_o go to the
// router input buffer (no back-pressure: the router's credits guarantee
// room). nack_o is combinational from the link inputs; m_valid_o/m_o are
// registered. fv_o and m_o show the current configuration.
//
// Timing. A flit is delivered in the cycle of its last beat. m returns two
// cycles after the second test vector.
//
// The three paths, fault vector, barrel de-shifters, re-assembly buffer,
// error detection and sending m back follow the document's decoder figure.
// The nack handshake, and keeping the fault vector unrotated beside a working
// copy that the single-bit de-shifter turns, are this design's own choices.
module pfl_decoder #(
  parameter int unsigned W     = 40,               // link width in wires
  parameter int unsigned SEG_W = $clog2(W + 1)     // width of m (0..W)
) (
  input  logic             clk,
  input  logic             rst_n,
  // forward link wires
  input  logic             link_valid_i,
  input  logic             link_tv_i,
  input  logic [W-1:0]     link_data_i,
  // backward link wires
  output logic             nack_o,
  output logic             m_valid_o,
  output logic [SEG_W-1:0] m_o,
  // to the input buffer
  output logic             valid_o,
  output logic [W-2:0]     flit_o,
  // status
  output logic [W-1:0]     fv_o,           // fault vector, 1 = good wire
  output logic             err_o           // error detected this cycle
);
  logic [SEG_W-1:0] m_q, beat_q, m_new;
  logic [W-1:0]     fv_calc, fv_rot_q, asm_q, saved_q, saved, mask, deshift, merged, word;
  logic             fv_valid, wait_tv_q, data_beat, last, err;
  logic [W-2:0]     chk_flit;

  // reconfiguration path
  pfl_fv_calc #(.W(W)) u_fvcalc (
    .clk, .rst_n, .tv_valid_i(link_valid_i && link_tv_i), .tv_i(link_data_i),
    .fv_o(fv_calc), .fv_valid_o(fv_valid)
  );
  pfl_max_seg #(.W(W), .SEG_W(SEG_W)) u_maxseg (.fv_i(fv_calc), .m_o(m_new));

  pfl_parity_chk #(.W(W)) u_detect (.code_i(word), .flit_o(chk_flit), .err_o(err));

  always_comb begin
    data_beat = link_valid_i && !link_tv_i && !wait_tv_q;
    // barrel de-shifter: position j takes wire (j + beat) mod W
    for (int unsigned j = 0; j < W; j++)
      deshift[j] = link_data_i[(j + 32'(beat_q)) % W];
    mask   = (beat_q == '0) ? fv_o : fv_rot_q;
    saved  = (beat_q == '0) ? '0 : saved_q;
    // keep the first copy of each bit that crossed a good wire
    for (int unsigned j = 0; j < W; j++)
      merged[j] = (mask[j] && !saved[j]) ? deshift[j] : asm_q[j];
    word   = (m_q == '0) ? link_data_i : merged;  // fault-free / recovery
    last   = (beat_q == m_q);
    nack_o  = data_beat && last && err;
    valid_o = data_beat && last && !err;
    flit_o  = chk_flit;
    err_o   = nack_o;
    m_o     = m_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q       <= '0;
      beat_q    <= '0;
      fv_o      <= '1;
      fv_rot_q  <= '1;
      asm_q     <= '0;
      saved_q   <= '0;
      wait_tv_q <= 1'b0;
      m_valid_o <= 1'b0;
    end else begin
      m_valid_o <= 1'b0;
      if (data_beat) begin
        asm_q    <= merged;
        saved_q  <= saved | mask;
        fv_rot_q <= {mask[0], mask[W-1:1]};     // single-bit de-shifter
        beat_q   <= last ? '0 : beat_q + 1'b1;
        if (nack_o) wait_tv_q <= 1'b1;
      end
      if (fv_valid) begin
        fv_o      <= fv_calc;
        m_q       <= m_new;
        m_valid_o <= 1'b1;
        beat_q    <= '0;
        wait_tv_q <= 1'b0;
      end
    end
  end

endmodule
