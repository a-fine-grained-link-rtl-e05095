// PFL encoder: sender side of one partially faulty link.
//
// How it works. Every flit is parity-coded and, while the link is healthy
// (m = 0), sent in one beat (fault-free path). When the receiver reports a
// corrupted flit (nack_i, raised combinationally in the flit's last beat), the
// encoder keeps the flit in its flit buffer and sends the two test vectors
// (reconfiguration path). The receiver answers with m, the longest run of
// faulty wires, which is stored in the m register. From then on each flit is
// sent L = m + 1 times (data recovery path): beat k carries the code word
// rotated left by k wires, produced by a single-bit barrel shifter applied to
// a working copy once per beat. Every data bit therefore crosses m + 1
// adjacent wires, at least one of which is good. The flit that failed is sent
// again after the new m arrives. If m = W no wire is usable: the link is
// marked dead and accepts nothing more.
//
// Interface. flit_i/valid_i/ready_o: one flit is taken in a cycle where both
// valid_i and ready_o are high. link_* outputs are registered (or chosen
// among registers). nack_i, m_valid_i, m_i come back from the receiver.
// m_o is the m register, offered to the router's switch allocator; busy_o
// reports that a flit is still in flight, under diagnosis or being resent.
//
// Timing. Healthy link: one flit per cycle. Degraded link: one flit per
// m + 1 cycles; ready_o is high in a flit's last beat so flits follow back
// to back. Diagnosis: TV1 and TV2 on the two cycles after the nack, m returns
// a few cycles later, then the failed flit is resent.
//
// The paths, the m register, flit buffer, single-bit barrel shifter and test
// vector generator follow the document's encoder figure. The nack/m
// handshake, keeping an unrotated copy of the flit for resending, and the
// dead-link state are this design's own choices.
module pfl_encoder #(
  parameter int unsigned W     = 40,               // link width in wires
  parameter int unsigned SEG_W = $clog2(W + 1)     // width of m (0..W)
) (
  input  logic             clk,
  input  logic             rst_n,
  // flit from the output buffer
  input  logic             valid_i,
  input  logic [W-2:0]     flit_i,
  output logic             ready_o,
  // forward link wires
  output logic             link_valid_o,   // a beat is on link_data_o
  output logic             link_tv_o,      // the beat is a test vector
  output logic [W-1:0]     link_data_o,
  // backward link wires
  input  logic             nack_i,         // last beat's flit was corrupted
  input  logic             m_valid_i,      // new max fault segment size
  input  logic [SEG_W-1:0] m_i,
  // status
  output logic [SEG_W-1:0] m_o,            // m register (to the SA stage)
  output logic             dead_o,         // no usable wire left
  output logic             busy_o
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_DIAG, S_WAIT_M} enc_state_e;
  enc_state_e       state_q;
  logic [SEG_W-1:0] m_q;
  logic [SEG_W-1:0] beat_q;                // beat of the flit on the wires
  logic [W-1:0]     flit_buf_q;            // coded flit, kept until accepted
  logic [W-1:0]     shift_q;               // next rotated copy to send
  logic             dvalid_q;
  logic [W-1:0]     ddata_q;
  logic             dead_q;
  logic [W-1:0]     code;
  logic             last_beat, accept, tv_start, tv_valid, tv_done;
  logic [W-1:0]     tv_word;

  pfl_parity_gen #(.W(W)) u_coding (.flit_i(flit_i), .code_o(code));

  pfl_tv_gen #(.W(W)) u_tvgen (
    .clk, .rst_n, .start_i(tv_start), .valid_o(tv_valid), .tv_o(tv_word),
    .done_o(tv_done)
  );

  always_comb begin
    last_beat = (state_q == S_SEND) && (beat_q == m_q);
    ready_o   = !dead_q && ((state_q == S_IDLE) || (last_beat && !nack_i));
    accept    = valid_i && ready_o;
    tv_start  = last_beat && nack_i;
    // output multiplexer: test vectors or data beats
    link_valid_o = tv_valid || dvalid_q;
    link_tv_o    = tv_valid;
    link_data_o  = tv_valid ? tv_word : ddata_q;
    m_o    = m_q;
    dead_o = dead_q;
    busy_o = (state_q != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      m_q        <= '0;
      beat_q     <= '0;
      flit_buf_q <= '0;
      shift_q    <= '0;
      dvalid_q   <= 1'b0;
      ddata_q    <= '0;
      dead_q     <= 1'b0;
    end else begin
      if (m_valid_i) begin
        m_q    <= m_i;
        dead_q <= (m_i >= SEG_W'(W));
      end
      dvalid_q <= 1'b0;
      unique case (state_q)
        S_IDLE, S_SEND: begin
          if (state_q == S_SEND && !last_beat) begin
            // data recovery path: next rotated copy
            dvalid_q <= 1'b1;
            ddata_q  <= shift_q;
            shift_q  <= {shift_q[W-2:0], shift_q[W-1]};
            beat_q   <= beat_q + 1'b1;
          end else if (tv_start) begin
            state_q <= S_DIAG;       // keep flit_buf_q for resending
          end else if (accept) begin
            // beat 0 leaves unrotated (fault-free path)
            state_q    <= S_SEND;
            flit_buf_q <= code;
            dvalid_q   <= 1'b1;
            ddata_q    <= code;
            shift_q    <= {code[W-2:0], code[W-1]};
            beat_q     <= '0;
          end else begin
            state_q <= S_IDLE;
          end
        end
        S_DIAG: if (tv_done) state_q <= S_WAIT_M;
        S_WAIT_M: begin
          if (m_valid_i) begin
            if (m_i >= SEG_W'(W)) begin
              state_q <= S_IDLE;     // dead link: flit cannot be delivered
            end else begin
              state_q  <= S_SEND;
              dvalid_q <= 1'b1;
              ddata_q  <= flit_buf_q;
              shift_q  <= {flit_buf_q[W-2:0], flit_buf_q[W-1]};
              beat_q   <= '0;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A nack can only answer the last beat of a flit.
  a_nack_on_last: assert property (@(posedge clk) disable iff (!rst_n)
    nack_i |-> last_beat);
endmodule
