// Wormhole virtual-channel router with partially-faulty-link support.
//
// Five ports: X+, Y+, X-, Y- (network links) and the local port (injection
// and ejection). Every network input link ends in a PFL decoder and every
// network output link starts with a PFL encoder, so a link with stuck wires
// keeps working at a longer per-flit latency (m + 1 cycles) instead of being
// cut. Between them sits an ordinary virtual-channel wormhole router:
//
//   * input buffers: NVC FIFOs of BUF_DEPTH flits per input port, selected by
//     the flit's VC field;
//   * route computation (XY) on the head flit of each input VC;
//   * VC allocator: gives a free VC of the requested output port to a head
//     flit, rotating priority among the input VCs; the VC stays held until
//     the tail flit leaves;
//   * switch allocator: separable, round-robin; first one VC per input port,
//     then one input per output port. A flit is eligible when its output VC
//     has a credit (room downstream), the output buffer has room and the
//     output link is not dead;
//   * crossbar into a small output buffer per port, which the PFL encoder
//     drains at the link's current rate.
//
// Flow control is credit based per VC: a credit goes back upstream whenever
// a flit leaves an input buffer. Credits, valid, test-vector and the m/nack
// back channel are separate wires assumed sound; only the LINK_W data wires
// may be faulty.
//
// Timing: a head flit written into an input buffer in cycle t is allocated a
// VC in t+1, wins the switch in t+2, is accepted by the encoder in t+3 and is
// on the link in t+4; body flits skip VC allocation.
//
// Follows the document: the five-port router with decoders on the inputs,
// encoders on the outputs, input VCs, output buffers, route computation and
// VC allocation, 6 VCs with 6 flits each. This design's own choices: the
// allocator organisation, the pipeline, the credit scheme, the output buffer
// depth and XY routing (the adaptive routing of the evaluation is not built).
module noc_router
  import pfl_pkg::*;
#(
  parameter int unsigned NVC       = 6,    // virtual channels per port
  parameter int unsigned BUF_DEPTH = 6,    // flits per input VC
  parameter int unsigned OUT_DEPTH = 2     // flits per output buffer
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] cur_x_i,
  input  logic [COORD_W-1:0] cur_y_i,
  // network outputs (index P_XP..P_YM)
  output link_fwd_t          out_fwd_o   [4],
  input  link_bwd_t          out_bwd_i   [4],
  input  logic [NVC-1:0]     out_credit_i[4],
  // network inputs
  input  link_fwd_t          in_fwd_i    [4],
  output link_bwd_t          in_bwd_o    [4],
  output logic [NVC-1:0]     in_credit_o [4],
  // local port
  input  logic               inj_valid_i,
  input  flit_t              inj_flit_i,
  output logic [NVC-1:0]     inj_credit_o,
  output logic               ej_valid_o,
  output flit_t              ej_flit_o,
  // status
  output logic [SEG_W-1:0]   out_m_o     [4],   // m of each output link
  output logic               out_dead_o  [4],
  output logic [LINK_W-1:0]  in_fv_o     [4]    // fault vector of each input link
);
  localparam int unsigned NREQ = NPORT * NVC;
  localparam int unsigned CW   = $clog2(BUF_DEPTH + 1);

  // ---------------------------------------------------------------- inputs
  logic  in_valid [NPORT];
  flit_t in_flit  [NPORT];

  for (genvar p = 0; p < 4; p++) begin : g_dec
    logic [FLIT_W-1:0] dflit;
    logic              derr;
    pfl_decoder #(.W(LINK_W)) u_dec (
      .clk, .rst_n,
      .link_valid_i(in_fwd_i[p].valid), .link_tv_i(in_fwd_i[p].tv),
      .link_data_i(in_fwd_i[p].data),
      .nack_o(in_bwd_o[p].nack), .m_valid_o(in_bwd_o[p].m_valid),
      .m_o(in_bwd_o[p].m_size),
      .valid_o(in_valid[p]), .flit_o(dflit), .fv_o(in_fv_o[p]), .err_o(derr)
    );
    assign in_flit[p] = flit_t'(dflit);
  end
  assign in_valid[P_LOC] = inj_valid_i;
  assign in_flit[P_LOC]  = inj_flit_i;

  // ---------------------------------------------------------- input VCs
  logic  vc_empty [NPORT][NVC];
  logic  vc_full  [NPORT][NVC];
  logic  vc_pop   [NPORT][NVC];
  flit_t vc_head  [NPORT][NVC];
  logic [2:0] rc_port [NPORT][NVC];

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      logic [FLIT_W-1:0] dout;
      noc_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
        .clk, .rst_n,
        .push_i(in_valid[p] && (in_flit[p].vc == VC_W'(v))),
        .din_i(in_flit[p]), .pop_i(vc_pop[p][v]), .dout_o(dout),
        .empty_o(vc_empty[p][v]), .full_o(vc_full[p][v])
      );
      assign vc_head[p][v] = flit_t'(dout);
      noc_route_xy u_rc (
        .cur_x_i, .cur_y_i, .dst_x_i(vc_head[p][v].dst_x),
        .dst_y_i(vc_head[p][v].dst_y), .port_o(rc_port[p][v])
      );
    end
  end

  // ------------------------------------------------------ per-VC state
  logic            routed_q   [NPORT][NVC];   // holds an output VC
  logic [2:0]      oport_q    [NPORT][NVC];
  logic [VC_W-1:0] ovc_q      [NPORT][NVC];
  logic            ovc_busy_q [NPORT][NVC];   // output VC owned by a packet
  logic [CW-1:0]   credit_q   [NPORT][NVC];   // free slots downstream

  // ------------------------------------------------------- VC allocator
  logic [$clog2(NREQ)-1:0] va_ptr_q;
  logic            va_gnt   [NPORT][NVC];
  logic [VC_W-1:0] va_vc    [NPORT][NVC];

  always_comb begin
    logic taken [NPORT][NVC];
    taken = ovc_busy_q;
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++) begin
        va_gnt[p][v] = 1'b0;
        va_vc[p][v]  = '0;
      end
    for (int i = 0; i < NREQ; i++) begin
      int r, p, v, o;
      r = (i + int'(va_ptr_q)) % NREQ;
      p = r / NVC;
      v = r % NVC;
      o = int'(rc_port[p][v]);
      if (!vc_empty[p][v] && !routed_q[p][v] &&
          (vc_head[p][v].ftype == FT_HEAD || vc_head[p][v].ftype == FT_HT)) begin
        for (int ov = 0; ov < NVC; ov++) begin
          if (!va_gnt[p][v] && !taken[o][ov]) begin
            va_gnt[p][v] = 1'b1;
            va_vc[p][v]  = VC_W'(ov);
            taken[o][ov] = 1'b1;
          end
        end
      end
    end
  end

  // --------------------------------------------------- switch allocator
  logic              out_full  [NPORT];
  logic              enc_dead  [NPORT];
  logic [VC_W-1:0]   in_pick   [NPORT];     // VC chosen at each input
  logic              in_has    [NPORT];
  logic [VC_W-1:0]   sa_in_ptr_q  [NPORT];
  logic [2:0]        sa_out_ptr_q [NPORT];
  logic              sa_gnt    [NPORT];     // output o granted
  logic [2:0]        sa_src    [NPORT];     // input port granted at output o

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      in_has[p]  = 1'b0;
      in_pick[p] = '0;
      for (int i = 0; i < NVC; i++) begin
        int v, o;
        v = (i + int'(sa_in_ptr_q[p])) % NVC;
        o = int'(oport_q[p][v]);
        if (!in_has[p] && routed_q[p][v] && !vc_empty[p][v] && !out_full[o] &&
            !enc_dead[o] && (o == P_LOC || credit_q[o][ovc_q[p][v]] != '0)) begin
          in_has[p]  = 1'b1;
          in_pick[p] = VC_W'(v);
        end
      end
    end
    for (int o = 0; o < NPORT; o++) begin
      sa_gnt[o] = 1'b0;
      sa_src[o] = '0;
      for (int i = 0; i < NPORT; i++) begin
        int p;
        p = (i + int'(sa_out_ptr_q[o])) % NPORT;
        if (!sa_gnt[o] && in_has[p] && int'(oport_q[p][in_pick[p]]) == o) begin
          sa_gnt[o] = 1'b1;
          sa_src[o] = 3'(p);
        end
      end
    end
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++) vc_pop[p][v] = 1'b0;
    for (int o = 0; o < NPORT; o++)
      if (sa_gnt[o]) vc_pop[sa_src[o]][in_pick[sa_src[o]]] = 1'b1;
  end

  // credits back to the upstream routers and to the local source
  always_comb begin
    for (int p = 0; p < 4; p++)
      for (int v = 0; v < NVC; v++) in_credit_o[p][v] = vc_pop[p][v];
    for (int v = 0; v < NVC; v++) inj_credit_o[v] = vc_pop[P_LOC][v];
  end

  // ----------------------------------------------------------- crossbar
  logic  xb_valid [NPORT];
  flit_t xb_flit  [NPORT];
  logic [2:0]      xb_p [NPORT];          // input port granted at output o
  logic [VC_W-1:0] xb_v [NPORT];          // its VC
  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      xb_p[o]        = sa_src[o];
      xb_v[o]        = in_pick[sa_src[o]];
      xb_valid[o]    = sa_gnt[o];
      xb_flit[o]     = vc_head[xb_p[o]][xb_v[o]];
      xb_flit[o].vc  = ovc_q[xb_p[o]][xb_v[o]];
    end
  end

  // ------------------------------------------------------- state update
  logic [$clog2(NREQ)-1:0] va_ptr_d;
  logic            routed_d     [NPORT][NVC];
  logic [2:0]      oport_d      [NPORT][NVC];
  logic [VC_W-1:0] ovc_d        [NPORT][NVC];
  logic            ovc_busy_d   [NPORT][NVC];
  logic [CW-1:0]   credit_d     [NPORT][NVC];
  logic [VC_W-1:0] sa_in_ptr_d  [NPORT];
  logic [2:0]      sa_out_ptr_d [NPORT];

  always_comb begin
    va_ptr_d     = (int'(va_ptr_q) == NREQ - 1) ? '0 : va_ptr_q + 1'b1;
    routed_d     = routed_q;
    oport_d      = oport_q;
    ovc_d        = ovc_q;
    ovc_busy_d   = ovc_busy_q;
    credit_d     = credit_q;
    sa_in_ptr_d  = sa_in_ptr_q;
    sa_out_ptr_d = sa_out_ptr_q;
    // VC allocation
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NVC; v++)
        if (va_gnt[p][v]) begin
          routed_d[p][v] = 1'b1;
          oport_d[p][v]  = rc_port[p][v];
          ovc_d[p][v]    = va_vc[p][v];
          ovc_busy_d[rc_port[p][v]][va_vc[p][v]] = 1'b1;
        end
    // returned credits
    for (int o = 0; o < 4; o++)
      for (int v = 0; v < NVC; v++)
        if (out_credit_i[o][v]) credit_d[o][v] = credit_d[o][v] + 1'b1;
    // switch traversal: spend a credit, release the VCs after a tail
    for (int o = 0; o < NPORT; o++)
      if (sa_gnt[o]) begin
        sa_out_ptr_d[o]      = (xb_p[o] == 3'(NPORT - 1)) ? '0 : xb_p[o] + 1'b1;
        sa_in_ptr_d[xb_p[o]] = (int'(xb_v[o]) == NVC - 1) ? '0 : xb_v[o] + 1'b1;
        if (o < 4) credit_d[o][xb_flit[o].vc] = credit_d[o][xb_flit[o].vc] - 1'b1;
        if (xb_flit[o].ftype == FT_TAIL || xb_flit[o].ftype == FT_HT) begin
          routed_d[xb_p[o]][xb_v[o]] = 1'b0;
          ovc_busy_d[o][xb_flit[o].vc] = 1'b0;
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va_ptr_q <= '0;
      for (int p = 0; p < NPORT; p++) begin
        sa_in_ptr_q[p]  <= '0;
        sa_out_ptr_q[p] <= '0;
        for (int v = 0; v < NVC; v++) begin
          routed_q[p][v]   <= 1'b0;
          oport_q[p][v]    <= '0;
          ovc_q[p][v]      <= '0;
          ovc_busy_q[p][v] <= 1'b0;
          credit_q[p][v]   <= CW'(BUF_DEPTH);
        end
      end
    end else begin
      va_ptr_q     <= va_ptr_d;
      routed_q     <= routed_d;
      oport_q      <= oport_d;
      ovc_q        <= ovc_d;
      ovc_busy_q   <= ovc_busy_d;
      credit_q     <= credit_d;
      sa_in_ptr_q  <= sa_in_ptr_d;
      sa_out_ptr_q <= sa_out_ptr_d;
    end
  end

  // ---------------------------------------------- output buffers + PFL
  for (genvar o = 0; o < NPORT; o++) begin : g_out
    logic [FLIT_W-1:0] ob_dout;
    logic              ob_empty, ob_pop;
    noc_fifo #(.WIDTH(FLIT_W), .DEPTH(OUT_DEPTH)) u_obuf (
      .clk, .rst_n, .push_i(xb_valid[o]), .din_i(xb_flit[o]), .pop_i(ob_pop),
      .dout_o(ob_dout), .empty_o(ob_empty), .full_o(out_full[o])
    );
    if (o < 4) begin : g_enc
      logic enc_ready, enc_busy;
      pfl_encoder #(.W(LINK_W)) u_enc (
        .clk, .rst_n, .valid_i(!ob_empty), .flit_i(ob_dout), .ready_o(enc_ready),
        .link_valid_o(out_fwd_o[o].valid), .link_tv_o(out_fwd_o[o].tv),
        .link_data_o(out_fwd_o[o].data),
        .nack_i(out_bwd_i[o].nack), .m_valid_i(out_bwd_i[o].m_valid),
        .m_i(out_bwd_i[o].m_size), .m_o(out_m_o[o]), .dead_o(enc_dead[o]),
        .busy_o(enc_busy)
      );
      assign ob_pop = !ob_empty && enc_ready;
      assign out_dead_o[o] = enc_dead[o];
    end else begin : g_ej
      assign ob_pop     = !ob_empty;
      assign ej_valid_o = !ob_empty;
      assign ej_flit_o  = flit_t'(ob_dout);
      assign enc_dead[o] = 1'b0;
    end
  end

  // a flit only arrives for a VC with room (credit flow control)
  for (genvar p = 0; p < NPORT; p++) begin : g_chk
    a_credit_respected: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[p] |-> !vc_full[p][in_flit[p].vc] || vc_pop[p][in_flit[p].vc]);
  end
endmodule
