// Testbench of noc_router, placed at (1,1) of a 4x4 mesh.
//
// The four neighbours are modelled by PFL encoders (traffic into the router)
// and PFL decoders (traffic out of it) joined to the router through wires
// that the testbench can make stuck. Five sources (four neighbours and the
// local port) send packets of 1..4 flits to random destinations over random
// VCs, obeying the router's credits. Checked: every flit leaves by the XY
// output of its destination, intact, packets stay whole and in order on their
// output VC, every flit arrives exactly once, and credits never overflow.
// Faults are added on one input link and one output link while traffic runs;
// the diagnosis and the degraded m + 1 beat mode must both occur.
module noc_router_tb;
  import pfl_pkg::*;
  localparam int unsigned NVC = 6, DEPTH = 6;
  localparam int unsigned SEGW = SEG_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t        r_out_fwd [4], r_in_fwd [4];
  link_bwd_t        r_out_bwd [4], r_in_bwd [4];
  logic [NVC-1:0]   r_out_credit [4], r_in_credit [4], inj_credit;
  logic             inj_valid = 0, ej_valid;
  flit_t            inj_flit, ej_flit;
  logic [SEG_W-1:0] out_m [4];
  logic             out_dead [4];
  logic [LINK_W-1:0] in_fv [4];

  noc_router #(.NVC(NVC), .BUF_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .cur_x_i(2'd1), .cur_y_i(2'd1),
    .out_fwd_o(r_out_fwd), .out_bwd_i(r_out_bwd), .out_credit_i(r_out_credit),
    .in_fwd_i(r_in_fwd), .in_bwd_o(r_in_bwd), .in_credit_o(r_in_credit),
    .inj_valid_i(inj_valid), .inj_flit_i(inj_flit), .inj_credit_o(inj_credit),
    .ej_valid_o(ej_valid), .ej_flit_o(ej_flit),
    .out_m_o(out_m), .out_dead_o(out_dead), .in_fv_o(in_fv)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- stuck wires per link: in links 0..3, out links 4..7
  logic [LINK_W-1:0] bad [8], stuck [8];
  initial foreach (bad[i]) begin bad[i] = '0; stuck[i] = '0; end

  // ---- neighbour senders (into the router)
  logic           s_valid [4];
  flit_t          s_flit  [4];
  logic           s_ready [4];
  link_fwd_t      s_fwd   [4];
  for (genvar p = 0; p < 4; p++) begin : g_src
    logic [SEG_W-1:0] m; logic dead, busy;
    pfl_encoder #(.W(LINK_W)) u_enc (
      .clk, .rst_n, .valid_i(s_valid[p]), .flit_i(s_flit[p]), .ready_o(s_ready[p]),
      .link_valid_o(s_fwd[p].valid), .link_tv_o(s_fwd[p].tv), .link_data_o(s_fwd[p].data),
      .nack_i(r_in_bwd[p].nack), .m_valid_i(r_in_bwd[p].m_valid), .m_i(r_in_bwd[p].m_size),
      .m_o(m), .dead_o(dead), .busy_o(busy)
    );
    always_comb begin
      r_in_fwd[p] = s_fwd[p];
      r_in_fwd[p].data = (s_fwd[p].data & ~bad[p]) | (stuck[p] & bad[p]);
    end
  end

  // ---- neighbour receivers (out of the router)
  logic        k_valid [5];
  flit_t       k_flit  [5];
  for (genvar o = 0; o < 4; o++) begin : g_snk
    logic [FLIT_W-1:0] f; logic [LINK_W-1:0] fv; logic err;
    pfl_decoder #(.W(LINK_W)) u_dec (
      .clk, .rst_n, .link_valid_i(r_out_fwd[o].valid), .link_tv_i(r_out_fwd[o].tv),
      .link_data_i((r_out_fwd[o].data & ~bad[4+o]) | (stuck[4+o] & bad[4+o])),
      .nack_o(r_out_bwd[o].nack), .m_valid_o(r_out_bwd[o].m_valid), .m_o(r_out_bwd[o].m_size),
      .valid_o(k_valid[o]), .flit_o(f), .fv_o(fv), .err_o(err)
    );
    assign k_flit[o] = flit_t'(f);
  end
  assign k_valid[4] = ej_valid;
  assign k_flit[4]  = ej_flit;

  // sinks consume at once and return the credit one cycle later
  always_ff @(posedge clk) for (int o = 0; o < 4; o++)
    r_out_credit[o] <= k_valid[o] ? (NVC'(1) << k_flit[o].vc) : '0;

  // ---- scoreboard
  function automatic int xy(int dx, int dy);
    if (dx > 1) return P_XP;
    if (dx < 1) return P_XM;
    if (dy > 1) return P_YP;
    if (dy < 1) return P_YM;
    return P_LOC;
  endfunction

  int sent_flits = 0, got_flits = 0;
  int cur_pkt [5][NVC];     // packet id on each output VC, -1 none
  int cur_idx [5][NVC];
  initial foreach (cur_pkt[o, v]) cur_pkt[o][v] = -1;

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (k_valid[o]) begin
      flit_t f;
      int v, id, idx;
      f = k_flit[o];
      v = int'(f.vc); id = int'(f.payload[29:10]); idx = int'(f.payload[9:0]);
      got_flits++;
      if (f.ftype == FT_HEAD || f.ftype == FT_HT) begin
        check(cur_pkt[o][v] == -1, "head on a free output VC");
        check(xy(int'(f.dst_x), int'(f.dst_y)) == o, "XY output port");
        check(idx == 0, "head is flit 0");
        cur_pkt[o][v] = (f.ftype == FT_HT) ? -1 : id;
        cur_idx[o][v] = 0;
      end else begin
        check(cur_pkt[o][v] == id, "body/tail follows its head on the VC");
        check(idx == cur_idx[o][v] + 1, "flits in order");
        cur_idx[o][v] = idx;
        if (f.ftype == FT_TAIL) cur_pkt[o][v] = -1;
      end
    end
  end

  // ---- sources
  int credits [5][NVC];
  initial foreach (credits[p, v]) credits[p][v] = DEPTH;
  always @(posedge clk) begin
    for (int p = 0; p < 4; p++) for (int v = 0; v < NVC; v++) if (r_in_credit[p][v]) credits[p][v]++;
    for (int v = 0; v < NVC; v++) if (inj_credit[v]) credits[4][v]++;
  end

  bit vc_used [5][NVC];
  task automatic source(int p, int npkt);
    for (int n = 0; n < npkt; n++) begin
      int len = int'($urandom_range(4, 1)), v;
      logic [1:0] dx = 2'($urandom), dy = 2'($urandom);
      do v = int'($urandom_range(NVC - 1, 0)); while (vc_used[p][v]);
      vc_used[p][v] = 1;
      for (int i = 0; i < len; i++) begin
        flit_t f;
        f.ftype = (len == 1) ? FT_HT : (i == 0) ? FT_HEAD : (i == len - 1) ? FT_TAIL : FT_BODY;
        f.vc = VC_W'(v); f.dst_x = dx; f.dst_y = dy;
        f.payload = {4'(p), 16'(n), 10'(i)};
        while (credits[p][v] == 0) @(negedge clk);
        credits[p][v]--;
        if (p == 4) begin
          inj_valid = 1; inj_flit = f;
          @(negedge clk); inj_valid = 0;
        end else begin
          s_valid[p] = 1; s_flit[p] = f;
          @(posedge clk); while (!s_ready[p]) @(posedge clk);
          @(negedge clk); s_valid[p] = 0;
        end
        sent_flits++;
        repeat ($urandom_range(2, 0)) @(negedge clk);
      end
      vc_used[p][v] = 0;
    end
  endtask

  task automatic add_fault(int l);
    int w;
    do w = int'($urandom_range(LINK_W - 1, 0));
    while (bad[l][w] || bad[l][(w + LINK_W - 1) % LINK_W]);
    stuck[l][w] = 1'($urandom);
    bad[l][w] = 1;
  endtask

  int diag_in = 0, diag_out = 0, multi_beat = 0;
  always @(posedge clk) if (rst_n) begin
    if (r_in_fwd[1].valid && r_in_fwd[1].tv) diag_in++;
    if (r_out_fwd[2].valid && r_out_fwd[2].tv) diag_out++;
    if (out_m[2] != 0 && r_out_fwd[2].valid && !r_out_fwd[2].tv) multi_beat++;
    if (in_fv[1] != '1 && r_in_fwd[1].valid && !r_in_fwd[1].tv) multi_beat++;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (s_valid[p]) s_valid[p] = 0;
    foreach (vc_used[p, v]) vc_used[p][v] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    fork
      source(0, 150); source(1, 150); source(2, 150); source(3, 150); source(4, 150);
      begin
        // two faults on input link Y+ and output link X-, a cluster of 2 each
        repeat (100) @(negedge clk); bad[1][10] = 1; stuck[1][10] = 1;
        bad[6][20] = 1; stuck[6][20] = 0;
        repeat (500) @(negedge clk); bad[1][9] = 1; stuck[1][9] = 1;
        bad[6][19] = 1; stuck[6][19] = 1;
      end
    join
    repeat (300) @(negedge clk);
    check(sent_flits == got_flits, $sformatf("all flits arrived (%0d of %0d)", got_flits, sent_flits));
    check(diag_in >= 2 && diag_out >= 2, "diagnosis on both faulty links");
    check(multi_beat > 0 && out_m[2] == 2 && in_fv[1] == ~(LINK_W'(3) << 9), "degraded multi-beat transfers happened");
    $display("sent=%0d got=%0d diag_in=%0d diag_out=%0d m_out=%0d fv_in=%h multi_beat=%0d",
             sent_flits, got_flits, diag_in, diag_out, out_m[2], in_fv[1], multi_beat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
