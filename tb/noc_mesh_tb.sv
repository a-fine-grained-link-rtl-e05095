// End-to-end testbench of noc_mesh at its default size (4x4 routers, 6 VCs of
// 6 flits, 40-wire links).
//
// Every node injects packets of 1..5 flits to random other nodes, obeying its
// VC credits. The link wires between routers pass through a stuck-at fault
// model. While traffic runs, faults are added one at a time on a set of
// links, growing clusters of adjacent faulty wires; the next fault on a link
// is added only after the previous one was diagnosed, so that parity sees
// each new fault. Checked: every packet reaches its destination exactly once,
// whole, in order and intact; the m of each faulty link equals its longest
// circular run of faulty wires. Counted, each of which must happen: test
// vector diagnoses, flits sent over degraded links (m + 1 beats), a link with
// m >= 2, output buffers filling up because an encoder is slowed (the stall
// seen by the switch allocator), and sources waiting for credits.
module noc_mesh_tb;
  import pfl_pkg::*;
  localparam int N = 16, NVC = 6, DEPTH = 6, NPKT = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  link_fwd_t        tx [N][4], rx [N][4];
  logic             inj_valid [N];
  flit_t            inj_flit  [N];
  logic [NVC-1:0]   inj_credit [N];
  logic             ej_valid [N];
  flit_t            ej_flit  [N];
  logic [SEG_W-1:0] link_m [N][4];
  logic             link_dead [N][4];

  noc_mesh dut (
    .clk, .rst_n, .link_tx_o(tx), .link_rx_i(rx),
    .inj_valid_i(inj_valid), .inj_flit_i(inj_flit), .inj_credit_o(inj_credit),
    .ej_valid_o(ej_valid), .ej_flit_o(ej_flit),
    .link_m_o(link_m), .link_dead_o(link_dead)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- stuck-at wires on each directed link
  logic [LINK_W-1:0] bad [N][4], stuck [N][4];
  always_comb
    for (int r = 0; r < N; r++)
      for (int d = 0; d < 4; d++) begin
        rx[r][d] = tx[r][d];
        rx[r][d].data = (tx[r][d].data & ~bad[r][d]) | (stuck[r][d] & bad[r][d]);
      end

  // ---- payload: {source 4, sequence 12, flit index 4, check bits 10}
  function automatic logic [9:0] chk_bits(int s, int q, int i);
    return 10'((s * 97 + q * 31 + i * 7) ^ (q << 3) ^ 10'h2a5);
  endfunction

  // ---- sinks
  int got_flits = 0, sent_flits = 0, got_pkts = 0;
  int cur_src [N][NVC], cur_seq [N][NVC], cur_idx [N][NVC];
  bit pkt_done [N][NPKT];
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < N; r++) if (ej_valid[r]) begin
      flit_t f;
      int v, s, q, i;
      f = ej_flit[r];
      v = int'(f.vc);
      s = int'(f.payload[29:26]); q = int'(f.payload[25:14]); i = int'(f.payload[13:10]);
      got_flits++;
      check(int'(f.dst_x) == r % 4 && int'(f.dst_y) == r / 4, "ejected at its destination");
      check(f.payload[9:0] == chk_bits(s, q, i), "payload intact");
      if (f.ftype == FT_HEAD || f.ftype == FT_HT) begin
        check(cur_src[r][v] < 0 && i == 0, "head starts a packet");
        cur_src[r][v] = s; cur_seq[r][v] = q; cur_idx[r][v] = 0;
      end else begin
        check(cur_src[r][v] == s && cur_seq[r][v] == q && i == cur_idx[r][v] + 1,
              "body/tail follows its packet in order");
        cur_idx[r][v] = i;
      end
      if (f.ftype == FT_TAIL || f.ftype == FT_HT) begin
        check(!pkt_done[s][q], "packet delivered once");
        pkt_done[s][q] = 1;
        got_pkts++;
        cur_src[r][v] = -1;
      end
    end
  end

  // ---- sources
  int credits [N][NVC];
  int credit_waits = 0;
  always @(posedge clk)
    for (int r = 0; r < N; r++)
      for (int v = 0; v < NVC; v++) if (inj_credit[r][v]) credits[r][v]++;

  task automatic source(int r);
    for (int q = 0; q < NPKT; q++) begin
      int len, v, dst;
      len = int'($urandom_range(5, 1));
      do dst = int'($urandom_range(N - 1, 0)); while (dst == r);
      v = int'($urandom_range(NVC - 1, 0));
      for (int i = 0; i < len; i++) begin
        flit_t f;
        f.ftype = (len == 1) ? FT_HT : (i == 0) ? FT_HEAD : (i == len - 1) ? FT_TAIL : FT_BODY;
        f.vc = VC_W'(v);
        f.dst_x = COORD_W'(dst % 4); f.dst_y = COORD_W'(dst / 4);
        f.payload = {4'(r), 12'(q), 4'(i), chk_bits(r, q, i)};
        if (credits[r][v] == 0) credit_waits++;
        while (credits[r][v] == 0) @(negedge clk);
        credits[r][v]--;
        inj_valid[r] = 1; inj_flit[r] = f;
        @(negedge clk);
        inj_valid[r] = 0;
        sent_flits++;
      end
      repeat ($urandom_range(3, 0)) @(negedge clk);
    end
  endtask

  // ---- mechanism counters
  int tv_beats = 0, degraded_beats = 0, max_m = 0, obuf_stalls = 0;
  int tvs_on [N][4];
  always @(posedge clk) if (rst_n)
    for (int r = 0; r < N; r++)
      for (int d = 0; d < 4; d++) begin
        if (tx[r][d].valid && tx[r][d].tv) begin tv_beats++; tvs_on[r][d]++; end
        if (tx[r][d].valid && !tx[r][d].tv && link_m[r][d] != 0) degraded_beats++;
        if (int'(link_m[r][d]) > max_m) max_m = int'(link_m[r][d]);
      end
  for (genvar r = 0; r < N; r++) begin : g_mon
    for (genvar d = 0; d < 4; d++) begin : g_d
      always @(posedge clk)
        if (rst_n && dut.g_r[r].u_router.out_full[d] && link_m[r][d] != 0) obuf_stalls++;
    end
  end

  function automatic int ref_m(logic [LINK_W-1:0] b);
    int best = 0;
    for (int s = 0; s < LINK_W; s++) begin
      int len = 0;
      while (len < LINK_W && b[(s + len) % LINK_W]) len++;
      if (len > best) best = len;
    end
    return best;
  endfunction

  // grow a fault cluster on link (r, d): each new wire sits just below the
  // cluster, and is added after the previous one was diagnosed
  task automatic fault_link(int r, int d, int first, int count);
    for (int k = 0; k < count; k++) begin
      int w, t0, guard;
      w = (first - k + LINK_W) % LINK_W;
      t0 = tvs_on[r][d];
      stuck[r][d][w] = 1'($urandom);
      bad[r][d][w] = 1;
      guard = 0;
      while (tvs_on[r][d] == t0 && guard < 3000) begin @(negedge clk); guard++; end
      if (tvs_on[r][d] == t0) break;   // no traffic exposed it: stop here
      repeat (8) @(negedge clk);
    end
  endtask

  initial begin
    #600000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N; r++) begin
      inj_valid[r] = 0; inj_flit[r] = '0;
      for (int d = 0; d < 4; d++) begin bad[r][d] = '0; stuck[r][d] = '0; tvs_on[r][d] = 0; end
      for (int v = 0; v < NVC; v++) begin credits[r][v] = DEPTH; cur_src[r][v] = -1; end
      for (int q = 0; q < NPKT; q++) pkt_done[r][q] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < N; r++) begin
      automatic int rr = r;
      fork source(rr); join_none
    end
    begin
      begin
        repeat (50) @(negedge clk);
        fork
          fault_link(5, P_XP, 12, 3);   // (1,1) -> (2,1): cluster of 3
          fault_link(6, P_XM, 30, 2);   // (2,1) -> (1,1): cluster of 2
          fault_link(9, P_YM, 0, 2);    // (1,2) -> (1,1): cluster wrapping wire 0
          fault_link(1, P_XP, 25, 1);   // (1,0) -> (2,0): single wire
        join
      end
    end
    wait fork;
    repeat (2000) @(negedge clk);
    check(got_pkts == N * NPKT, $sformatf("all packets delivered (%0d of %0d)", got_pkts, N * NPKT));
    check(got_flits == sent_flits, "flit count");
    for (int r = 0; r < N; r++)
      for (int d = 0; d < 4; d++)
        if (tvs_on[r][d] > 0)
          check(int'(link_m[r][d]) == ref_m(bad[r][d]),
                $sformatf("m of link %0d/%0d is %0d, expected %0d", r, d, link_m[r][d], ref_m(bad[r][d])));
    check(tv_beats > 0, "diagnosis happened");
    check(degraded_beats > 0, "degraded transfers happened");
    check(max_m >= 2, "a link reached m >= 2");
    check(obuf_stalls > 0, "output buffer stall behind a slowed encoder");
    check(credit_waits > 0, "sources waited for credits");
    $display("flits=%0d packets=%0d diagnoses=%0d degraded_beats=%0d max_m=%0d obuf_stalls=%0d credit_waits=%0d cycles=%0t",
             got_flits, got_pkts, tv_beats / 2, degraded_beats, max_m, obuf_stalls, credit_waits, $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
