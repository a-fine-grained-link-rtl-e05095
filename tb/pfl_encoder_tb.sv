// Testbench of pfl_encoder. The testbench plays the receiver: it checks every
// beat against the expected rotation of the parity-coded flit, answers with
// nack and new m values, and checks the test vector pair, the resend of the
// failed flit, the m + 1 cycles per flit, and the dead-link state (m = W).
module pfl_encoder_tb;
  localparam int unsigned W = 40;
  localparam int unsigned SEG_W = $clog2(W + 1);
  logic clk = 0, rst_n = 0;
  logic valid = 0, ready;
  logic [W-2:0] flit;
  logic link_valid, link_tv, nack = 0, m_valid = 0, dead, busy;
  logic [W-1:0] link_data, tv1;
  logic [SEG_W-1:0] m_in = '0, m_out;
  int checks = 0, failures = 0;

  pfl_encoder #(.W(W)) dut (
    .clk, .rst_n, .valid_i(valid), .flit_i(flit), .ready_o(ready),
    .link_valid_o(link_valid), .link_tv_o(link_tv), .link_data_o(link_data),
    .nack_i(nack), .m_valid_i(m_valid), .m_i(m_in), .m_o(m_out),
    .dead_o(dead), .busy_o(busy)
  );
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W-1:0] code_of(logic [W-2:0] f);
    int ones = 0;
    for (int i = 0; i < W - 1; i++) ones += int'(f[i]);
    return {logic'(ones % 2), f};
  endfunction

  // wire i carries bit (i - k) mod W in beat k
  function automatic logic [W-1:0] rot(logic [W-1:0] x, int k);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = x[(i - k + W * 4) % W];
    return r;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flits offered: a new random one after each acceptance
  always @(posedge clk) if (rst_n && valid && ready) flit <= {$urandom, $urandom};

  logic [W-2:0] expq[$];
  int  m_tb = 0, beat = 0, done_flits = 0, last_done = 0, tvs = 0;
  int  reply_in = -1, reply_m = 0, nack_at = -1, cyc = 0;
  int  gaps[$];
  bit  seen_resend = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      nack = 0; m_valid = 0;
      if (link_valid && link_tv) begin
        check(tvs < 2 && link_data == (tvs == 0 ? tv1 : ~tv1), "test vector");
        tvs++;
        if (tvs == 2) reply_in = 3;
      end else if (link_valid) begin
        check(expq.size() > 0 && link_data == rot(code_of(expq[0]), beat),
              $sformatf("beat %0d of flit (m=%0d)", beat, m_tb));
        if (beat == m_tb) begin
          if (done_flits == nack_at) begin
            nack = 1; nack_at = -1; tvs = 0;
          end else begin
            void'(expq.pop_front());
            if (done_flits > 0) gaps.push_back(cyc - last_done);
            last_done = cyc;
            done_flits++;
          end
          beat = 0;
        end else beat++;
      end
      if (reply_in == 0) begin
        m_valid = 1; m_in = SEG_W'(reply_m); m_tb = reply_m;
        gaps.delete(); done_flits = done_flits; last_done = cyc;
      end
      if (reply_in >= 0) reply_in--;
      #1;
      if (valid && ready) expq.push_back(flit);
    end
  end

  task automatic run_until(int n);
    int guard = 0;
    while (done_flits < n && guard < 2000) begin @(posedge clk); guard++; end
  endtask

  initial begin
    for (int i = 0; i < W; i++) tv1[i] = (i % 2 == 0);
    flit = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    #2;
    rst_n = 1;
    valid = 1;
    // healthy link: one flit per cycle
    run_until(30);
    check(gaps.size() > 10, "healthy flits seen");
    foreach (gaps[i]) check(gaps[i] == 1, "healthy flit every cycle");
    // corrupt flit 35: expect TVs, then m = 3 and a resend
    nack_at = 35; reply_m = 3;
    run_until(36);
    check(m_out == 3, "m register loaded");
    check(tvs == 2, "two test vectors sent");
    run_until(60);
    check(gaps.size() > 10, "degraded flits seen");
    foreach (gaps[i]) check(gaps[i] == 4, "degraded flit every m+1 = 4 cycles");
    // worst case: m = W - 1 gives W cycles per flit
    nack_at = 62; reply_m = W - 1;
    run_until(68);
    foreach (gaps[i]) check(gaps[i] == W, "flit every W cycles at m = W-1");
    // every wire faulty: the link dies and stops accepting
    nack_at = 69; reply_m = W;
    repeat (600) @(posedge clk);
    @(negedge clk);
    check(dead && !ready && !link_valid, "dead link stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
