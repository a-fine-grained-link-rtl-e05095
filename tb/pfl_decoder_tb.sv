// Testbench of pfl_decoder. The testbench plays the sender and the faulty
// wires: it sends parity-coded flits as m + 1 rotated beats through a set of
// stuck-at wires, answers a nack with the two test vectors and resends the
// flit. Faults are added one at a time while traffic runs. Checked: every
// flit is delivered once, in order and intact; m equals the longest circular
// run of faulty wires counted here; a flit is never rejected while the
// decoder's configuration matches the faults; the 8-wire example of the
// document gives fault vector 11001010 and m = 2.
module pfl_decoder_tb;
  localparam int unsigned W = 40;
  localparam int unsigned SEG_W = $clog2(W + 1);
  logic clk = 0, rst_n = 0;
  logic lvalid = 0, ltv = 0;
  logic [W-1:0] ldata = '0, sent, bad = '0, stuck = '0, tv1;
  logic nack, m_valid, out_valid, err;
  logic [SEG_W-1:0] m;
  logic [W-2:0] out_flit;
  logic [W-1:0] fv;
  int checks = 0, failures = 0, nacks = 0, diags = 0, delivered = 0;
  int m_tb = 0;
  bit config_stale = 0;

  pfl_decoder #(.W(W)) dut (
    .clk, .rst_n, .link_valid_i(lvalid), .link_tv_i(ltv), .link_data_i(ldata),
    .nack_o(nack), .m_valid_o(m_valid), .m_o(m), .valid_o(out_valid),
    .flit_o(out_flit), .fv_o(fv), .err_o(err)
  );
  always #5 clk = ~clk;

  // 8-wire instance for the document's example
  logic lv8 = 0, lt8 = 0, n8, mv8, ov8, e8;
  logic [7:0] ld8 = '0, fv8;
  logic [3:0] m8;
  logic [6:0] of8;
  pfl_decoder #(.W(8)) dut8 (
    .clk, .rst_n, .link_valid_i(lv8), .link_tv_i(lt8), .link_data_i(ld8),
    .nack_o(n8), .m_valid_o(mv8), .m_o(m8), .valid_o(ov8), .flit_o(of8),
    .fv_o(fv8), .err_o(e8)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [W-1:0] code_of(logic [W-2:0] f);
    int ones = 0;
    for (int i = 0; i < W - 1; i++) ones += int'(f[i]);
    return {logic'(ones % 2), f};
  endfunction

  function automatic logic [W-1:0] rot(logic [W-1:0] x, int k);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = x[(i - k + W * 4) % W];
    return r;
  endfunction

  function automatic logic [W-1:0] wires(logic [W-1:0] x);
    return (x & ~bad) | (stuck & bad);
  endfunction

  function automatic int ref_m(logic [W-1:0] b);
    int best = 0;
    for (int s = 0; s < W; s++) begin
      int len = 0;
      while (len < W && b[(s + len) % W]) len++;
      if (len > best) best = len;
    end
    return best;
  endfunction

  task automatic diagnose();
    int guard = 0;
    diags++;
    lvalid = 1; ltv = 1; ldata = wires(tv1);
    @(negedge clk); ldata = wires(~tv1);
    @(negedge clk); lvalid = 0; ltv = 0;
    while (!m_valid && guard < 10) begin @(negedge clk); guard++; end
    check(m_valid && int'(m) == ref_m(bad), $sformatf("m=%0d expected %0d", m, ref_m(bad)));
    check(fv == ~bad, "fault vector");
    m_tb = int'(m);
    config_stale = 0;
    @(negedge clk);
  endtask

  // send one flit, resending after diagnosis until it is accepted
  task automatic send(logic [W-2:0] f);
    bit ok = 0;
    while (!ok) begin
      for (int k = 0; k <= m_tb; k++) begin
        lvalid = 1; ltv = 0; ldata = wires(rot(code_of(f), k));
        #1;
        if (k < m_tb) check(!out_valid && !nack, "no result before last beat");
        else begin
          if (nack) begin
            check(config_stale, "nack only after a new fault");
            nacks++;
          end else begin
            check(out_valid && out_flit == f, "flit delivered intact");
            delivered++;
            ok = 1;
          end
        end
        @(negedge clk);
      end
      lvalid = 0;
      if (!ok) diagnose();
    end
  endtask

  // add a stuck wire whose lower neighbour is good, so that it can corrupt at
  // most one bit of a re-assembled flit (single parity sees it)
  task automatic add_fault();
    int w;
    do w = int'($urandom_range(W - 1, 0));
    while (bad[w] || bad[(w + W - 1) % W] || &(bad | (W'(1) << w)));
    bad[w] = 1; stuck[w] = 1'($urandom);
    config_stale = 1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) tv1[i] = (i % 2 == 0);
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    // the document's 8-wire example: wires 0, 2, 4, 5 faulty
    // received words as printed in the example (wire 7 .. wire 0)
    lv8 = 1; lt8 = 1; ld8 = 8'b0111_0101;
    @(negedge clk); ld8 = 8'b1011_1111;
    @(negedge clk); lv8 = 0; lt8 = 0;
    @(negedge clk);
    check(fv8 == 8'b1100_1010 && m8 == 2, "8-wire example: fv and m = 2");
    // healthy link
    for (int n = 0; n < 20; n++) send({$urandom, $urandom});
    check(nacks == 0 && delivered == 20, "healthy link: no nack");
    // grow faults one by one, send traffic until each is detected
    for (int f = 0; f < 14; f++) begin
      int d0, guard;
      d0 = diags; guard = 0;
      add_fault();
      while (diags == d0 && guard < 200) begin send({$urandom, $urandom}); guard++; end
      check(diags > d0, "new fault detected and diagnosed");
      for (int n = 0; n < 5; n++) send({$urandom, $urandom});
    end
    check(m_tb >= 1, "degraded configuration reached");
    $display("faults=%0d m=%0d nacks=%0d diagnoses=%0d delivered=%0d",
             $countones(bad), m_tb, nacks, diags, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
