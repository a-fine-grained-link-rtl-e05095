// Testbench of pfl_max_seg: the longest circular run of faulty wires is
// recounted here by trying every start wire, for random fault vectors of
// many densities, wrapped runs and the all-good and all-bad extremes.
module pfl_max_seg_tb;
  localparam int unsigned W = 40;
  localparam int unsigned SEG_W = $clog2(W + 1);
  logic [W-1:0]     fv;
  logic [SEG_W-1:0] m;
  int checks = 0, failures = 0;

  pfl_max_seg #(.W(W)) dut (.fv_i(fv), .m_o(m));

  function automatic int ref_m(logic [W-1:0] v);
    int best = 0;
    for (int s = 0; s < W; s++) begin
      int len = 0;
      while (len < W && !v[(s + len) % W]) len++;
      if (len > best) best = len;
    end
    return best;
  endfunction

  task automatic try(logic [W-1:0] v);
    fv = v;
    #1;
    checks++;
    if (int'(m) != ref_m(v)) begin
      failures++;
      $display("FAIL fv=%h m=%0d expected %0d", v, m, ref_m(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try('1);
    try('0);
    try(W'(1));
    try(~(W'(3) | (W'(1) << (W - 1))));   // run of faults wrapping round
    try(40'b11001010);                      // the 8-wire example, m = 2
    for (int n = 0; n < 400; n++) begin
      logic [W-1:0] v;
      int density;
      v = '1;
      density = n % 8;
      for (int i = 0; i < W; i++)
        if ($urandom_range(7, 0) < density) v[i] = 1'b0;
      try(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
