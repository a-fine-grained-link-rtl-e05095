// Testbench of pfl_parity_gen: random flits; the code word must hold the flit
// unchanged below an even-parity bit counted here one bit at a time.
module pfl_parity_gen_tb;
  localparam int unsigned W = 40;
  logic [W-2:0] flit;
  logic [W-1:0] code;
  int checks = 0, failures = 0;

  pfl_parity_gen #(.W(W)) dut (.flit_i(flit), .code_o(code));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int ones;
      flit = {$urandom, $urandom};
      if (n == 0) flit = '0;
      if (n == 1) flit = '1;
      #1;
      ones = 0;
      for (int i = 0; i < W - 1; i++) ones += int'(flit[i]);
      checks++;
      if (code[W-2:0] !== flit || code[W-1] !== logic'(ones % 2)) begin
        failures++;
        $display("FAIL flit=%h code=%h", flit, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
