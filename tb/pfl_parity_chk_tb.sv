// Testbench of pfl_parity_chk: clean code words (even number of ones) must
// pass, and flipping any single bit must be reported.
module pfl_parity_chk_tb;
  localparam int unsigned W = 40;
  logic [W-1:0] code;
  logic [W-2:0] flit;
  logic         err;
  int checks = 0, failures = 0;

  pfl_parity_chk #(.W(W)) dut (.code_i(code), .flit_o(flit), .err_o(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [W-2:0] f;
      int ones, b;
      f = {$urandom, $urandom};
      ones = 0;
      for (int i = 0; i < W - 1; i++) ones += int'(f[i]);
      code = {logic'(ones % 2), f};
      #1;
      checks++;
      if (err !== 1'b0 || flit !== f) begin
        failures++;
        $display("FAIL clean word %h flagged", code);
      end
      b = int'($urandom_range(W - 1, 0));
      code[b] = ~code[b];
      #1;
      checks++;
      if (err !== 1'b1) begin
        failures++;
        $display("FAIL single flip at %0d missed", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
