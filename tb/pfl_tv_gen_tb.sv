// Testbench of pfl_tv_gen: after a start pulse the generator must send
// 1010... (wire 0 = 1) and then 0101... on the next two cycles, flag the
// second with done, and stay silent otherwise.
module pfl_tv_gen_tb;
  localparam int unsigned W = 40;
  logic clk = 0, rst_n = 0, start = 0;
  logic valid, done;
  logic [W-1:0] tv, exp1;
  int checks = 0, failures = 0;

  pfl_tv_gen #(.W(W)) dut (.clk, .rst_n, .start_i(start), .valid_o(valid),
                           .tv_o(tv), .done_o(done));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) exp1[i] = (i % 2 == 0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      repeat (3) begin @(negedge clk); check(!valid, "idle valid"); end
      start = 1;
      @(negedge clk); start = 0;
      check(valid && !done && tv == exp1, "TV1");
      @(negedge clk);
      check(valid && done && tv == ~exp1, "TV2");
      @(negedge clk);
      check(!valid, "silent after pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
