// Testbench of pfl_fv_calc: random sets of stuck-at-0/1 wires distort the two
// test vectors; the computed fault vector must be 0 exactly on those wires.
module pfl_fv_calc_tb;
  localparam int unsigned W = 40;
  logic clk = 0, rst_n = 0, tv_valid = 0, fv_valid;
  logic [W-1:0] tv, fv, tv1;
  int checks = 0, failures = 0;

  pfl_fv_calc #(.W(W)) dut (.clk, .rst_n, .tv_valid_i(tv_valid), .tv_i(tv),
                            .fv_o(fv), .fv_valid_o(fv_valid));
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] bad, stuck;
    for (int i = 0; i < W; i++) tv1[i] = (i % 2 == 0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (fv !== '1) begin failures++; $display("FAIL reset value %h", fv); end
    for (int n = 0; n < 100; n++) begin
      bad   = {$urandom, $urandom} & {$urandom, $urandom};
      stuck = {$urandom, $urandom};
      tv_valid = 1; tv = (tv1 & ~bad) | (stuck & bad);
      @(negedge clk);
      tv = (~tv1 & ~bad) | (stuck & bad);
      @(negedge clk);
      tv_valid = 0;
      checks++;
      if (!fv_valid || fv !== ~bad) begin
        failures++;
        $display("FAIL fv=%h expected %h", fv, ~bad);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
