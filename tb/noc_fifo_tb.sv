// Testbench of noc_fifo: random pushes and pops (never into a full or out of
// an empty FIFO) against a queue kept by the testbench; checks the head
// word, the empty and full flags, and that DEPTH words fit.
module noc_fifo_tb;
  localparam int unsigned WIDTH = 39, DEPTH = 6;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [WIDTH-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];

  noc_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .push_i(push), .din_i(din), .pop_i(pop), .dout_o(dout),
    .empty_o(empty), .full_o(full)
  );
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int filled = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(dout == model[0], "head word");
      if (model.size() == DEPTH) filled++;
      // phases: mostly filling, then mostly draining
      push = (model.size() < DEPTH || $urandom_range(1, 0) == 1) &&
             ($urandom_range(9, 0) < ((n / 200) % 2 == 0 ? 8 : 3));
      pop  = model.size() > 0 && $urandom_range(9, 0) < ((n / 200) % 2 == 0 ? 3 : 8);
      if (push && model.size() == DEPTH && !pop) push = 0;
      din = {$urandom, $urandom};
      @(posedge clk);
      #1;
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
      push = 0; pop = 0;
    end
    check(filled > 0, "FIFO was filled to DEPTH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
