// tb_loop_counter: self-checking test of the loop counter. Loads negative
// displacements, increments, and checks the count and the zero flag against
// a reference model; also checks that load wins over increment and that the
// counter wraps modulo 2^W.
module tb_loop_counter;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0, load = 0, inc = 0;
  logic [W-1:0] ld = '0, count;
  logic at_zero;
  int checks = 0, failures = 0;
  logic [W-1:0] model;

  loop_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic step(input logic l, input logic i, input logic [W-1:0] v);
    load = l; inc = i; ld = v;
    @(posedge clk);
    if (l) model = v; else if (i) model = model + 1'b1;
    #1;
    checks++;
    if (count !== model || at_zero !== (model == 0)) begin
      failures++;
      $display("FAIL count=%0d at_zero=%0b expected %0d", count, at_zero, model);
    end
  endtask

  initial begin
    model = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // loop of k+1 words: ld = -k, zero after k increments
    for (int k = 1; k < (1 << W); k++) begin
      step(1, 0, W'(-k));
      for (int j = 0; j < k; j++) step(0, (j % 3) != 2 ? 1 : 1, '0);
      if (!at_zero) begin failures++; $display("FAIL not zero after %0d", k); end
      checks++;
      step(0, 0, '0);  // hold
    end
    // load has priority over inc
    step(1, 1, 4'd9);
    // wrap-around
    for (int j = 0; j < 20; j++) step(0, 1, '0);
    // random
    for (int n = 0; n < 200; n++) step(1'($urandom % 5 == 0), 1'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
