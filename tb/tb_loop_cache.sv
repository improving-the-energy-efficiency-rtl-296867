// tb_loop_cache: fills an 8-entry cache the way a 4-word loop starting at
// word index 6 does (entries 6, 7, 0, 1 written in the data phase of each
// fetch), then random write/read traffic against a reference array. Checks
// the data-phase write address, that writes need both `we` and the delayed
// HTRANS[1], the one-cycle read latency and the hold of data_out.
module tb_loop_cache;
  localparam int unsigned W = 3;
  logic clk = 0, rst_n = 0, en = 0, we = 0, htrans = 0;
  logic [W+1:0] addr = '0;
  logic [31:0] data_in = '0, data_out;
  logic [31:0] model [1 << W];
  logic [31:0] exp_out;
  logic [W-1:0] a_prev;
  logic t_prev;
  int checks = 0, failures = 0;

  loop_cache #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  // One cycle: address phase for (a, t, e), data phase of the previous one
  // with write enable w and data d.
  task automatic cyc(input logic [W-1:0] a, input logic t, input logic e,
                     input logic w, input logic [31:0] d);
    addr = {a, 2'($urandom)}; htrans = t; en = e; we = w; data_in = d;
    @(posedge clk);
    if (e) exp_out = model[a];
    if (w && t_prev) model[a_prev] = d;
    // a read of the entry written in the same cycle returns the old word
    a_prev = a; t_prev = t;
    #1;
    checks++;
    if (data_out !== exp_out) begin
      failures++; $display("FAIL addr=%0d data_out=%h exp=%h", a, data_out, exp_out);
    end
  endtask

  initial begin
    exp_out = '0; t_prev = 0; a_prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initialise every entry
    for (int i = 0; i <= (1 << W); i++)
      cyc(W'(i), 1, 0, 1, 32'h0BAD_0000 + i - 1);
    // loop fill: fetch 6,7,0,1 then data of 1, writes 6,7,0,1 in order
    cyc(3'd6, 1, 0, 0, 32'h0);
    cyc(3'd7, 1, 0, 1, 32'h1c49_e001);
    cyc(3'd0, 1, 0, 1, 32'h4290_1c40);
    cyc(3'd1, 1, 0, 1, 32'h4b05_d3fb);
    cyc(3'd6, 1, 1, 1, 32'he001_4b05);
    // read the loop back
    for (int i = 0; i < 4; i++) cyc(W'(6 + i), 1, 1, 0, 32'hFFFF_FFFF);
    checks++;
    if (model[6] !== 32'h1c49_e001 || model[1] !== 32'he001_4b05) failures++;
    // random traffic
    for (int n = 0; n < 1000; n++)
      cyc(W'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
