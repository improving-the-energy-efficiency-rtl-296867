// tb_hrdata_mux: checks that HRDATA follows the source chosen in the
// previous address phase, and that the choice is kept through cycles
// without a transfer.
module tb_hrdata_mux;
  logic clk = 0, rst_n = 0, sel_main = 1, htrans1 = 0, sel_main_d;
  logic [31:0] instrdata, chdata, hrdata;
  int checks = 0, failures = 0;
  logic exp_sel;

  hrdata_mux dut (.*);
  always #5 clk = ~clk;

  initial begin
    exp_sel = 1;
    instrdata = 32'h1111_0000; chdata = 32'h2222_0000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      sel_main = 1'($urandom); htrans1 = 1'($urandom);
      @(posedge clk);
      if (htrans1) exp_sel = sel_main;
      #1;
      instrdata = $urandom; chdata = $urandom;
      sel_main = ~sel_main;  // address-phase change must not leak through
      #1;
      checks++;
      if (hrdata !== (exp_sel ? instrdata : chdata) || sel_main_d !== exp_sel) begin
        failures++;
        $display("FAIL n=%0d hrdata=%h exp_sel=%0b", n, hrdata, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
