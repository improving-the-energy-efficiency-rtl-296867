// tb_instruction_memory: loads the whole 32 KB memory through the program
// port with an address-derived pattern, then reads words back with the
// one-cycle read latency, checks that the two low address bits are ignored
// and that the output holds while the enable is low.
module tb_instruction_memory;
  localparam int unsigned BYTES = 32768;
  localparam int unsigned AW = $clog2(BYTES / 4);
  logic clk = 0, rst_n = 0, en = 0, prog_we = 0;
  logic [AW+1:0] addr = '0;
  logic [AW-1:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0, data_out;
  int checks = 0, failures = 0;

  instruction_memory #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] pat(input int unsigned a);
    return (a * 32'h9E37_79B9) ^ 32'hA5A5_0F0F;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << AW); a++) begin
      prog_we = 1; prog_addr = AW'(a); prog_wdata = pat(a);
      @(posedge clk);
    end
    prog_we = 0;
    for (int n = 0; n < 2000; n++) begin
      int unsigned a;
      a = $urandom % (1 << AW);
      addr = {AW'(a), 2'($urandom)}; en = 1;
      @(posedge clk); #1;
      en = 0;
      checks++;
      if (data_out !== pat(a)) begin
        failures++; $display("FAIL read %0d got %h", a, data_out);
      end
      addr = $urandom;
      @(posedge clk); #1;
      checks++;
      if (data_out !== pat(a)) begin
        failures++; $display("FAIL hold %0d got %h", a, data_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
