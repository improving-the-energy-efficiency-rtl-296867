// tb_mem_enable_logic: exhaustive check of the memory enable truth table:
// instruction memory source C = !A | A&B, enables gated by HTRANS[1], cache
// enable the inverse of C.
module tb_mem_enable_logic;
  logic global_cache_enable, main_cache, htrans1;
  logic sel_main, imem_en, cache_en;
  int checks = 0, failures = 0;
  // expected C for (A,B) = 00, 01, 10, 11
  localparam logic [3:0] C_TABLE = 4'b1011;

  mem_enable_logic dut (.*);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {global_cache_enable, main_cache, htrans1} = 3'(v);
      #1;
      checks++;
      if (sel_main !== C_TABLE[{global_cache_enable, main_cache}] ||
          imem_en  !== (C_TABLE[{global_cache_enable, main_cache}] & htrans1) ||
          cache_en !== (!C_TABLE[{global_cache_enable, main_cache}] & htrans1)) begin
        failures++;
        $display("FAIL A=%0b B=%0b T=%0b -> C=%0b imem=%0b cache=%0b",
                 global_cache_enable, main_cache, htrans1, sel_main, imem_en, cache_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
