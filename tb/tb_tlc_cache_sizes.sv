// tb_tlc_cache_sizes: the evaluated loop sizes run on the two smaller cache
// configurations, 16 and 32 bytes (4 and 8 words), with the 32 KB program
// memory. Loops of up to 8 instructions fit the 16-byte cache, up to 16 the
// 32-byte one; longer loops must run wholly from the program memory.
module tb_tlc_cache_sizes;
  logic done16, done32;
  int checks16, checks32, fail16, fail32;
  int checks, failures;

  tlc_loop_sweep #(.CACHE_BYTES(16)) u16 (.done(done16), .checks(checks16), .failures(fail16));
  tlc_loop_sweep #(.CACHE_BYTES(32)) u32 (.done(done32), .checks(checks32), .failures(fail32));

  initial begin
    #1;
    wait (done16 && done32);
    checks = checks16 + checks32;
    failures = fail16 + fail32;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks32, fail16 + fail32 + 1);
    $finish;
  end
endmodule
