// tlc_loop_sweep: test harness that runs the evaluated loop sizes (8, 16,
// 24, 32 and 40 Thumb instructions, i.e. 4 to 20 32-bit words) through one
// tlc_system of a given cache size, 20 trips each, and checks every HRDATA
// and the number of fetches served by the loop cache: all fetches from the
// third trip on when the loop fits in the cache, none otherwise. Reports
// its check and failure counts through ports when `done` rises.
module tlc_loop_sweep #(
  parameter int unsigned CACHE_BYTES = 64
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import tlc_pkg::*;
  localparam int unsigned CW = CACHE_BYTES / 4;

  logic HCLK = 0, HRESETn = 0;
  logic [31:0] HADDR = '0, HRDATA;
  logic [1:0]  HTRANS = HTRANS_IDLE;
  logic [3:0]  HPROT = 4'b0010;
  logic HREADY, prog_we = 0;
  logic [12:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic main_cache, cache_we, imem_en, cache_en;
  logic [1:0] ctrl_state;

  tlc_system #(.CACHE_BYTES(CACHE_BYTES)) dut (
    .HCLK, .HRESETn, .global_cache_enable(1'b1), .HADDR, .HTRANS, .HPROT,
    .HRDATA, .HREADY, .prog_we, .prog_addr, .prog_wdata,
    .main_cache, .cache_we, .imem_en, .cache_en, .ctrl_state);

  always #5 HCLK = ~HCLK;

  function automatic logic [31:0] pat(input logic [12:0] w);
    return {w, 3'b110, ~w, 3'b001};
  endfunction

  int cache_reads;

  task automatic fetch(input logic [12:0] w);
    HTRANS = HTRANS_NONSEQ; HADDR = {17'd0, w, 2'b00};
    #1;
    if (cache_en) cache_reads++;
    @(posedge HCLK); #1;
    checks++;
    if (HRDATA !== pat(w)) begin
      failures++; $display("FAIL cache %0d B word %0d HRDATA=%h", CACHE_BYTES, w, HRDATA);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    repeat (2) @(posedge HCLK);
    HRESETn = 1;
    for (int a = 0; a < 8192; a++) begin
      prog_we = 1; prog_addr = 13'(a); prog_wdata = pat(13'(a));
      @(posedge HCLK);
    end
    prog_we = 0;
    for (int instr = 8; instr <= 40; instr += 8) begin
      int words;
      words = instr / 2;
      cache_reads = 0;
      for (int t = 0; t < 20; t++)
        for (int i = 0; i < words; i++) fetch(13'(500 + 37 * instr + i));
      fetch(13'(500 + 37 * instr + words));
      fetch(13'(500 + 37 * instr + words + 1));
      HTRANS = HTRANS_IDLE;
      @(posedge HCLK);
      checks++;
      if (cache_reads != ((words <= CW) ? 18 * words : 0)) begin
        failures++;
        $display("FAIL cache %0d B, loop %0d instructions: %0d cache reads", CACHE_BYTES, instr, cache_reads);
      end
      $display("cache %0d B, loop %0d instructions: %0d of %0d fetches from the cache",
               CACHE_BYTES, instr, cache_reads, 20 * words + 2);
    end
    done = 1;
  end
endmodule
