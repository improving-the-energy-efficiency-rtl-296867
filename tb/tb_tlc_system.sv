// tb_tlc_system: end-to-end test of the fetch system at its default size
// (32 KB program memory, 64-byte loop cache), with the core replaced by a
// fetch-stream driver.
//
// The program memory is loaded with an address-derived pattern. Every
// transfer's HRDATA is checked one cycle after its address against that
// pattern, whichever memory supplied it. Phases:
//  1. the fetch sequence of a four-word loop at byte addresses 312..324,
//     checking the cycle at which main_cache drops and the state changes;
//  2. the evaluated loop sizes (8 to 40 Thumb instructions, 4 to 20 words)
//     each run for a fixed trip count, checking how many fetches the cache
//     served: every fetch from the third iteration on for loops that fit,
//     none for loops that do not;
//  3. the same loops with global_cache_enable low: no cache read at all;
//  4. random program-like traffic with idle cycles, data reads, same-word
//     refetches, early loop exits and cache enable toggling.
// It counts each mechanism (fill, activation, exit on a not-taken branch,
// exit on another jump, cache off, data access while active) and fails if
// one never happened.
module tb_tlc_system;
  import tlc_pkg::*;
  localparam int unsigned WORDS = 8192;
  localparam int unsigned CW    = 16;   // cache words

  logic HCLK = 0, HRESETn = 0, global_cache_enable = 1;
  logic [31:0] HADDR = '0, HRDATA;
  logic [1:0]  HTRANS = HTRANS_IDLE;
  logic [3:0]  HPROT = 4'b0010;
  logic HREADY;
  logic prog_we = 0;
  logic [12:0] prog_addr = '0;
  logic [31:0] prog_wdata = '0;
  logic main_cache, cache_we, imem_en, cache_en;
  logic [1:0] ctrl_state;

  tlc_system dut (.*);
  always #5 HCLK = ~HCLK;

  int checks = 0, failures = 0;
  int n_fill = 0, n_active = 0, n_fill_abort = 0, n_exit_nt = 0, n_exit_cof = 0;
  int n_cache_reads = 0, n_imem_reads = 0, n_off_cycles = 0, n_data_active = 0;
  int n_refetch = 0;

  function automatic logic [31:0] pat(input logic [12:0] w);
    return {3'b101, w, 3'b011, ~w};
  endfunction

  logic [1:0]  prev_state;
  logic [29:0] last_fetch;

  // one bus cycle; kind 0 fetch, 1 idle, 2 data read (from program memory)
  task automatic cyc(input int kind, input logic [12:0] w);
    HTRANS = (kind == 1) ? HTRANS_IDLE : HTRANS_NONSEQ;
    HPROT  = (kind == 2) ? 4'b0011 : 4'b0010;
    HADDR  = {17'd0, w, 1'b0, 1'($urandom)};
    #1;
    if (kind == 0 && HADDR[31:2] == last_fetch) n_refetch++;
    if (kind == 2 && ctrl_state == 2'(ST_ACTIVE)) n_data_active++;
    if (kind != 1 && !global_cache_enable) n_off_cycles++;
    if (cache_en) n_cache_reads++;
    if (imem_en) n_imem_reads++;
    if (!global_cache_enable && cache_en) begin
      failures++; $display("FAIL cache read while disabled");
    end
    @(posedge HCLK);
    prev_state = ctrl_state;
    #1;
    // after the edge that closes the address phase, HRDATA carries its data
    if (kind != 1) begin
      checks++;
      if (HRDATA !== pat(w)) begin
        failures++;
        $display("FAIL %0t word %0d HRDATA=%h expected %h", $time, w, HRDATA, pat(w));
      end
    end
    if (kind == 0) last_fetch = {17'd0, w};
    if (prev_state != ctrl_state) begin
      if (prev_state == 2'(ST_IDLE)   && ctrl_state == 2'(ST_FILL))   n_fill++;
      if (prev_state == 2'(ST_FILL)   && ctrl_state == 2'(ST_ACTIVE)) n_active++;
      if (prev_state == 2'(ST_FILL)   && ctrl_state == 2'(ST_IDLE))   n_fill_abort++;
      if (prev_state == 2'(ST_ACTIVE) && ctrl_state == 2'(ST_IDLE)) begin
        if (HADDR[31:2] == last_fetch && dp_word_seq_exit) n_exit_nt++;
        else n_exit_cof++;
      end
    end
  endtask

  logic dp_word_seq_exit;

  task automatic fetch(input logic [12:0] w);
    dp_word_seq_exit = (w == 13'(last_fetch + 1));
    cyc(0, w);
  endtask

  // run a loop of `len` words at `start`, `trips` times, then fall through
  task automatic run_loop(input logic [12:0] start, input int len, input int trips,
                          input bit idle_between);
    for (int t = 0; t < trips; t++)
      for (int i = 0; i < len; i++) begin
        fetch(start + 13'(i));
        if (idle_between) cyc(1, '0);
      end
    fetch(start + 13'(len));
    fetch(start + 13'(len + 1));
  endtask

  logic [12:0] pc;
  int base_cache;

  initial begin
    last_fetch = '1; prev_state = '0; dp_word_seq_exit = 0;
    repeat (2) @(posedge HCLK);
    HRESETn = 1;
    for (int a = 0; a < WORDS; a++) begin
      prog_we = 1; prog_addr = 13'(a); prog_wdata = pat(13'(a));
      @(posedge HCLK);
    end
    prog_we = 0;

    // ---- 1. byte addresses 320, 324, 312, 316, 320, 324, 312, 316 ...
    begin
      logic [12:0] seq [12] = '{80, 81, 78, 79, 80, 81, 78, 79, 80, 81, 82, 83};
      logic [1:0]  exp_state_after [12] = '{0, 0, 1, 1, 1, 1, 2, 2, 2, 2, 0, 0};
      logic        exp_main [12]        = '{1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 1, 1};
      for (int i = 0; i < 12; i++) begin
        HTRANS = HTRANS_NONSEQ; HPROT = 4'b0010; HADDR = {17'd0, seq[i], 2'b00};
        #1;
        checks++;
        if (main_cache !== exp_main[i]) begin
          failures++; $display("FAIL step %0d main_cache=%0b", i, main_cache);
        end
        cyc(0, seq[i]);
        checks++;
        if (ctrl_state !== exp_state_after[i]) begin
          failures++; $display("FAIL step %0d state=%0d expected %0d", i, ctrl_state, exp_state_after[i]);
        end
      end
    end

    // ---- 2. evaluated loop sizes, 20 trips each
    for (int instr = 8; instr <= 40; instr += 8) begin
      int words, got;
      words = instr / 2;
      cyc(1, '0); cyc(1, '0);
      base_cache = n_cache_reads;
      run_loop(13'd1000 + 13'(instr * 7), words, 20, 0);
      got = n_cache_reads - base_cache;
      checks++;
      if (got != ((words <= CW) ? 18 * words : 0)) begin
        failures++; $display("FAIL loop of %0d instructions: %0d cache reads", instr, got);
      end
      $display("loop %0d instructions (%0d words), 20 trips: %0d of %0d fetches from the cache",
               instr, words, got, 20 * words + 2);
    end

    // ---- 3. cache switched off
    global_cache_enable = 0;
    base_cache = n_cache_reads;
    run_loop(13'd2000, 6, 10, 1);
    checks++;
    if (n_cache_reads != base_cache) begin
      failures++; $display("FAIL cache used while switched off");
    end
    global_cache_enable = 1;

    // ---- 4. random program-like traffic
    pc = 13'd3000;
    for (int blk = 0; blk < 400; blk++) begin
      int len, trips;
      bit brk;
      len   = 1 + $urandom % (CW + 3);
      trips = 1 + $urandom % 6;
      brk   = ($urandom % 5 == 0);
      if ($urandom % 25 == 0) global_cache_enable = ~global_cache_enable;
      for (int t = 0; t < trips; t++)
        for (int i = 0; i < len; i++) begin
          if (brk && t == trips - 1 && i == len / 2 && len > 2) begin
            pc = pc + 13'(len + 5);
            break;
          end
          while ($urandom % 5 == 0) cyc(1 + $urandom % 2, 13'($urandom));
          fetch(pc + 13'(i));
          if ($urandom % 10 == 0) fetch(pc + 13'(i));
        end
      pc = pc + 13'(len + $urandom % 30);
      if (pc > 13'd8000) pc = 13'd100;
    end
    global_cache_enable = 1;
    cyc(1, '0); cyc(1, '0);

    $display("fills %0d activations %0d fill aborts %0d exits(not taken) %0d exits(other jump) %0d",
             n_fill, n_active, n_fill_abort, n_exit_nt, n_exit_cof);
    $display("cache reads %0d memory reads %0d cache-off transfers %0d data reads while active %0d refetches %0d",
             n_cache_reads, n_imem_reads, n_off_cycles, n_data_active, n_refetch);
    checks++;
    if (n_fill == 0 || n_active == 0 || n_fill_abort == 0 || n_exit_nt == 0 ||
        n_exit_cof == 0 || n_off_cycles == 0 || n_data_active == 0 || n_refetch == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
