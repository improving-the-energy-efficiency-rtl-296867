// tb_loop_cache_controller: drives the controller with a generated fetch
// stream (loops of random length, start and trip count, loops left early by
// a forward jump, straight-line code, repeated same-word fetches, idle
// cycles and data accesses) and compares main_cache, cache_we and the state
// every cycle with a reference model. The model tracks the loop by its
// start and end word addresses instead of a counter. Also counts that every
// transition of the state machine occurred.
module tb_loop_cache_controller;
  import tlc_pkg::*;
  localparam int unsigned W = 4;
  localparam int unsigned N = 1 << W;

  logic clk = 0, rst_n = 0;
  logic [31:0] haddr = '0;
  logic htrans1 = 0, hprot0 = 0;
  logic main_cache, cache_we;
  lc_state_e state;
  int checks = 0, failures = 0;

  loop_cache_controller #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  // reference model
  lc_state_e m_state;
  logic [29:0] m_prev, m_start, m_end;
  logic m_valid;
  int tr_if, tr_ff, tr_fa, tr_fi, tr_aa, tr_ai;

  function automatic lc_state_e model_next(input logic [29:0] f);
    lc_state_e nx = m_state;
    case (m_state)
      ST_IDLE:
        if (m_valid && f < m_prev && (m_prev - f) <= N - 1) nx = ST_FILL;
      default:
        if (f == m_prev)            nx = m_state;
        else if (m_prev == m_end)   nx = (f == m_start) ? ST_ACTIVE : ST_IDLE;
        else if (f == m_prev + 1)   nx = m_state;
        else                        nx = ST_IDLE;
    endcase
    return nx;
  endfunction

  // one bus cycle: fetch of word f (kind 0), idle (1) or data access (2)
  task automatic cyc(input int kind, input logic [29:0] f);
    lc_state_e nx;
    logic fetch;
    fetch = (kind == 0);
    htrans1 = (kind != 1);
    hprot0  = (kind == 2);
    haddr   = (kind == 2) ? 32'h2000_0000 + ($urandom & 32'hFFC)
                          : {f, 1'b0, 1'($urandom)};
    nx = fetch ? model_next(f) : m_state;
    #1;
    checks++;
    if (main_cache !== !(fetch && nx == ST_ACTIVE) ||
        cache_we !== (m_state == ST_FILL)) begin
      failures++;
      $display("FAIL %0t f=%0d st=%s main_cache=%0b cache_we=%0b", $time, f,
               m_state.name(), main_cache, cache_we);
    end
    @(posedge clk);
    if (fetch) begin
      if (m_state == ST_IDLE && nx == ST_FILL) begin
        m_start = f; m_end = m_prev; tr_if++;
      end
      if (m_state == ST_FILL   && nx == ST_FILL)   tr_ff++;
      if (m_state == ST_FILL   && nx == ST_ACTIVE) tr_fa++;
      if (m_state == ST_FILL   && nx == ST_IDLE)   tr_fi++;
      if (m_state == ST_ACTIVE && nx == ST_ACTIVE) tr_aa++;
      if (m_state == ST_ACTIVE && nx == ST_IDLE)   tr_ai++;
      m_state = nx; m_prev = f; m_valid = 1;
    end
    #1;
    checks++;
    if (state !== m_state) begin
      failures++;
      $display("FAIL %0t state=%s expected %s", $time, state.name(), m_state.name());
    end
  endtask

  // a fetch with random idle / data cycles before it, sometimes repeated
  task automatic fetch_word(input logic [29:0] f);
    while ($urandom % 4 == 0) cyc(1 + ($urandom % 2), '0);
    cyc(0, f);
    if ($urandom % 8 == 0) cyc(0, f);
  endtask

  logic [29:0] pc;

  initial begin
    m_state = ST_IDLE; m_prev = '0; m_valid = 0; m_start = '0; m_end = '0;
    tr_if = 0; tr_ff = 0; tr_fa = 0; tr_fi = 0; tr_aa = 0; tr_ai = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    pc = 30'd78;
    for (int blk = 0; blk < 300; blk++) begin
      int len, trips, brk;
      len   = 1 + $urandom % (N + 4);   // loop length in words, some too long
      trips = 1 + $urandom % 5;
      brk   = ($urandom % 5 == 0) ? 1 + $urandom % 3 : 0;  // leave early
      for (int t = 0; t < trips; t++) begin
        for (int i = 0; i < len; i++) begin
          if (brk != 0 && t == trips - 1 && i == len / 2 && len > 2) begin
            pc = pc + 30'(len + 7);  // forward jump out of the loop
            break;
          end
          fetch_word(pc + 30'(i));
        end
      end
      pc = pc + 30'(len) + 30'($urandom % 40);
      // straight-line code
      for (int i = 0; i < $urandom % 6; i++) fetch_word(pc + 30'(i));
      pc = pc + 30'd8;
    end
    $display("transitions: IDLE->FILL %0d FILL->FILL %0d FILL->ACTIVE %0d FILL->IDLE %0d ACTIVE->ACTIVE %0d ACTIVE->IDLE %0d",
             tr_if, tr_ff, tr_fa, tr_fi, tr_aa, tr_ai);
    checks++;
    if (tr_if == 0 || tr_ff == 0 || tr_fa == 0 || tr_fi == 0 || tr_aa == 0 || tr_ai == 0) begin
      failures++; $display("FAIL a transition never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
