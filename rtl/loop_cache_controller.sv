// loop_cache_controller: detects tight loops in the instruction fetch stream
// by address comparison and decides, for every fetch, whether the loop cache
// or the instruction memory supplies the instruction.
//
// How it works. The controller keeps a copy of the previous fetch address
// (word address, HADDR[31:2]) and subtracts it from the address now on the
// bus. A difference whose bits above the low W are all ones and whose low W
// bits are not zero is a short backward branch (sbb): a jump back of 1 to
// 2^W-1 words, so the loop, branch included, fits in the 2^W-entry cache.
//   IDLE   -> FILL   on any taken sbb. Its low W bits (ld, negative) are
//                    stored and loaded into the loop counter.
//   FILL   : instructions still come from memory and are copied into the
//            cache. Each sequential fetch increments the counter; it reaches
//            zero when the triggering branch itself has been fetched.
//   FILL   -> ACTIVE when, with the counter at zero, the next fetch jumps back
//                    by the same displacement (the triggering sbb is taken).
//   ACTIVE : instructions come from the cache; the counter reloads at every
//            taken triggering sbb and the loop runs on.
//   FILL/ACTIVE -> IDLE when the triggering sbb is not taken (sequential fetch
//            with the counter at zero) or any other change of flow happens.
// A repeated fetch of the same word (the core can present a halfword address
// in an already fetched word) is neither sequential nor a change of flow.
//
// Outputs. cache_we is high in FILL (Moore); the cache applies it to the
// delayed data-phase address, so the loop start fetched in the cycle that
// entered FILL is written too. main_cache is Mealy: it is low exactly when
// the fetch now on the bus leads to ACTIVE, so it drops in the same address
// phase that triggers FILL->ACTIVE and rises in the one that leaves ACTIVE,
// before the state register changes. For non-fetch cycles main_cache is 1.
//
// Interface: a fetch is HTRANS[1] & !HPROT[0] (AHB opcode fetch); other cycles
// change nothing. HREADY is assumed always high, so every cycle with a fetch
// is one address phase. The state machine, the output table and the counter
// follow the described technique and its hardware version; the exact
// displacement test, the same-word rule, the HPROT[0] polarity and the reset
// behaviour are this design's choices.
module loop_cache_controller
  import tlc_pkg::*;
#(
  parameter int unsigned W = 4   // cache index width: 2^W entries
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  input  logic        htrans1,     // HTRANS[1]: NONSEQ or SEQ transfer
  input  logic        hprot0,      // HPROT[0]: 0 = opcode fetch, 1 = data
  output logic        main_cache,  // 1: instruction memory, 0: loop cache
  output logic        cache_we,    // write the data-phase word into the cache
  output lc_state_e   state
);

  lc_state_e    state_q, state_d;
  logic [29:0]  prev_q;           // previous fetch word address
  logic         prev_valid_q;
  logic [W-1:0] ld_q;             // displacement of the triggering sbb

  logic         fetch;
  logic [29:0]  diff;
  logic         same_word, seq, sbb, trig_taken;
  logic         cnt_load, cnt_inc, cnt_zero;
  logic [W-1:0] cnt_ld;

  assign fetch     = htrans1 & ~hprot0;
  assign diff      = haddr[31:2] - prev_q;
  assign same_word = (diff == '0);
  assign seq       = (diff == 30'd1);
  assign sbb       = prev_valid_q & (&diff[29:W]) & (diff[W-1:0] != '0);
  assign trig_taken = cnt_zero & sbb & (diff[W-1:0] == ld_q);

  always_comb begin
    state_d  = state_q;
    cnt_load = 1'b0;
    cnt_inc  = 1'b0;
    cnt_ld   = diff[W-1:0];
    if (fetch) begin
      unique case (state_q)
        ST_IDLE: begin
          if (sbb) begin
            state_d  = ST_FILL;
            cnt_load = 1'b1;
          end
        end
        ST_FILL, ST_ACTIVE: begin
          if (same_word) begin
            state_d = state_q;
          end else if (cnt_zero) begin
            if (trig_taken) begin
              state_d  = ST_ACTIVE;
              cnt_load = 1'b1;
              cnt_ld   = ld_q;
            end else begin
              state_d = ST_IDLE;
            end
          end else if (seq) begin
            cnt_inc = 1'b1;
          end else begin
            state_d = ST_IDLE;
          end
        end
        default: state_d = ST_IDLE;
      endcase
    end
  end

  loop_counter #(.W(W)) u_loop_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (cnt_load),
    .inc     (cnt_inc),
    .ld      (cnt_ld),
    .count   (),
    .at_zero (cnt_zero)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ST_IDLE;
      prev_q       <= '0;
      prev_valid_q <= 1'b0;
      ld_q         <= '0;
    end else begin
      state_q <= state_d;
      if (fetch) begin
        prev_q       <= haddr[31:2];
        prev_valid_q <= 1'b1;
      end
      if (fetch && state_q == ST_IDLE && sbb) ld_q <= diff[W-1:0];
    end
  end

  assign main_cache = ~(fetch & (state_d == ST_ACTIVE));
  assign cache_we   = (state_q == ST_FILL);
  assign state      = state_q;

  // The cache is only read in ACTIVE, and ACTIVE is only reached from FILL.
  a_no_idle_to_active: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == ST_IDLE |-> state_d != ST_ACTIVE);
  a_cache_read_only_when_fetching: assert property (@(posedge clk) disable iff (!rst_n)
    !main_cache |-> fetch);

endmodule
