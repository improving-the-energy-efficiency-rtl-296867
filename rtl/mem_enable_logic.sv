// mem_enable_logic: the enables of the two fetch memories.
//
// The instruction memory is enabled whenever the user has switched the loop
// cache off (global_cache_enable low) or the controller chooses main memory
// (main_cache high): C = !A | A&B, which reduces to !A | B. The cache read
// enable is the inverse. Both are gated with HTRANS[1], so neither memory is
// read in a cycle without a transfer. The truth table and the gating follow
// the described system; `sel_main` (C before gating) is passed on for the
// read-data multiplexer. Purely combinational.
module mem_enable_logic (
  input  logic global_cache_enable,  // A
  input  logic main_cache,           // B
  input  logic htrans1,              // HTRANS[1]
  output logic sel_main,             // C: instruction memory is the source
  output logic imem_en,
  output logic cache_en
);

  assign sel_main = ~global_cache_enable | (global_cache_enable & main_cache);
  assign imem_en  = sel_main & htrans1;
  assign cache_en = ~sel_main & htrans1;

endmodule
