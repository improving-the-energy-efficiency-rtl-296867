// tlc_system: the instruction-fetch side of a microcontroller with a Tight
// Loop Cache (TLC) between the core's AHB-Lite port and its program memory.
//
// Small loops dominate embedded programs, and reading them from a tiny
// register-file cache costs less than reading the large program memory. The
// controller watches the fetch addresses: the first time a short backward
// jump is taken it copies the loop body into the cache while it still runs
// from memory (FILL); when the same jump is taken again it switches the
// fetches to the cache (ACTIVE) until the loop is left. There are no tags, no
// valid bits and no miss penalty: the controller knows before each fetch
// which memory holds it.
//
// Blocks: loop_cache_controller (with loop_counter), loop_cache,
// instruction_memory, mem_enable_logic (enables from global_cache_enable and
// main_cache, gated with HTRANS[1]) and hrdata_mux (data-phase source select).
//
// Interface and timing: the core side is an AHB-Lite slave port that only
// reads, with HREADY always high, so every transfer's data appears on HRDATA
// in the cycle after its address. The cache is written with the data-phase
// word of fetches only (HTRANS[1] & !HPROT[0]). The prog_* port fills the
// program memory; the remaining outputs expose the controller for
// observation. The structure follows the described system; the program-load
// port, the observation outputs and the fetch qualification of cache writes
// are this design's choices.
module tlc_system #(
  parameter int unsigned IMEM_BYTES  = 32768,
  parameter int unsigned CACHE_BYTES = 64,
  localparam int unsigned IMEM_AW    = $clog2(IMEM_BYTES / 4),
  localparam int unsigned W          = $clog2(CACHE_BYTES / 4)
) (
  input  logic               HCLK,
  input  logic               HRESETn,
  input  logic               global_cache_enable,
  // AHB-Lite from the core
  input  logic [31:0]        HADDR,
  input  logic [1:0]         HTRANS,
  input  logic [3:0]         HPROT,
  output logic [31:0]        HRDATA,
  output logic               HREADY,
  // program memory load port
  input  logic               prog_we,
  input  logic [IMEM_AW-1:0] prog_addr,
  input  logic [31:0]        prog_wdata,
  // observation
  output logic               main_cache,
  output logic               cache_we,
  output logic               imem_en,
  output logic               cache_en,
  output logic [1:0]         ctrl_state
);

  import tlc_pkg::*;

  lc_state_e   state;
  logic        sel_main;
  logic        fetch;
  logic [31:0] instrdata, chdata;

  assign fetch = HTRANS[1] & ~HPROT[0];

  loop_cache_controller #(.W(W)) u_controller (
    .clk        (HCLK),
    .rst_n      (HRESETn),
    .haddr      (HADDR),
    .htrans1    (HTRANS[1]),
    .hprot0     (HPROT[0]),
    .main_cache (main_cache),
    .cache_we   (cache_we),
    .state      (state)
  );

  mem_enable_logic u_enables (
    .global_cache_enable (global_cache_enable),
    .main_cache          (main_cache),
    .htrans1             (HTRANS[1]),
    .sel_main            (sel_main),
    .imem_en             (imem_en),
    .cache_en            (cache_en)
  );

  instruction_memory #(.BYTES(IMEM_BYTES)) u_imem (
    .clk        (HCLK),
    .rst_n      (HRESETn),
    .addr       (HADDR[IMEM_AW+1:0]),
    .en         (imem_en),
    .data_out   (instrdata),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_wdata (prog_wdata)
  );

  loop_cache #(.W(W)) u_cache (
    .clk      (HCLK),
    .rst_n    (HRESETn),
    .addr     (HADDR[W+1:0]),
    .en       (cache_en),
    .we       (cache_we),
    .htrans   (fetch),
    .data_in  (instrdata),
    .data_out (chdata)
  );

  hrdata_mux u_mux (
    .clk        (HCLK),
    .rst_n      (HRESETn),
    .sel_main   (sel_main),
    .htrans1    (HTRANS[1]),
    .instrdata  (instrdata),
    .chdata     (chdata),
    .hrdata     (HRDATA),
    .sel_main_d ()
  );

  assign HREADY     = 1'b1;
  assign ctrl_state = state;

endmodule
