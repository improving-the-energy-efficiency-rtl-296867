// instruction_memory: the program memory of the microcontroller, 32 KB of
// 32-bit words, read by the core's instruction fetches.
//
// It is word addressed (addr[1:0] ignored) and has a synchronous read: when
// `en` is high in an address phase, the word appears on data_out in the data
// phase and is held while `en` is low, as a block RAM behaves. The core never
// writes it and it never inserts wait states.
//
// The size and read-only, always-ready behaviour follow the described system.
// The program-load port (prog_we, prog_addr, prog_wdata), through which a
// test bench or boot loader fills the memory, is this design's addition; the
// core side has no write path. The array is not reset.
module instruction_memory #(
  parameter int unsigned BYTES = 32768,
  parameter int unsigned DW    = 32,
  localparam int unsigned WORDS = BYTES / (DW / 8),
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW+1:0] addr,       // byte address, HADDR[AW+1:0]
  input  logic          en,
  output logic [DW-1:0] data_out,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,  // word address
  input  logic [DW-1:0] prog_wdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  data_out <= '0;
    else if (en) data_out <= mem[addr[AW+1:2]];
  end

endmodule
