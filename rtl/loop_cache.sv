// loop_cache: the tight loop cache array, a small direct-mapped instruction
// store with neither tags nor valid bits.
//
// The array has 2^W words and is indexed by the word-address bits
// addr[W+1:2]; the two lowest address bits are ignored, since the memories
// are word addressable. Because the index is taken straight from the address,
// a loop may start anywhere: a loop of 4 words starting at index 6 of an
// 8-entry cache occupies entries 6, 7, 0, 1.
//
// Writing follows the AHB address/data phase split. The address and
// HTRANS[1] are registered (address_a, htrans_a); in the following cycle,
// the data phase, the word on data_in is written to entry address_a when
// `we` and htrans_a are high. Reading is synchronous: when `en` is high in an
// address phase, the addressed word appears on data_out in the data phase and
// is held otherwise, like a block RAM.
//
// The organisation, the delayed address and HTRANS[1], and the indexing
// follow the described hardware; the read timing is taken from its
// simulation waveforms. Holding data_out when not enabled and resetting the
// output register are this design's choices; the array is not reset.
module loop_cache #(
  parameter int unsigned W  = 4,    // 2^W entries (64 bytes of 32-bit words)
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W+1:0]  addr,      // HADDR[W+1:0]
  input  logic          en,        // read enable (address phase)
  input  logic          we,        // write enable (data phase)
  input  logic          htrans,    // HTRANS[1] of the address phase
  input  logic [DW-1:0] data_in,   // data-phase instruction from memory
  output logic [DW-1:0] data_out
);

  localparam int unsigned ENTRIES = 1 << W;

  logic [DW-1:0] mem [ENTRIES];
  logic [W-1:0]  address_a;
  logic          htrans_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      address_a <= '0;
      htrans_a  <= 1'b0;
    end else begin
      address_a <= addr[W+1:2];
      htrans_a  <= htrans;
    end
  end

  always_ff @(posedge clk) begin
    if (we && htrans_a) mem[address_a] <= data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  data_out <= '0;
    else if (en) data_out <= mem[addr[W+1:2]];
  end

endmodule
