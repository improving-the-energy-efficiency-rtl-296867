// hrdata_mux: chooses which memory drives HRDATA back to the core.
//
// The source is decided in the address phase (sel_main, high for the
// instruction memory), but the data arrives one cycle later, in the data
// phase. The multiplexer therefore registers the decision of every transfer
// (htrans1 high) and steers HRDATA with the registered copy: INSTRDATA when
// it is high, CHDATA when low. With no transfer the last choice is kept.
//
// The multiplexer and its inputs follow the described system; registering
// the select for the data phase is this design's reading of the AHB timing.
module hrdata_mux #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel_main,    // address-phase source choice
  input  logic          htrans1,
  input  logic [DW-1:0] instrdata,   // from the instruction memory
  input  logic [DW-1:0] chdata,      // from the loop cache
  output logic [DW-1:0] hrdata,
  output logic          sel_main_d   // data-phase source choice
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sel_main_d <= 1'b1;
    else if (htrans1) sel_main_d <= sel_main;
  end

  assign hrdata = sel_main_d ? instrdata : chdata;

endmodule
