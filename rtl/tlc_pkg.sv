// tlc_pkg: types and constants shared by the Tight Loop Cache fetch system.
//
// The loop cache controller is a three-state machine (IDLE, FILL, ACTIVE).
// The encoding matches the two-bit state values seen on the controller's
// state register in simulation (IDLE = 00, FILL = 01); ACTIVE = 10 is this
// design's choice. The AHB HTRANS encodings are the standard AHB-Lite ones.
package tlc_pkg;

  typedef enum logic [1:0] {
    ST_IDLE   = 2'b00,
    ST_FILL   = 2'b01,
    ST_ACTIVE = 2'b10
  } lc_state_e;

  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;

endpackage
