// dsi_pkg: types and constants shared by the synchronous-integrator blocks.
// The word width (16) and buffer depth (4096, 12 address bits) are the
// original module's; the ALU code values and the CAMAC command encoding of
// the test functions (F16, F17) are this design's own choice.
package dsi_pkg;
  localparam int unsigned DSI_DATA_W = 16;
  localparam int unsigned DSI_ADDR_W = 12;

  // ALU function held in the instruction register.
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,   // A + B : accumulate (integration, detection "Antenna")
    OP_SUB  = 2'd1,   // A - B : detection "Equivalent" phase
    OP_LOAD = 2'd2,   // B     : word from the computer into the buffer (test)
    OP_ZERO = 2'd3    // 0     : clear the cell while it is read out
  } alu_op_t;

  // One CAMAC dataway command as seen by a module: sub-address A, function F,
  // the S1 strobe (one clock wide) and the write lines W1-W16.
  typedef struct packed {
    logic [3:0]        a;
    logic [4:0]        f;
    logic              s1;
    logic [DSI_DATA_W-1:0] w;
  } camac_cmd_t;

  localparam logic [4:0] CF_READ  = 5'd0;   // A0F0  read and clear one channel
  localparam logic [4:0] CF_RESET = 5'd9;   // A0F9  reset the address counter
  localparam logic [4:0] CF_WRITE = 5'd16;  // A0F16 test write through the ALU
  localparam logic [4:0] CF_LOAD  = 5'd17;  // A0F17 load instruction register
endpackage
