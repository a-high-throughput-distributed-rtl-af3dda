// dsb_pkg: types and default sizes shared by the distributed shared-buffer
// (DSB) router. A router has five ports (north, south, east, west and the
// local injection/ejection port, in that order), carries 128-bit flits, and
// in its main configuration has 8 virtual channels (VCs) of 5 flits per input
// and 10 middle-memory banks of 10 flits each. The port count, flit width,
// VC count/depth and bank count/depth are the published ones; the widths of
// the VC id, mesh coordinates and timestamps are this design's choice.
package dsb_pkg;

  localparam int NUM_PORTS   = 5;    // N, S, E, W, local
  localparam int PORT_W      = 3;
  localparam int FLIT_W      = 128;  // flit payload width
  localparam int VC_ID_W     = 4;    // room for up to 16 VCs per port
  localparam int COORD_W     = 4;    // mesh coordinates, up to 16x16

  // Main configuration (300 flits of buffering per router)
  localparam int DEF_NUM_VC   = 8;
  localparam int DEF_VC_DEPTH = 5;
  localparam int DEF_NUM_MM   = 10;
  localparam int DEF_MM_DEPTH = 10;
  localparam int DEF_TS_W     = 8;   // timestamp / router clock width
  localparam int TS_LEAD      = 3;   // TS stage to MM_RD stage distance, cycles

  typedef enum logic [PORT_W-1:0] {
    PORT_NORTH = 3'd0,
    PORT_SOUTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_WEST  = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;

  // A flit as it travels on a link. The head flit carries the destination
  // in the low bits of its payload: x in [COORD_W-1:0], y in [2*COORD_W-1:COORD_W].
  typedef struct packed {
    logic               head;
    logic               tail;
    logic [VC_ID_W-1:0] vc;    // VC of the receiving input port
    logic [FLIT_W-1:0]  data;
  } flit_t;

  // Credit returned upstream when a flit leaves an input VC buffer.
  typedef struct packed {
    logic               valid;
    logic [VC_ID_W-1:0] vc;
  } credit_t;

  function automatic logic [COORD_W-1:0] flit_dest_x(flit_t f);
    return f.data[COORD_W-1:0];
  endfunction

  function automatic logic [COORD_W-1:0] flit_dest_y(flit_t f);
    return f.data[2*COORD_W-1:COORD_W];
  endfunction

endpackage
