// qnoc_pkg: types and constants shared by every block of the QoS wormhole
// network on chip.
//
// A link carries one flit per clock: FLIT_W data bits plus two out-of-band
// fields, the flit type (2 bits) and the service level (2 bits). The type
// encoding is the one of the link interface: 00 idle, 01 end of packet,
// 10 body, 11 full (single-flit) packet. The start of a packet is never
// coded; it is the first non-idle flit of a service level that follows an
// EP or FP flit of that level. Credits go back on separate wires: a 4-bit
// mask with one bit per service level plus a valid bit.
//
// Service levels are ranked linearly, Signalling highest (code 0) and Block
// Transfer lowest (code 3). The numeric codes are this design's choice.
//
// Router ports are numbered LOCAL, NORTH, EAST, SOUTH, WEST (this design's
// choice). Rows grow southwards and columns eastwards; X is the column.
// The target routing address (TRA) sits in the most significant bits of
// the first flit of each packet: the target row above the target column.
package qnoc_pkg;

  // Flit size of the design example: 16 bits.
  parameter int unsigned FLIT_W = 16;
  // Four service levels.
  parameter int unsigned NUM_SL = 4;
  parameter int unsigned SL_W   = 2;
  // Five router ports: four mesh neighbours and one module.
  parameter int unsigned NUM_PORTS = 5;
  parameter int unsigned PORT_W    = 3;
  // Coordinate field widths of the TRA (a 4x4 mesh needs 2 + 2 bits).
  parameter int unsigned COORD_W = 2;

  typedef enum logic [1:0] {
    FT_IDLE = 2'b00,
    FT_EP   = 2'b01,
    FT_BDY  = 2'b10,
    FT_FP   = 2'b11
  } flit_type_e;

  typedef enum logic [SL_W-1:0] {
    SL_SIGNAL = 2'd0,
    SL_RT     = 2'd1,
    SL_RDWR   = 2'd2,
    SL_BLOCK  = 2'd3
  } sl_e;

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  // Forward direction of a link (Table 1 signals other than the clock).
  typedef struct packed {
    flit_type_e          ftype;
    sl_e                 sl;
    logic [FLIT_W-1:0]   data;
  } link_t;

  // Backward direction of a link (Table 2 signals).
  typedef struct packed {
    logic                valid;
    logic [NUM_SL-1:0]   sl_mask;
  } credit_t;

  // A buffered flit: data plus its type (FlitSize + 2 bits per entry).
  typedef struct packed {
    flit_type_e          ftype;
    logic [FLIT_W-1:0]   data;
  } flit_t;

  localparam link_t   LINK_IDLE   = '{ftype: FT_IDLE, sl: SL_SIGNAL, data: '0};
  localparam credit_t CREDIT_NONE = '{valid: 1'b0, sl_mask: '0};

  // Field extraction of the TRA from a first flit.
  function automatic logic [COORD_W-1:0] tra_row(input logic [FLIT_W-1:0] d);
    return d[FLIT_W-1 -: COORD_W];
  endfunction

  function automatic logic [COORD_W-1:0] tra_col(input logic [FLIT_W-1:0] d);
    return d[FLIT_W-1-COORD_W -: COORD_W];
  endfunction

  // True for a flit that closes a packet.
  function automatic logic is_tail(input flit_type_e t);
    return (t == FT_EP) || (t == FT_FP);
  endfunction

endpackage
