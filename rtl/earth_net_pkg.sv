// earth_net_pkg: transfer-unit format, command codes and route decoding shared
// by the 4x4 crossbar switch, the data network and the network interface.
//
// Every link of the network carries 9-bit transfer units. Bit 8 is the control
// bit: 0 means bit 7..0 is a data byte, 1 means the unit is a command. The
// command codes (route, ordering tag, close, abort, filler) follow the
// document's command table. A route command is 11111_0ccc; the three low bits
// ccc pick one port (0..3), a random choice within the upper or lower pair,
// one upper plus one lower port, or all four ports.
//
// The network-interface STATUS word layout and the request masks produced for
// each route code are this design's encoding of what the document describes.
package earth_net_pkg;

  typedef logic [8:0] unit_t;       // one transfer unit: {control, byte}
  typedef logic [3:0] port_mask_t;  // one bit per switch output port

  localparam unit_t CMD_CLOSE  = 9'b1_1100_0000;
  localparam unit_t CMD_ABORT  = 9'b1_1101_0000;
  localparam unit_t CMD_FILLER = 9'b1_1111_1111;
  localparam logic [5:0] ROUTE_PREFIX = 6'b111110;
  localparam logic [2:0] TAG1_PREFIX  = 3'b100;
  localparam logic [2:0] TAG2_PREFIX  = 3'b101;

  typedef enum logic [2:0] {
    ROUTE_0  = 3'd0,  // port 0
    ROUTE_1  = 3'd1,  // port 1
    ROUTE_2  = 3'd2,  // port 2
    ROUTE_3  = 3'd3,  // port 3
    ROUTE_U  = 3'd4,  // random: port 0 or 1
    ROUTE_L  = 3'd5,  // random: port 2 or 3
    ROUTE_UL = 3'd6,  // random: one upper and one lower port
    ROUTE_A  = 3'd7   // all four ports
  } route_e;

  function automatic unit_t route_cmd(route_e r);
    return {ROUTE_PREFIX, r};
  endfunction

  function automatic unit_t tag1_cmd(logic [5:0] src);
    return {TAG1_PREFIX, src};
  endfunction

  function automatic unit_t tag2_cmd(logic [5:0] num);
    return {TAG2_PREFIX, num};
  endfunction

  function automatic logic is_route(unit_t u);
    return u[8:3] == ROUTE_PREFIX;
  endfunction

  function automatic logic is_close_or_abort(unit_t u);
    return (u == CMD_CLOSE) || (u == CMD_ABORT);
  endfunction

  // Broadcast type: the request asks for more than one output port.
  function automatic logic is_bcast(route_e r);
    return (r == ROUTE_UL) || (r == ROUTE_A);
  endfunction

  function automatic logic is_random(route_e r);
    return (r == ROUTE_U) || (r == ROUTE_L) || (r == ROUTE_UL);
  endfunction

  // First request issued for a route command. Random types start on the
  // lower-numbered port of each pair they may use.
  function automatic port_mask_t initial_request(route_e r);
    unique case (r)
      ROUTE_0:  return 4'b0001;
      ROUTE_1:  return 4'b0010;
      ROUTE_2:  return 4'b0100;
      ROUTE_3:  return 4'b1000;
      ROUTE_U:  return 4'b0001;
      ROUTE_L:  return 4'b0100;
      ROUTE_UL: return 4'b0101;
      default:  return 4'b1111;
    endcase
  endfunction

  // True when the grants received cover what the route command needs.
  function automatic logic request_satisfied(route_e r, port_mask_t req, port_mask_t gnt);
    unique case (r)
      ROUTE_UL: return (|gnt[1:0]) && (|gnt[3:2]);
      ROUTE_A:  return &gnt;
      default:  return |(gnt & req);
    endcase
  endfunction

  // Network interface status word, bit 11 down to bit 0.
  typedef struct packed {
    logic send_2;      // send buffer has fewer than 2 free units
    logic send_4;      // ... fewer than 4
    logic send_8;      // ... fewer than 8
    logic send_empty;
    logic send_full;
    logic receive_8;   // receive buffer holds at least 8 units
    logic receive_16;
    logic receive_24;
    logic receive_empty;
    logic receive_full;
    logic dahod;       // data unit at head of receive buffer
    logic cahod;       // command unit at head of receive buffer
  } ni_status_t;

endpackage
