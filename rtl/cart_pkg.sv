// cart_pkg: types, sizes and the routing rule shared by the Cartesian router.
//
// A packet travels bit-serially on one wire per port. The line idles at 0. A
// packet is framed by a marker of six consecutive ones at the start (SOP) and
// at the end (EOP), as the design specifies; the bits in between must never
// hold six ones in a row (the sender guarantees this, for example by stuffing
// a 0 after five ones). This implementation fixes the rest of the frame:
//
//   111111  0  <latitude, 64 bits, MSB first> <longitude, 64 bits, MSB first>
//   <payload bits> 111111
//
// The single 0 after the SOP ends the marker, so that the address starts at a
// known bit position; a header before the address is not defined. Packets on
// a line are separated by at least one idle 0 (the router's own outputs always
// leave several), so that each packet is recorded from a fresh queue word.
//
// Routing rule (route()): the destination latitude and longitude are compared
// with the router's own. An arterial router sends a packet north or south while
// the latitudes differ, then east or west while the longitudes differ, and keeps
// it (local port) when both match. A collector router passes a packet with a
// different latitude straight through (west in -> east out and vice versa). A
// packet that would leave by the port it came in on is discarded. The sense of
// the comparisons (larger latitude = north, larger longitude = east) is this
// design's choice.
package cart_pkg;

  // Address: latitude first, then longitude, 64 bits each.
  localparam int unsigned LAT_W  = 64;
  localparam int unsigned ADDR_W = 2 * LAT_W;

  // Start/end-of-packet marker length (ones).
  localparam int unsigned MARK_LEN = 6;

  // Bits counted by the packet counter from the first RECEIVING cycle to the
  // first address bit at the output of the detection shift register: the
  // marker is still draining from the register (MARK_LEN-2 bits) and the
  // separating 0 follows it.
  localparam int unsigned PCM_N = MARK_LEN - 1;

  // FIFO organisation: 8-bit serial/parallel converters, 512-word FIFOs.
  localparam int unsigned CONV_W     = 8;
  localparam int unsigned FIFO_DEPTH = 512;

  typedef enum logic {
    COLLECTOR = 1'b0,
    ARTERIAL  = 1'b1
  } router_kind_e;

  // Port numbering. A collector router uses ports 0..2, an arterial router 0..4.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,
    P_WEST  = 3'd2,
    P_NORTH = 3'd3,
    P_SOUTH = 3'd4
  } port_e;

  function automatic int unsigned num_ports(router_kind_e kind);
    return (kind == ARTERIAL) ? 5 : 3;
  endfunction

  // Packet-and-activator link from the IPS of one port to the OPS of another.
  typedef struct packed {
    logic act;   // activator: the receiving OPS records while it is high
    logic dat;   // serial packet bit
  } pa_link_t;

  typedef struct packed {
    logic  discard;
    port_e port;     // valid when discard is 0
  } route_t;

  // Routing decision from the serial comparison results.
  function automatic route_t route(router_kind_e kind, port_e in_port,
                                   logic lat_gt, logic lat_lt,
                                   logic lon_gt, logic lon_lt);
    route_t r;
    r.discard = 1'b0;
    r.port    = P_LOCAL;
    if (lat_gt || lat_lt) begin
      if (kind == ARTERIAL) begin
        r.port = lat_gt ? P_NORTH : P_SOUTH;
      end else begin
        unique case (in_port)
          P_WEST:  r.port = P_EAST;
          P_EAST:  r.port = P_WEST;
          default: begin
            // Injected locally: no direction of travel yet, use longitude.
            if (lon_gt)      r.port = P_EAST;
            else if (lon_lt) r.port = P_WEST;
            else             r.discard = 1'b1;
          end
        endcase
      end
    end else if (lon_gt) begin
      r.port = P_EAST;
    end else if (lon_lt) begin
      r.port = P_WEST;
    end else begin
      r.port = P_LOCAL;
    end
    if (!r.discard && r.port == in_port) r.discard = 1'b1;
    return r;
  endfunction

endpackage
