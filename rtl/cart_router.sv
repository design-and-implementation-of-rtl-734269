// cart_router: a Cartesian router.
//
// A Cartesian router needs no routing table: router addresses are physical
// positions (latitude, longitude), and each port compares a packet's
// destination address with the router's own to send it on north, south,
// east or west, keep it at the local port, or discard it. The router is a
// set of identical, independent ports (cart_port) fully connected by
// packet-and-activator links: the IPS of every port reaches the OPS of every
// other port, and every OPS has one queue per other port.
//
// KIND selects the router: ARTERIAL (default) has the local port and four
// external ports north, south, east and west; COLLECTOR has the local port
// and two external ports east and west. Port numbers follow cart_pkg::port_e
// (0 local, 1 east, 2 west, 3 north, 4 south).
//
// Interface: rx[p]/tx[p] are the serial lines of port p, idle low; packets are
// framed as described in cart_pkg. router_addr is the router's own address
// (latitude in [127:64]), normally fixed. overflow[p] flags a queue of port p
// that had to drop data. Everything runs on the single clock clk, one line
// bit per clock; rst_n is an active-low synchronous reset.
//
// The ports' decide/decision monitor outputs are not brought out of the top
// (testbenches observe them hierarchically); lint reports them as unused.
module cart_router
  import cart_pkg::*;
#(
  parameter router_kind_e KIND   = ARTERIAL,
  parameter int unsigned  WORD_W = cart_pkg::CONV_W,
  parameter int unsigned  DEPTH  = cart_pkg::FIFO_DEPTH,
  localparam int unsigned NPORTS = num_ports(KIND)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] router_addr,
  input  logic [NPORTS-1:0] rx,
  output logic [NPORTS-1:0] tx,
  output logic [NPORTS-1:0] overflow
);

  // link[s][d]: from the IPS of port s to the OPS of port d
  pa_link_t [NPORTS-1:0] link [NPORTS];

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    pa_link_t [NPORTS-2:0] from_ips;
    logic                  decide;
    route_t                decision;

    for (genvar j = 0; j < int'(NPORTS) - 1; j++) begin : g_in
      assign from_ips[j] = link[(j < p) ? j : j + 1][p];
    end

    cart_port #(
      .KIND(KIND), .ME(port_e'(p)), .NPORTS(NPORTS),
      .WORD_W(WORD_W), .DEPTH(DEPTH)
    ) u_port (
      .clk, .rst_n, .router_addr,
      .rx(rx[p]), .tx(tx[p]),
      .to_ops(link[p]), .from_ips,
      .decide, .decision,
      .overflow(overflow[p])
    );
  end

endmodule
