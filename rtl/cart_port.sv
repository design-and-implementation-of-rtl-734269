// cart_port: the generic router port.
//
// Receive path: the serial line enters the PDM, whose delayed output and
// frame ("incoming packet warning") drive both the DMM, which decides where
// the packet goes, and the IPS, which records the packet and, once the DMM
// has decided, sends it with an activator to the OPS of the chosen port.
// Transmit path: the port's OPS collects the packets the other ports' IPSs
// send to it and puts them out on the line one at a time. The two paths run
// independently; there is no central control in the router.
//
// Interface: rx/tx are the port's serial lines. to_ops[k] is the packet and
// activator link to port k (the entry for this port itself is never used,
// since such a packet is discarded). from_ips[j] comes from the j-th other
// port in increasing port order. decide/decision show each routing decision.
//
// The PDM's x and eop outputs and the OPS's sel/skip/sent monitors are not
// needed here and are left unconnected; lint reports them as unused.
module cart_port
  import cart_pkg::*;
#(
  parameter router_kind_e KIND   = ARTERIAL,
  parameter port_e        ME     = P_LOCAL,
  parameter int unsigned  NPORTS = num_ports(KIND),
  parameter int unsigned  WORD_W = cart_pkg::CONV_W,
  parameter int unsigned  DEPTH  = cart_pkg::FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADDR_W-1:0]        router_addr,
  input  logic                     rx,
  output logic                     tx,
  output pa_link_t [NPORTS-1:0]    to_ops,
  input  pa_link_t [NPORTS-2:0]    from_ips,
  output logic                     decide,
  output route_t                   decision,
  output logic                     overflow
);

  logic pkt, x, receiving, frame, eop;
  logic [NPORTS-1:0] send;
  logic discard, ack, ips_ovf, ops_ovf;

  pdm u_pdm (.clk, .rst_n, .din(rx), .pkt_out(pkt), .x, .receiving, .frame, .eop);

  dmm #(.KIND(KIND), .ME(ME), .NPORTS(NPORTS)) u_dmm (
    .clk, .rst_n, .router_addr, .pkt, .receiving, .ack,
    .send, .discard, .decide, .decision
  );

  ips #(.NPORTS(NPORTS), .WORD_W(WORD_W), .DEPTH(DEPTH)) u_ips (
    .clk, .rst_n,
    .arriving(frame), .in_bit(pkt),
    .send, .discard, .ack,
    .to_ops, .busy(), .overflow(ips_ovf)
  );

  ops #(.NIN(NPORTS - 1), .WORD_W(WORD_W), .DEPTH(DEPTH)) u_ops (
    .clk, .rst_n, .from_ips, .tx,
    .sel(), .skip(), .sent(), .overflow(ops_ovf)
  );

  assign overflow = ips_ovf || ops_ovf;

endmodule
