// dmm: Decision Making Module of a port.
//
// Strips the destination address from the incoming packet and compares it,
// bit-serially, with the router address:
//   pcm  raises RECEIVING-ADDRESS at the first address bit;
//   DA[i] = packet AND RECEIVING-ADDRESS feeds the adm comparator;
//   acm  counts the address bits and gives RECEIVING-LATITUDE/-LONGITUDE and
//        ADDRESS-RECEIVED;
//   rap  supplies the router address bit RA[i] in step.
// The latitude result is kept when the last latitude bit has been compared.
// At ADDRESS-RECEIVED the routing rule (cart_pkg::route) turns the latitude
// and longitude results into one decision line: send to port k (the local
// port is "keep") or discard.
//
// Handshake with the IPS (this design's choice): the decision lines are
// registered and stay lit until the IPS signal holder takes them (ack). A
// packet that ends before its address is complete is given the discard line,
// so that the IPS queue never holds a packet without a decision.
//
// Timing: the decision appears in the clock after the last address bit was
// at `pkt`, i.e. PCM_N + 128 clocks after RECEIVING rose.
module dmm
  import cart_pkg::*;
#(
  parameter router_kind_e KIND   = ARTERIAL,
  parameter port_e        ME     = P_LOCAL,
  parameter int unsigned  NPORTS = num_ports(KIND)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] router_addr,
  input  logic              pkt,
  input  logic              receiving,
  input  logic              ack,
  output logic [NPORTS-1:0] send,
  output logic              discard,
  // observation of the decision, for monitoring
  output logic              decide,
  output route_t            decision
);

  logic recv_addr, rx_lat, rx_lon, addr_rcvd;
  logic [6:0] bit_index;
  logic da, ra, gt, lt;

  pcm u_pcm (.clk, .rst_n, .receiving, .receiving_address(recv_addr));

  acm u_acm (
    .clk, .rst_n,
    .receiving_address(recv_addr),
    .receiving_latitude(rx_lat),
    .receiving_longitude(rx_lon),
    .address_received(addr_rcvd),
    .bit_index
  );

  rap u_rap (.clk, .rst_n, .router_addr, .shift(recv_addr), .ra);

  assign da = pkt && recv_addr;

  adm u_adm (
    .clk, .rst_n,
    .en(rx_lat || rx_lon),
    .first(bit_index[5:0] == 6'd0),
    .da, .ra,
    .da_gt_ra(gt), .da_lt_ra(lt)
  );

  logic lat_gt_q, lat_lt_q;
  logic decided, recv_d;
  logic early_end;

  logic   pending;
  route_t held;

  assign early_end = recv_d && !receiving && !decided;
  assign decide    = addr_rcvd || early_end;

  always_comb begin
    decision = route(KIND, ME, lat_gt_q, lat_lt_q, gt, lt);
    if (!addr_rcvd) begin
      decision.discard = 1'b1;
      decision.port    = P_LOCAL;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lat_gt_q <= 1'b0;
      lat_lt_q <= 1'b0;
      decided  <= 1'b0;
      recv_d   <= 1'b0;
      pending  <= 1'b0;
      held     <= '0;
    end else begin
      recv_d <= receiving;
      if (rx_lat && bit_index == 7'd63) begin
        lat_gt_q <= gt;
        lat_lt_q <= lt;
      end
      if (!receiving)     decided <= 1'b0;
      else if (addr_rcvd) decided <= 1'b1;
      if (decide) begin
        pending <= 1'b1;
        held    <= decision;
      end else if (ack) begin
        pending <= 1'b0;
      end
    end
  end

  always_comb begin
    send    = '0;
    discard = pending && held.discard;
    if (pending && !held.discard) send[held.port] = 1'b1;
  end

  // A new decision may only come once the previous one has been taken.
  a_no_lost_decision: assert property (@(posedge clk) disable iff (!rst_n)
    decide |-> (!pending || ack))
    else $error("dmm: decision overwritten before the IPS took it");

endmodule
