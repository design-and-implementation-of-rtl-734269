// rap: Router Address Pipeline of the DMM.
//
// Holds the 128-bit router address as two 64-bit halves (latitude, longitude)
// and presents it one bit per clock, MSB of the latitude first, in step with
// the destination address bits. Implemented, as suggested for an FPGA, as
// registers: while `shift` is low the halves are (re)loaded from router_addr,
// the copy of the address kept in non-volatile storage outside this design;
// while `shift` is high they shift left as one 128-bit chain and ra is the
// bit at the head of the latitude half.
//
// Timing: ra is registered; in the first shifting clock it is address bit 127
// (latitude MSB), in the clock after that bit 126, and so on.
module rap
  import cart_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] router_addr,
  input  logic              shift,
  output logic              ra
);

  logic [LAT_W-1:0] lat_q, lon_q;

  assign ra = lat_q[LAT_W-1];

  always_ff @(posedge clk) begin
    if (!rst_n || !shift) begin
      lat_q <= router_addr[ADDR_W-1:LAT_W];
      lon_q <= router_addr[LAT_W-1:0];
    end else begin
      lat_q <= {lat_q[LAT_W-2:0], lon_q[LAT_W-1]};
      lon_q <= {lon_q[LAT_W-2:0], 1'b0};
    end
  end

endmodule
