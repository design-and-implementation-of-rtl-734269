// signal_holder: keeps the DMM's decision lit while the IPS sends a packet.
//
// One D flip-flop per decision line (send to each port, keep, discard). The
// flip-flops take the lines only in clocks where the IPS raises `load` (its
// "reset" signal: no packet is being sent); once a line is held the IPS drops
// `load` until the packet has left, so the decision stays fixed for the
// whole packet. The original design gates the clock with the reset signal; here
// `load` is a clock enable, the synchronous equivalent.
module signal_holder #(
  parameter int unsigned NLINES = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [NLINES-1:0] d,
  output logic [NLINES-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
