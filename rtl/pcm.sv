// pcm: Packet Counter Module of the DMM.
//
// Counts the packet bits while the port is RECEIVING and compares the count
// with the constant N (a per-bit equality test and an AND, as drawn). When
// the count reaches N the next bit at the packet input is the first address
// bit and RECEIVING-ADDRESS is raised. The counter then stops, so the flag
// stays high for the rest of the packet (the drawing leaves this open; this
// design holds the count). The counter is cleared while RECEIVING is low.
//
// N defaults to cart_pkg::PCM_N, which places the address right after the
// 0 that follows the SOP marker (the frame of cart_pkg).
module pcm #(
  parameter int unsigned N = cart_pkg::PCM_N
) (
  input  logic clk,
  input  logic rst_n,
  input  logic receiving,
  output logic receiving_address
);

  localparam int unsigned CW = (N < 2) ? 1 : $clog2(N + 1);

  logic [CW-1:0] count;

  assign receiving_address = receiving && (count == CW'(N));

  always_ff @(posedge clk) begin
    if (!rst_n || !receiving)  count <= '0;
    else if (count != CW'(N))  count <= count + 1'b1;
  end

endmodule
