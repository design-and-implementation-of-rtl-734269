// acm: Address Counter Module of the DMM.
//
// An 8-bit counter counts the address bits while RECEIVING-ADDRESS is high
// (cleared while it is low). With the 128-bit address, count bit 6 tells the
// half: 0 during the 64 latitude bits (RECEIVING-LATITUDE), 1 during the 64
// longitude bits (RECEIVING-LONGITUDE). The 7-input AND of the low count bits
// (count == 127) marks the last address bit: ADDRESS-RECEIVED. The counter
// stops at 128 so the flags go low after the address; that stop, and the use
// of bit 7 to blank the flags after the address, are this design's choice.
//
// Outputs are combinational from the count and receiving_address, so during
// address bit i the count equals i (bit_index).
module acm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       receiving_address,
  output logic       receiving_latitude,
  output logic       receiving_longitude,
  output logic       address_received,
  output logic [6:0] bit_index
);

  logic [7:0] count;

  assign bit_index           = count[6:0];
  assign receiving_latitude  = receiving_address && !count[7] && !count[6];
  assign receiving_longitude = receiving_address && !count[7] &&  count[6];
  assign address_received    = receiving_address && (count[6:0] == 7'h7F);

  always_ff @(posedge clk) begin
    if (!rst_n || !receiving_address) count <= '0;
    else if (!count[7])               count <= count + 1'b1;
  end

endmodule
