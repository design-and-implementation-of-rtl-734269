// clk_div: the clock divider, used as the word counter of the FIFO data
// converters.
//
// An N_BITS binary counter advances on every enabled clock; the divided
// "CLK/N" output is the decode of the counter with the enable, one clock in
// 2**N_BITS enabled clocks. The original design builds this from a counter, a NOR of
// its outputs and an AND with the clock; here the NOR becomes a decode of the
// last count (so the pulse marks the clock whose edge returns the counter to
// zero) and the AND with the clock becomes an AND with the enable, giving a
// one-clock enable strobe instead of a gated clock. A synchronous clear lets
// the user align the count to the start of a packet.
//
// Interface: en counts, clr returns the count to zero (clr wins), tick is
// combinational (en && count == 2**N_BITS-1), count is the current value.
module clk_div #(
  parameter int unsigned N_BITS = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr,
  output logic              tick,
  output logic [N_BITS-1:0] count
);

  assign tick = en && (count == '1);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else if (en)       count <= count + 1'b1;
  end

endmodule
