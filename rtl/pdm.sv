// pdm: Packet Detection Module.
//
// The serial line is shifted into a MARK_LEN-bit shift register every clock.
// X is the AND of all register bits: it is high while the register holds the
// six-ones start/end marker. A four-state machine, the synchronous form of the
// X/Q state diagram, tracks the packet:
//
//   WAIT (Q=0) --X--> SOP (Q=0) --!X--> DATA (Q=1) --X--> EOP (Q=1) --> WAIT
//
// Q is the RECEIVING flag (the port's latch). The register's last stage is
// the "packet passed" output, the line delayed by MARK_LEN clocks, so a
// receiver behind the PDM sees the SOP marker from its first bit. Because the
// EOP is recognised when its last bit enters the register, the EOP state is
// held for MARK_LEN-1 further clocks, until that last bit has left the
// register; only then does Q fall. This tail count is this design's choice:
// it lets `frame` cover exactly the bits from the first SOP one to the last
// EOP one at `pkt_out`.
//
// Interface (all synchronous to clk, rst_n active low, synchronous):
//   din        serial line in
//   pkt_out    din delayed by MARK_LEN clocks
//   x          marker present in the register
//   receiving  Q: high from the first bit after the SOP marker until the end
//              of the EOP marker at pkt_out
//   frame      pkt_out carries a bit of a packet (SOP through EOP)
//   eop        one-clock pulse: the last bit of the EOP marker has entered
module pdm
  import cart_pkg::*;
#(
  parameter int unsigned LEN = MARK_LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic pkt_out,
  output logic x,
  output logic receiving,
  output logic frame,
  output logic eop
);

  typedef enum logic [1:0] {S_WAIT, S_SOP, S_DATA, S_EOP} pdm_state_e;

  localparam int unsigned TW = $clog2(LEN);

  logic [LEN-1:0] sr;
  pdm_state_e     st;
  logic [TW-1:0]  tail;

  assign x         = &sr;
  assign pkt_out   = sr[LEN-1];
  assign receiving = (st == S_DATA) || (st == S_EOP);
  assign frame     = (st != S_WAIT) || x;
  assign eop       = (st == S_DATA) && x;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr   <= '0;
      st   <= S_WAIT;
      tail <= '0;
    end else begin
      sr <= {sr[LEN-2:0], din};
      unique case (st)
        S_WAIT: if (x)  st <= S_SOP;
        S_SOP:  if (!x) st <= S_DATA;
        S_DATA: if (x) begin
          st   <= S_EOP;
          tail <= '0;
        end
        S_EOP: begin
          tail <= tail + 1'b1;
          if (tail == TW'(LEN - 2)) st <= S_WAIT;
        end
      endcase
    end
  end

endmodule
