// adm: Address Differentiation Module of the DMM.
//
// Bit-serial magnitude comparator of the destination address bit DA[i]
// against the router address bit RA[i], most significant bit first. The first
// bit position where the two differ decides: DA > RA if that DA bit is 1, DA <
// RA if it is 0. `first` marks the first bit of a field (latitude or
// longitude) and starts a new comparison. Outputs include the bit presented
// in the current clock, so after the last bit of a field they hold the
// result for the whole field; both low means equal so far. The original design gives
// only the outputs; this comparator is the simplest circuit that yields them.
module adm (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic first,
  input  logic da,
  input  logic ra,
  output logic da_gt_ra,
  output logic da_lt_ra
);

  logic gt_q, lt_q;
  logic gt_prev, lt_prev;

  assign gt_prev  = first ? 1'b0 : gt_q;
  assign lt_prev  = first ? 1'b0 : lt_q;
  assign da_gt_ra = gt_prev || (!lt_prev &&  da && !ra);
  assign da_lt_ra = lt_prev || (!gt_prev && !da &&  ra);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gt_q <= 1'b0;
      lt_q <= 1'b0;
    end else if (en) begin
      gt_q <= da_gt_ra;
      lt_q <= da_lt_ra;
    end
  end

endmodule
