// ips: Incoming Packet Storage of a port.
//
// Records every packet the port's PDM passes (recording is enabled by the
// PDM's frame signal, the "packet arriving" line) into a ser_fifo queue. The
// DMM's decision lines go to a signal_holder; while any held line is high
// the queue is read out one bit per clock through a second PDM. That PDM's
// output goes to one AND gate per destination port: the packet appears only
// on the link of the chosen port, whose held line also serves as the
// activator of that port's OPS. The discard line reads the packet out to no
// link at all, and "keep" is simply the line of the local port.
//
// End of packet: when the output PDM sees the EOP marker, reading stops and
// the rest of the current queue word (zero padding) is dropped; when the
// marker has left the PDM the holder is reloaded, which ends the activator
// for one clock at least, so that every packet reaches an OPS as one
// activator pulse. The one-clock gap and the word drop are this design's
// choices.
//
// Timing: reading starts in the clock after the holder took a decision; the
// packet leaves MARK_LEN clocks after its first bit was read, at one bit per
// clock. Recording and reading run at the same rate, and the decision comes
// only after the full address has been recorded, so the queue cannot run dry
// within a packet (checked by an assertion).
//
// The output PDM's x output and the queue's empty flag are not needed by the
// read-out logic and are left unused.
module ips
  import cart_pkg::*;
#(
  parameter int unsigned NPORTS = 5,
  parameter int unsigned WORD_W = cart_pkg::CONV_W,
  parameter int unsigned DEPTH  = cart_pkg::FIFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // from the input PDM
  input  logic                     arriving,
  input  logic                     in_bit,
  // from the DMM
  input  logic [NPORTS-1:0]        send,
  input  logic                     discard,
  output logic                     ack,
  // packet and activator to the OPS of every port
  output pa_link_t [NPORTS-1:0]    to_ops,
  // status
  output logic                     busy,
  output logic                     overflow
);

  logic [NPORTS:0] held;     // [NPORTS] = discard
  logic            held_any, draining, done, load;
  logic            rd_en, rd_bit, rd_valid, rd_flush;
  logic            o_pkt, o_x, o_recv, o_frame, o_eop;

  ser_fifo #(.WORD_W(WORD_W), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .wr_en(arriving), .wr_bit(in_bit),
    .rd_en, .rd_flush, .rd_bit, .rd_valid,
    .empty(), .overflow
  );

  pdm u_opdm (
    .clk, .rst_n,
    .din(rd_valid && rd_bit),
    .pkt_out(o_pkt), .x(o_x), .receiving(o_recv), .frame(o_frame), .eop(o_eop)
  );

  assign held_any = |held;
  assign done     = draining && !o_frame;
  assign load     = !held_any || done;
  assign ack      = load && (discard || (|send));
  assign rd_en    = held_any && !draining;
  assign rd_flush = o_eop;
  assign busy     = held_any;

  signal_holder #(.NLINES(NPORTS + 1)) u_hold (
    .clk, .rst_n, .load, .d({discard, send}), .q(held)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)     draining <= 1'b0;
    else if (o_eop) draining <= 1'b1;
    else if (done)  draining <= 1'b0;
  end

  always_comb begin
    for (int k = 0; k < int'(NPORTS); k++) begin
      to_ops[k].act = held[k] && !done;
      to_ops[k].dat = held[k] && o_pkt;
    end
  end

  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_en && o_recv && !o_eop) |-> rd_valid)
    else $error("ips: queue ran dry inside a packet");

endmodule
