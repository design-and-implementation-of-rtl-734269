// ops: Outgoing Packet Storage of a port.
//
// One ser_fifo queue per other port of the router (NIN = ports - 1), so that
// several IPSs can send to this port at the same time without waiting. A
// queue records while the activator of its link is high. A counter drives
// the MUX that lets one queue transmit at a time; the transmitted bits pass
// through a PDM to the output line. The counter advances (the OR gate of the
// drawing) when the packet being sent has ended, as seen by the PDM, or when
// the queue it points at is empty, so the queues are served in turn and none
// starves.
//
// This design's choices: "empty" means "holds no complete packet". Each queue
// counts the packets it holds (one more at the end of each activator pulse,
// one fewer when a packet has been sent), so a packet is sent only when it
// has been stored whole and a transmission can never run dry half way.
// When the PDM sees the EOP marker the rest of the queue word (zero padding)
// is dropped, and the MUX moves on once the marker has left the PDM.
//
// Timing: the first bit of a stored packet is read in the clock after the
// MUX reaches its queue; tx is that bit stream delayed by MARK_LEN clocks.
// With no packet waiting the counter steps through the queues one per clock.
//
// Of the output PDM only frame and pkt_out are used; the queues' own empty
// flags are replaced by the packet counts, so those pins are left open.
module ops
  import cart_pkg::*;
#(
  parameter int unsigned NIN    = 4,
  parameter int unsigned WORD_W = cart_pkg::CONV_W,
  parameter int unsigned DEPTH  = cart_pkg::FIFO_DEPTH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  pa_link_t [NIN-1:0]    from_ips,
  output logic                  tx,
  // monitoring
  output logic [$clog2(NIN)-1:0] sel,
  output logic                  skip,      // counter advanced past an empty queue
  output logic                  sent,      // counter advanced after a packet
  output logic                  overflow
);

  localparam int unsigned SW = $clog2(NIN);
  localparam int unsigned PW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {O_IDLE, O_SEND, O_DRAIN} ops_state_e;

  ops_state_e         st;
  logic [NIN-1:0]     act_d, stored, rd_en, rd_flush, rd_bit, rd_valid, ovf;
  logic [PW-1:0]      pkts [NIN];
  logic               o_pkt, o_x, o_recv, o_frame, o_eop;
  logic               line;

  for (genvar i = 0; i < int'(NIN); i++) begin : g_q
    ser_fifo #(.WORD_W(WORD_W), .DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .wr_en(from_ips[i].act), .wr_bit(from_ips[i].dat),
      .rd_en(rd_en[i]), .rd_flush(rd_flush[i]),
      .rd_bit(rd_bit[i]), .rd_valid(rd_valid[i]),
      .empty(), .overflow(ovf[i])
    );
    assign stored[i]   = act_d[i] && !from_ips[i].act;
    assign rd_en[i]    = (st == O_SEND) && (sel == SW'(i));
    assign rd_flush[i] = rd_en[i] && o_eop;
  end

  assign overflow = |ovf;
  assign line     = |(rd_valid & rd_bit);

  pdm u_opdm (
    .clk, .rst_n, .din(line),
    .pkt_out(o_pkt), .x(o_x), .receiving(o_recv), .frame(o_frame), .eop(o_eop)
  );

  assign tx   = o_pkt;
  assign skip = (st == O_IDLE) && (pkts[sel] == '0);
  assign sent = (st == O_DRAIN) && !o_frame;

  function automatic logic [SW-1:0] next_sel(logic [SW-1:0] s);
    return (s == SW'(NIN - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= O_IDLE;
      sel   <= '0;
      act_d <= '0;
      for (int i = 0; i < int'(NIN); i++) pkts[i] <= '0;
    end else begin
      for (int i = 0; i < int'(NIN); i++) begin
        act_d[i] <= from_ips[i].act;
        pkts[i]  <= pkts[i] + PW'(stored[i]) - PW'(sent && sel == SW'(i));
      end
      unique case (st)
        O_IDLE:  if (skip) sel <= next_sel(sel);
                 else      st  <= O_SEND;
        O_SEND:  if (o_eop) st <= O_DRAIN;
        O_DRAIN: if (sent) begin
          st  <= O_IDLE;
          sel <= next_sel(sel);
        end
        default: st <= O_IDLE;
      endcase
    end
  end

endmodule
