// word_fifo: parallel first-in first-out word store, the FIFO chip at the
// core of every IPS and OPS queue (the parts considered are 256x9 to 1024x9
// devices; the default here is 512 words of WORD_W bits).
//
// A circular buffer in a memory array with read and write pointers and an
// occupancy count. The head word is always visible on rdata (show-ahead), so
// the reader takes it and asserts pop in the same clock. push while full is
// ignored and reported on overflow; pop while empty is ignored.
//
// Interface: push/wdata write at the clock edge, pop removes the head word,
// empty and full are the status indicators, used is the occupancy.
module word_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               wdata,
  input  logic                       pop,
  output logic [W-1:0]               rdata,
  output logic                       empty,
  output logic                       full,
  output logic                       overflow,
  output logic [$clog2(DEPTH+1)-1:0] used
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  logic do_push, do_pop;

  assign empty    = (used == '0);
  assign full     = (used == ($clog2(DEPTH+1))'(DEPTH));
  assign do_push  = push && !full;
  assign do_pop   = pop && !empty;
  assign overflow = push && full;
  assign rdata    = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      used <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      unique case ({do_push, do_pop})
        2'b10:   used <= used + 1'b1;
        2'b01:   used <= used - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
