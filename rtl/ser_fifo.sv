// ser_fifo: a serial-in, serial-out packet queue built as drawn for the IPS
// and OPS: input FIFO data converter (serial to parallel), word FIFO, output
// FIFO data converter (parallel to serial).
//
// Write side: while wr_en is high one bit per clock is shifted into the input
// converter; a clk_div word counter, cleared whenever wr_en is low so that
// every recording starts on a word boundary, strobes the completed WORD_W-bit
// word into the FIFO. When wr_en falls with a partly filled word, the word is
// completed with zeros (idle line) and stored; this flush is this design's
// addition, without it the end of every packet would stay in the converter.
//
// Read side: while rd_en is high one bit per clock leaves the output
// converter, MSB of each word first. A second clk_div counts the bits of the
// current word; at count zero the next word is taken from the FIFO. rd_valid
// is low when no bit is available. rd_flush drops what is left of the
// current word, so that the next read starts with the next stored word.
//
// Timing: rd_bit/rd_valid are combinational from the current state and
// rd_en; a bit written at clock t can be read no earlier than the clock after
// its word has been stored.
//
// The read-side word counter's strobe, the FIFO's full flag and occupancy are
// not needed (overflow is reported instead) and are left unused.
module ser_fifo #(
  parameter int unsigned WORD_W = cart_pkg::CONV_W,
  parameter int unsigned DEPTH  = cart_pkg::FIFO_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  // serial input (recording)
  input  logic wr_en,
  input  logic wr_bit,
  // serial output (transmission)
  input  logic rd_en,
  input  logic rd_flush,
  output logic rd_bit,
  output logic rd_valid,
  // status
  output logic empty,
  output logic overflow
);

  localparam int unsigned CW = $clog2(WORD_W);

  // ---------------- input converter ----------------
  logic [WORD_W-1:0] sipo;
  logic [CW-1:0]     wcount;
  logic              wtick;
  logic              wr_en_d;
  logic              push, flush_w;
  logic [WORD_W-1:0] wdata;

  clk_div #(.N_BITS(CW)) u_wdiv (
    .clk, .rst_n, .en(wr_en), .clr(!wr_en), .tick(wtick), .count(wcount)
  );

  assign flush_w = wr_en_d && !wr_en && (wcount != '0);
  assign push    = wtick || flush_w;
  assign wdata   = wtick ? {sipo[WORD_W-2:0], wr_bit}
                         : (sipo << (WORD_W - 32'(wcount)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sipo    <= '0;
      wr_en_d <= 1'b0;
    end else begin
      wr_en_d <= wr_en;
      if (wr_en) sipo <= {sipo[WORD_W-2:0], wr_bit};
    end
  end

  // ---------------- FIFO ----------------
  logic [WORD_W-1:0] rdata;
  logic              fifo_empty, fifo_full, pop;

  word_fifo #(.W(WORD_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push, .wdata,
    .pop, .rdata,
    .empty(fifo_empty), .full(fifo_full), .overflow,
    .used()
  );

  // ---------------- output converter ----------------
  logic [WORD_W-1:0] piso;
  logic [CW-1:0]     rcount;
  logic              rtick;
  logic              need_word;

  clk_div #(.N_BITS(CW)) u_rdiv (
    .clk, .rst_n, .en(rd_valid), .clr(rd_flush), .tick(rtick), .count(rcount)
  );

  assign need_word = (rcount == '0);
  assign rd_valid  = rd_en && !rd_flush && (!need_word || !fifo_empty);
  assign pop       = rd_valid && need_word;
  assign rd_bit    = rd_valid && (need_word ? rdata[WORD_W-1] : piso[WORD_W-1]);
  assign empty     = fifo_empty && need_word;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      piso <= '0;
    end else if (rd_valid) begin
      piso <= need_word ? (rdata << 1) : (piso << 1);
    end
  end

endmodule
