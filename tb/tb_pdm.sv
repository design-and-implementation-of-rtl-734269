// tb_pdm: self-checking test of the Packet Detection Module.
// Sends framed packets separated by idle gaps (including none) and checks,
// clock by clock, the MARK_LEN-clock delay of pkt_out, the frame window
// (first SOP one to last EOP one at pkt_out), the RECEIVING flag and the EOP
// pulse against positions worked out from the stream the testbench built.
module tb_pdm;
  import tb_cart_util::*;

  logic clk = 0, rst_n = 0, din = 0;
  logic pkt_out, x, receiving, frame, eop;
  int checks = 0, failures = 0;

  pdm dut (.clk, .rst_n, .din, .pkt_out, .x, .receiving, .frame, .eop);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit stream[$];
  int idx[$];     // position within its frame, -1 on idle
  int flen[$];    // length of the frame the bit belongs to

  task automatic check(string what, logic got, logic exp, int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s = %0b, expected %0b", cyc, what, got, exp);
    end
  endtask

  initial begin
    int gaps[6] = '{3, 0, 1, 7, 2, 10};
    int npkts = 0;
    repeat (8) begin stream.push_back(0); idx.push_back(-1); flen.push_back(0); end
    foreach (gaps[g]) begin
      bitq_t p;
      p = build_packet(rand_addr(), 20 + 13 * g);
      foreach (p[i]) begin stream.push_back(p[i]); idx.push_back(i); flen.push_back(p.size()); end
      repeat (gaps[g]) begin stream.push_back(0); idx.push_back(-1); flen.push_back(0); end
      npkts++;
    end
    repeat (12) begin stream.push_back(0); idx.push_back(-1); flen.push_back(0); end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < stream.size(); n++) begin
      @(negedge clk);
      if (n >= 6) begin
        int k;
        k = n - 6;
        check("pkt_out",   pkt_out,   stream[k], n);
        check("frame",     frame,     idx[k] >= 0, n);
        check("receiving", receiving, idx[k] >= 2, n);
        check("eop",       eop,       idx[k] >= 0 && idx[k] == flen[k] - 6, n);
      end
      din = stream[n];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
