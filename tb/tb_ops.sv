// tb_ops: Outgoing Packet Storage test. The testbench plays four IPSs, each
// sending packets with an activator pulse (leading zeros, frame, a trailing
// zero). Checked: every packet leaves on tx whole and unchanged; packets of
// one link leave in order; when several links hold packets they are served
// in turn (no link sends twice while another waits); the MUX counter skips
// empty queues; back-to-back packets on tx are separated by idle bits and
// while packets wait the line is busy (no more than a few idle clocks between
// packets); random traffic on all links at once; a packet longer than a
// queue raises overflow.
module tb_ops;
  import tb_cart_util::*;
  import cart_pkg::*;

  localparam int NIN = 4;

  logic clk = 0, rst_n = 0;
  pa_link_t [NIN-1:0] from_ips = '0;
  logic tx, skip, sent, overflow;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  ops #(.NIN(NIN), .DEPTH(128)) dut (.clk, .rst_n, .from_ips, .tx, .sel, .skip, .sent, .overflow);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  bitq_t exp_q[NIN][$];
  int    order[$];       // link of each packet seen on tx
  int    skips = 0;
  int    max_idle_busy = 0;

  task automatic drive(int k, bitq_t f);
    from_ips[k].act = 1;
    repeat (7) begin from_ips[k].dat = 0; @(negedge clk); end
    foreach (f[i]) begin from_ips[k].dat = f[i]; @(negedge clk); end
    from_ips[k].dat = 0; @(negedge clk);
    from_ips[k].act = 0;
    @(negedge clk);
  endtask

  // n packets of random length on link k, with random gaps; the offered
  // load of four such links exceeds the line rate for a while, so queues
  // build up, but stays below what a 128-word queue holds
  task automatic rand_link(int k, int n);
    for (int j = 0; j < n; j++) begin
      bitq_t g;
      repeat ($urandom_range(200, 700)) @(negedge clk);
      g = build_packet(rand_addr(), $urandom_range(1, 120));
      exp_q[k].push_back(g);
      drive(k, g);
    end
  endtask

  // tx parser
  bitq_t cur;
  bit    in_pkt = 0;
  bit    parse_on = 1;
  int    dbg_n = 0;
  int    idle_run = 0;
  always @(negedge clk) if (rst_n && parse_on) begin
    if (skip) skips++;
    if (!in_pkt && tx) begin in_pkt = 1; cur.delete(); end
    if (in_pkt) begin
      int n;
      cur.push_back(tx);
      n = cur.size();
      if (n >= 13 && cur[n-1] && cur[n-2] && cur[n-3] && cur[n-4] && cur[n-5] && cur[n-6]) begin
        int hit;
        hit = -1;
        for (int k = 0; k < NIN; k++)
          if (hit < 0 && exp_q[k].size() != 0 && exp_q[k][0] == cur) hit = k;
        chk("packet on tx matches a queued packet", hit >= 0, 1);
        if (hit < 0 && dbg_n++ < 2) begin
          string str;
          str = ""; foreach (cur[i]) str = {str, cur[i] ? "1" : "0"};
          $display("DBG %0t got len %0d: %s", $time, cur.size(), str);
          for (int k = 0; k < NIN; k++) if (exp_q[k].size() != 0) begin
            str = ""; foreach (exp_q[k][0][i]) str = {str, exp_q[k][0][i] ? "1" : "0"};
            $display("DBG q%0d n%0d len %0d: %s", k, exp_q[k].size(), exp_q[k][0].size(), str);
          end
        end
        if (hit >= 0) begin void'(exp_q[hit].pop_front()); order.push_back(hit); end
        in_pkt = 0;
        idle_run = 0;
      end
    end else if (dut.pkts[0] + dut.pkts[1] + dut.pkts[2] + dut.pkts[3] != 0) begin
      idle_run++;
      if (idle_run > max_idle_busy) max_idle_busy = idle_run;
    end
  end

  initial begin
    bitq_t f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // one packet on one link
    f = build_packet(rand_addr(), 30);
    exp_q[2].push_back(f);
    drive(2, f);
    repeat (400) @(negedge clk);
    chk("single packet delivered", order.size(), 1);
    // contention: links 0, 1 and 3 each store three packets at the same time
    order.delete();
    fork
      begin for (int j = 0; j < 3; j++) begin bitq_t g; g = build_packet(rand_addr(), 50 + j); exp_q[0].push_back(g); drive(0, g); end end
      begin for (int j = 0; j < 3; j++) begin bitq_t g; g = build_packet(rand_addr(), 20 + 9 * j); exp_q[1].push_back(g); drive(1, g); end end
      begin for (int j = 0; j < 3; j++) begin bitq_t g; g = build_packet(rand_addr(), 70 - 5 * j); exp_q[3].push_back(g); drive(3, g); end end
    join
    repeat (3000) @(negedge clk);
    chk("all contending packets delivered", order.size(), 9);
    // round robin: while links still hold packets, no link repeats before the others had a turn
    for (int i = 0; i + 2 < order.size() && i < 6; i++) begin
      chk("served in turn", (order[i] != order[i+1]) && (order[i] != order[i+2]) && (order[i+1] != order[i+2]), 1);
    end
    for (int k = 0; k < NIN; k++) chk("queue drained", exp_q[k].size(), 0);
    chk("empty queues skipped", skips > 0, 1);
    $display("longest idle stretch on tx while packets waited: %0d clocks", max_idle_busy);
    chk("line kept busy while packets wait", max_idle_busy <= 40, 1);
    chk("no overflow", overflow, 0);
    // random traffic: all four links send packets of random length with
    // random gaps at the same time; every packet must leave whole, each
    // link's packets in their order
    order.delete();
    fork
      rand_link(0, 10);
      rand_link(1, 10);
      rand_link(2, 10);
      rand_link(3, 10);
    join_none
    repeat (20000) @(negedge clk);
    chk("all random packets delivered", order.size(), 4 * 10);
    for (int k = 0; k < NIN; k++) chk("queue drained after random traffic", exp_q[k].size(), 0);
    chk("no overflow under random traffic", overflow, 0);
    // overflow: one packet longer than a whole queue (DEPTH words) must make
    // the queue drop words and raise overflow
    parse_on = 0;
    begin
      bit seen_ovf;
      seen_ovf = 0;
      f = build_packet(rand_addr(), 128 * 8 + 100);
      fork
        drive(1, f);
        repeat (f.size() + 20) begin @(negedge clk); if (overflow) seen_ovf = 1; end
      join
      chk("overflow raised by a packet longer than the queue", seen_ovf, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
