// tb_cart_port: one port of an arterial router (the east port). Packets sent
// into rx must come out, unchanged and with their activator, on the link of
// the port the routing rule chooses (a packet for the east itself is
// discarded); packets offered on the links from the other ports must leave
// on tx unchanged; then both paths run random traffic at the same time.
module tb_cart_port;
  import tb_cart_util::*;
  import cart_pkg::*;

  localparam int NP = 5;

  logic clk = 0, rst_n = 0, rx = 0, tx;
  logic [127:0] router_addr;
  pa_link_t [NP-1:0] to_ops;
  pa_link_t [NP-2:0] from_ips = '0;
  logic decide, overflow;
  route_t decision;
  int checks = 0, failures = 0;

  cart_port #(.KIND(ARTERIAL), .ME(P_EAST), .DEPTH(128)) dut (
    .clk, .rst_n, .router_addr, .rx, .tx, .to_ops, .from_ips, .decide, .decision, .overflow);

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

  bitq_t exp_link[NP][$];
  bitq_t exp_tx[NP-1][$];   // expected on tx, per source link
  bitq_t cap[NP];
  logic [NP-1:0] act_d = '0;
  int delivered = 0, sent_out = 0;

  // link monitors: frame = captured bits with zeros stripped at both ends
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NP; k++) begin
      if (to_ops[k].act && (to_ops[k].dat || cap[k].size() != 0)) cap[k].push_back(to_ops[k].dat);
      if (act_d[k] && !to_ops[k].act) begin
        bitq_t f;
        f = cap[k];
        while (f.size() != 0 && f[f.size()-1] == 1'b0) void'(f.pop_back());
        chk("packet expected on link", exp_link[k].size() != 0, 1);
        if (exp_link[k].size() != 0) begin
          checks++;
          if (f != exp_link[k][0]) begin failures++; $display("link %0d: packet differs", k); end
          void'(exp_link[k].pop_front());
          delivered++;
        end
        cap[k].delete();
      end
      act_d[k] = to_ops[k].act;
    end
  end

  // tx parser
  bitq_t cur;
  bit in_pkt = 0;
  always @(negedge clk) if (rst_n) begin
    if (!in_pkt && tx) begin in_pkt = 1; cur.delete(); end
    if (in_pkt) begin
      int n;
      cur.push_back(tx);
      n = cur.size();
      if (n >= 13 && cur[n-1] && cur[n-2] && cur[n-3] && cur[n-4] && cur[n-5] && cur[n-6]) begin
        int hit;
        hit = -1;
        for (int j = 0; j < NP - 1; j++)
          if (hit < 0 && exp_tx[j].size() != 0 && exp_tx[j][0] == cur) hit = j;
        chk("packet on tx is the next one of some link", hit >= 0, 1);
        if (hit >= 0) begin
          void'(exp_tx[hit].pop_front());
          sent_out++;
        end
        in_pkt = 0;
      end
    end
  end

  // one packet on the link from another port's IPS: activator high around
  // the frame, with a few idle bits before and one after
  task automatic drive_link(int j, bitq_t q);
    from_ips[j].act = 1;
    repeat (7) @(negedge clk);
    foreach (q[i]) begin from_ips[j].dat = q[i]; @(negedge clk); end
    from_ips[j].dat = 0; @(negedge clk);
    from_ips[j].act = 0; @(negedge clk);
  endtask

  // n random packets on link j, spaced so the OPS queues never fill
  task automatic rand_link(int j, int n);
    for (int m = 0; m < n; m++) begin
      bitq_t q;
      repeat ($urandom_range(300, 900)) @(negedge clk);
      q = build_packet(rand_addr(), $urandom_range(1, 150));
      exp_tx[j].push_back(q);
      drive_link(j, q);
    end
  endtask

  // n random packets on rx with random destinations and short gaps
  task automatic rand_rx(addr_t ra, int n, ref int nexp);
    for (int m = 0; m < n; m++) begin
      addr_t dst;
      bitq_t q;
      int out;
      dst = make_dest(ra, int'($urandom_range(0, 2)) - 1, int'($urandom_range(0, 2)) - 1);
      q = build_packet(dst, $urandom_range(1, 200));
      out = ref_route(1, EAST, dst, ra);
      if (out != DISCARD) begin exp_link[out].push_back(q); nexp++; end
      foreach (q[i]) begin rx = q[i]; @(negedge clk); end
      rx = 0;
      repeat ($urandom_range(1, 6)) @(negedge clk);
    end
  endtask

  initial begin
    addr_t ra, dst;
    bitq_t q;
    int out, nexp;
    ra = make_dest(rand_addr(), 1, 1);
    router_addr = ra;
    repeat (3) @(negedge clk);
    rst_n = 1;
    nexp = 0;
    for (int c = 0; c < 9; c++) begin
      dst = make_dest(ra, c / 3 - 1, c % 3 - 1);
      q = build_packet(dst, 25 + c);
      out = ref_route(1, EAST, dst, ra);
      if (out != DISCARD) begin exp_link[out].push_back(q); nexp++; end
      foreach (q[i]) begin rx = q[i]; @(negedge clk); end
      rx = 0;
      repeat (3) @(negedge clk);
    end
    // transmit path: one packet from the link of each other port
    for (int j = 0; j < NP - 1; j++) begin
      q = build_packet(rand_addr(), 30 + j);
      exp_tx[j].push_back(q);
      drive_link(j, q);
    end
    repeat (1500) @(negedge clk);
    chk("packets delivered to links", delivered, nexp);
    chk("packets sent on tx", sent_out, NP - 1);
    // both paths busy at once: random packets on rx, and on every link
    delivered = 0; sent_out = 0; nexp = 0;
    fork
      rand_rx(ra, 30, nexp);
      rand_link(0, 6);
      rand_link(1, 6);
      rand_link(2, 6);
      rand_link(3, 6);
    join
    repeat (2000) @(negedge clk);
    chk("random packets delivered to links", delivered, nexp);
    chk("random packets sent on tx", sent_out, 4 * 6);
    for (int k = 0; k < NP; k++) chk("no packet left expected on a link", exp_link[k].size(), 0);
    chk("no overflow", overflow, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
