// tb_router_checker: traffic generator and scoreboard for a whole Cartesian
// router, shared by the arterial and collector testbenches.
//
// Phases: (1) every port sends one packet for each of the nine destination
// relations (latitude and longitude smaller, equal or larger than the
// router's), one at a time, and the transit latency is measured; (2) all
// other ports send to one port at the same moment, several times (contention
// at an OPS); (3) each port receives a packet cut short inside its address;
// (4) all ports send random traffic at once. Every packet must leave, whole
// and unchanged, on the port given by an independent reference of the
// routing rule, or nowhere if it is to be discarded. Each mechanism is
// counted and must have happened at least once.
module tb_router_checker
  import tb_cart_util::*;
#(
  parameter bit ARTERIAL = 1,
  parameter int NP       = 5,
  parameter int NRAND    = 8      // random packets per port in phase 4
) (
  input  logic              clk,
  output logic              rst_n,
  output logic [127:0]      router_addr,
  output logic [NP-1:0]     rx,
  input  logic [NP-1:0]     tx,
  input  logic [NP-1:0]     overflow,
  input  logic [NP-1:0]     contention,   // an OPS holds packets from two or more ports
  input  logic [NP-1:0]     skip,         // an OPS counter moved past an empty queue
  output bit                finished,
  output int                checks,
  output int                failures
);

  addr_t ra;
  bitq_t exp_q[NP][$];
  int    exp_src[NP][$];
  int    sent_time[NP][$];
  int    cyc = 0;
  int    delivered = 0, expected_total = 0;
  int    n_out[NP];
  int    n_discard_same = 0, n_discard_short = 0, n_pass_through = 0;
  int    n_contention = 0, n_skip = 0, n_simultaneous = 0;
  int    lat_min = 1 << 30, lat_max = 0;
  bit    measure = 0;
  int    active = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // Sends one packet on port s (blocking for its duration) and books its fate.
  task automatic send(int s, addr_t dst, int npay, bit is_short = 0);
    bitq_t q;
    int out;
    q = build_packet(dst, npay);
    if (is_short) begin
      q = q[0:40];
      while (q[q.size()-1]) void'(q.pop_back());
      repeat (6) q.push_back(1'b1);
      out = DISCARD;
      n_discard_short++;
    end else begin
      out = ref_route(ARTERIAL, s, dst, ra);
      if (out == DISCARD) n_discard_same++;
      if (!ARTERIAL && dst[127:64] != ra[127:64] && s != LOCAL) n_pass_through++;
    end
    if (out != DISCARD) begin
      exp_q[out].push_back(q);
      exp_src[out].push_back(s);
      sent_time[out].push_back(cyc);
      expected_total++;
    end
    foreach (q[i]) begin rx[s] = q[i]; @(negedge clk); end
    rx[s] = 1'b0;
    @(negedge clk);
  endtask

  function automatic addr_t rand_dest();
    return make_dest(ra, $urandom_range(0, 2) - 1, $urandom_range(0, 2) - 1);
  endfunction

  // tx parsers
  for (genvar p = 0; p < NP; p++) begin : g_mon
    bitq_t cur;
    bit    in_pkt = 0;
    int    start;
    always @(negedge clk) if (rst_n) begin
      if (contention[p]) n_contention++;
      if (skip[p]) n_skip++;
      if (!in_pkt && tx[p]) begin in_pkt = 1; cur.delete(); start = cyc; end
      if (in_pkt) begin
        int n, hit;
        cur.push_back(tx[p]);
        n = cur.size();
        if (n >= 13 && cur[n-1] && cur[n-2] && cur[n-3] && cur[n-4] && cur[n-5] && cur[n-6]) begin
          hit = -1;
          foreach (exp_q[p][i]) if (hit < 0 && exp_q[p][i] == cur) hit = i;
          chk($sformatf("packet on port %0d was expected there", p), hit >= 0, 1);
          if (hit >= 0) begin
            if (measure) begin
              int l;
              l = start - sent_time[p][hit] - exp_q[p][hit].size();
              if (l < lat_min) lat_min = l;
              if (l > lat_max) lat_max = l;
            end
            exp_q[p].delete(hit);
            exp_src[p].delete(hit);
            sent_time[p].delete(hit);
            n_out[p]++;
            delivered++;
          end
          in_pkt = 0;
        end
      end
    end
  end

  initial begin
    finished = 0;
    checks = 0;
    failures = 0;
    rst_n = 0;
    rx = '0;
    for (int p = 0; p < NP; p++) n_out[p] = 0;
    ra = make_dest(rand_addr(), 1, 1);
    router_addr = ra;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // (1) every relation from every port, one packet at a time
    measure = 1;
    for (int s = 0; s < NP; s++)
      for (int c = 0; c < 9; c++) begin
        send(s, make_dest(ra, c / 3 - 1, c % 3 - 1), 20 + 5 * c);
        repeat (400) @(negedge clk);
      end
    measure = 0;
    chk("phase 1 delivered", delivered, expected_total);
    $display("transit latency less packet length, SOP in to SOP out, idle router: %0d..%0d clocks", lat_min, lat_max);
    chk("transit latency bounded", lat_min >= 158 && lat_max <= 170, 1);
    chk("transit latency varies by at most the OPS scan", lat_max - lat_min <= NP + 8, 1);

    // (2) contention: every other port sends to the same destination port at once
    for (int d = 0; d < NP; d++) begin
      for (int rep = 0; rep < 2; rep++) begin
        for (int s = 0; s < NP; s++) begin
          automatic int ss = s;
          automatic int dd = d;
          automatic addr_t dst;
          if (s == d) continue;
          // destination that routes from port s to port d (skip if none)
          dst = '0;
          for (int tries = 0; tries < 60; tries++) begin
            addr_t t;
            t = rand_dest();
            if (ref_route(ARTERIAL, s, t, ra) == d) begin dst = t; break; end
          end
          if (dst != '0) begin
            active++;
            fork begin send(ss, dst, 60 + 10 * ss); active--; end join_none
          end
        end
        n_simultaneous++;
        do @(negedge clk); while (active != 0);
        @(negedge clk);
      end
    end
    repeat (1500) @(negedge clk);

    // (3) packets cut short inside the address
    for (int s = 0; s < NP; s++) send(s, rand_dest(), 10, 1);
    repeat (500) @(negedge clk);

    // (4) random traffic on all ports at once
    for (int s = 0; s < NP; s++) begin
      automatic int ss = s;
      active++;
      fork begin
        for (int j = 0; j < NRAND; j++) begin
          send(ss, rand_dest(), $urandom_range(8, 400));
          repeat ($urandom_range(1, 60)) @(negedge clk);
        end
        active--;
      end join_none
    end
    do @(negedge clk); while (active != 0);
    repeat (4000) @(negedge clk);

    // results
    chk("all expected packets delivered", delivered, expected_total);
    for (int p = 0; p < NP; p++) chk($sformatf("packets left for port %0d", p), exp_q[p].size(), 0);
    chk("no queue overflow", overflow, 0);
    $display("delivered %0d packets; per output port:", delivered);
    for (int p = 0; p < NP; p++) begin
      $display("  port %0d: %0d", p, n_out[p]);
      chk($sformatf("packets sent out of port %0d", p), n_out[p] > 0, 1);
    end
    $display("discarded (would return by the input port): %0d", n_discard_same);
    $display("discarded (cut short in the address): %0d", n_discard_short);
    $display("clocks with an OPS holding packets from several ports: %0d", n_contention);
    $display("OPS counter steps over empty queues: %0d", n_skip);
    $display("simultaneous-arrival rounds: %0d", n_simultaneous);
    chk("same-port discard happened", n_discard_same > 0, 1);
    chk("short-packet discard happened", n_discard_short > 0, 1);
    chk("OPS contention happened", n_contention > 0, 1);
    chk("OPS empty-queue skip happened", n_skip > 0, 1);
    chk("simultaneous arrivals happened", n_simultaneous > 0, 1);
    if (!ARTERIAL) begin
      $display("collector pass-through packets: %0d", n_pass_through);
      chk("collector pass-through happened", n_pass_through > 0, 1);
    end
    finished = 1;
  end
endmodule
