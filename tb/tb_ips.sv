// tb_ips: Incoming Packet Storage test. A PDM feeds the IPS a stream of
// framed packets; the testbench plays the DMM, lighting one decision line
// 140 clocks after each packet starts and holding it until the IPS
// acknowledges. Checked for every link: the packet appears whole and unchanged
// on the chosen link only, within a single activator pulse (also when two
// packets in a row go to the same port), discarded packets appear nowhere,
// and the first SOP bit leaves 1 + MARK_LEN clocks after the acknowledge.
module tb_ips;
  import tb_cart_util::*;
  import cart_pkg::*;

  localparam int NP = 5;
  localparam int DLY = 140;

  logic clk = 0, rst_n = 0, din = 0;
  logic pkt, x, receiving, frame, eop;
  logic [NP-1:0] send = '0;
  logic discard = 0, ack, busy, overflow;
  pa_link_t [NP-1:0] to_ops;
  int checks = 0, failures = 0;
  int cyc = 0;

  pdm u_pdm (.clk, .rst_n, .din, .pkt_out(pkt), .x, .receiving, .frame, .eop);
  ips #(.NPORTS(NP), .DEPTH(64)) dut (.clk, .rst_n, .arriving(frame), .in_bit(pkt),
    .send, .discard, .ack, .to_ops, .busy, .overflow);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // scheduled decisions
  int    dec_time[$];
  int    dec_port[$];     // DISCARD or port
  bitq_t exp_frames[NP][$];
  int    ack_time[$];
  bitq_t cap[NP];
  int    pulses[NP];
  int    first_bit_time[NP][$];
  logic [NP-1:0] act_d = '0;

  // DMM model
  initial begin
    forever begin
      @(negedge clk);
      if (dec_time.size() != 0 && cyc >= dec_time[0]) begin
        int p;
        p = dec_port[0];
        if (p == DISCARD) discard = 1; else send[p] = 1'b1;
        #1;
        while (!ack) begin @(negedge clk); #1; end
        ack_time.push_back(cyc);
        @(negedge clk);
        send = '0; discard = 0;
        void'(dec_time.pop_front());
        void'(dec_port.pop_front());
      end
    end
  end

  // link monitors
  always @(negedge clk) begin
    for (int k = 0; k < NP; k++) begin
      if (!to_ops[k].act) chk("data without activator", to_ops[k].dat, 0);
      if (to_ops[k].act) begin
        if (to_ops[k].dat && cap[k].size() == 0) first_bit_time[k].push_back(cyc);
        if (to_ops[k].dat || cap[k].size() != 0) cap[k].push_back(to_ops[k].dat);
      end
      if (act_d[k] && !to_ops[k].act) begin
        bitq_t f;
        pulses[k]++;
        f = cap[k];
        while (f.size() != 0 && f[f.size()-1] == 1'b0) void'(f.pop_back());
        if (exp_frames[k].size() == 0) begin
          chk("unexpected packet on link", k, -1);
        end else begin
          chk("packet length", f.size(), exp_frames[k][0].size());
          checks++;
          if (f != exp_frames[k][0]) begin failures++; $display("link %0d: packet differs", k); end
          void'(exp_frames[k].pop_front());
        end
        cap[k].delete();
      end
    end
    act_d = {to_ops[4].act, to_ops[3].act, to_ops[2].act, to_ops[1].act, to_ops[0].act};
  end

  initial begin
    int ports[10] = '{EAST, EAST, DISCARD, NORTH, LOCAL, SOUTH, SOUTH, WEST, DISCARD, EAST};
    int gaps[10]  = '{2, 1, 5, 1, 30, 3, 1, 8, 1, 4};
    int total;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    total = 0;
    foreach (ports[j]) begin
      bitq_t q;
      q = build_packet(rand_addr(), 40 + 11 * j);
      dec_time.push_back(cyc + DLY);
      dec_port.push_back(ports[j]);
      if (ports[j] != DISCARD) begin exp_frames[ports[j]].push_back(q); total++; end
      foreach (q[i]) begin din = q[i]; @(negedge clk); end
      din = 0;
      repeat (gaps[j]) @(negedge clk);
    end
    repeat (600) @(negedge clk);
    for (int k = 0; k < NP; k++) chk($sformatf("packets left for link %0d", k), exp_frames[k].size(), 0);
    chk("activator pulses", pulses[0] + pulses[1] + pulses[2] + pulses[3] + pulses[4], total);
    // first SOP bit leaves 1 + MARK_LEN clocks after the acknowledge
    begin
      int n = 0;
      foreach (ports[j]) begin
        if (ports[j] != DISCARD) begin
          int t;
          t = first_bit_time[ports[j]].pop_front();
          chk("latency from acknowledge", t - ack_time[j], 1 + MARK_LEN);
          n++;
        end
      end
    end
    chk("no overflow", overflow, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
