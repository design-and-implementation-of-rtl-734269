// tb_dmm: Decision Making Module test. A PDM turns a stream of framed packets
// into the packet and RECEIVING inputs of five DMMs (arterial router seen from
// its north, local and east ports; collector router seen from its west and
// local ports). For destinations smaller, equal and larger than the router
// address in latitude and longitude, each DMM's decision line is compared
// with an independent reference of the routing rule. Also checked: the
// decision appears PCM_N + 128 clocks after RECEIVING rises, stays lit until
// acknowledged, addresses one bit away from the router's (first and last
// bit of each half) route correctly, and a packet cut short before its
// address ends is discarded.
module tb_dmm;
  import tb_cart_util::*;
  import cart_pkg::*;

  localparam int NDUT = 5;
  localparam int LAT  = PCM_N + 128;

  logic clk = 0, rst_n = 0, din = 0;
  logic pkt, x, receiving, frame, eop;
  logic [127:0] router_addr;
  logic [NDUT-1:0] ack = '0;
  logic [4:0] send [NDUT];
  logic [NDUT-1:0] disc;
  int checks = 0, failures = 0;

  pdm u_pdm (.clk, .rst_n, .din, .pkt_out(pkt), .x, .receiving, .frame, .eop);

  dmm #(.KIND(ARTERIAL), .ME(P_NORTH)) d0 (.clk, .rst_n, .router_addr, .pkt, .receiving,
    .ack(ack[0]), .send(send[0]), .discard(disc[0]), .decide(), .decision());
  dmm #(.KIND(ARTERIAL), .ME(P_LOCAL)) d1 (.clk, .rst_n, .router_addr, .pkt, .receiving,
    .ack(ack[1]), .send(send[1]), .discard(disc[1]), .decide(), .decision());
  dmm #(.KIND(ARTERIAL), .ME(P_EAST)) d2 (.clk, .rst_n, .router_addr, .pkt, .receiving,
    .ack(ack[2]), .send(send[2]), .discard(disc[2]), .decide(), .decision());
  logic [2:0] send3, send4;
  dmm #(.KIND(COLLECTOR), .ME(P_WEST)) d3 (.clk, .rst_n, .router_addr, .pkt, .receiving,
    .ack(ack[3]), .send(send3), .discard(disc[3]), .decide(), .decision());
  dmm #(.KIND(COLLECTOR), .ME(P_LOCAL)) d4 (.clk, .rst_n, .router_addr, .pkt, .receiving,
    .ack(ack[4]), .send(send4), .discard(disc[4]), .decide(), .decision());
  assign send[3] = {2'b00, send3};
  assign send[4] = {2'b00, send4};

  const bit ARTER[NDUT] = '{1, 1, 1, 0, 0};
  const int MEP[NDUT]   = '{NORTH, LOCAL, EAST, WEST, LOCAL};
  const int FLIP[8]     = '{64, 0, 65, 1, 127, 63, 100, 30};

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

  // Decision seen on the lines of one DUT: port number or DISCARD, -2 if none.
  function automatic int line_of(int k);
    if (disc[k]) return DISCARD;
    for (int p = 0; p < 5; p++) if (send[k][p]) return p;
    return -2;
  endfunction

  // Sends one packet; checks the decision of every DUT; expected[k] < -1
  // means "no decision expected".
  task automatic send_packet(bitq_t q, int exp_dec[NDUT], bit check_latency);
    int rise = -1, n = 0;
    int seen[NDUT];
    int when[NDUT];
    for (int k = 0; k < NDUT; k++) begin seen[k] = -2; when[k] = -1; end
    for (int i = 0; i < q.size() + 200; i++) begin
      din = (i < q.size()) ? q[i] : 1'b0;
      #1;
      if (receiving && rise < 0) rise = i;
      for (int k = 0; k < NDUT; k++) begin
        int l;
        l = line_of(k);
        if (l != -2 && seen[k] == -2) begin seen[k] = l; when[k] = i; end
        if (seen[k] != -2 && when[k] >= 0) begin
          // hold until acknowledged three clocks later
          if (i - when[k] < 3) chk("lines held until ack", l, seen[k]);
          ack[k] = (i - when[k] == 3);
          if (i - when[k] > 3) chk("lines drop after ack", l, -2);
        end
      end
      @(negedge clk);
      ack = '0;
    end
    for (int k = 0; k < NDUT; k++) begin
      chk($sformatf("decision of dmm %0d", k), seen[k], exp_dec[k]);
      if (check_latency && seen[k] != -2) chk("decision latency", when[k] - rise, LAT);
    end
  endtask

  initial begin
    addr_t ra, dst;
    bitq_t q;
    int exp_dec[NDUT];
    int lat_rel, lon_rel;
    int one_bit_cases = 0;
    ra = make_dest(rand_addr(), 1, 1);
    router_addr = ra;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 9; c++) begin
        lat_rel = c / 3 - 1;
        lon_rel = c % 3 - 1;
        dst = make_dest(ra, lat_rel, lon_rel);
        q = build_packet(dst, 30 + 7 * c);
        for (int k = 0; k < NDUT; k++) exp_dec[k] = ref_route(ARTER[k], MEP[k], dst, ra);
        send_packet(q, exp_dec, 1);
      end
    end
    // destinations that differ from the router address in one bit only,
    // including the last bit of the latitude and of the longitude
    foreach (FLIP[f]) begin
      bitq_t a;
      dst = ra;
      dst[FLIP[f]] = ~dst[FLIP[f]];
      a = addr_bits(dst);
      a.push_front(1'b0);
      if (!runs_ok(a)) continue;
      q = build_packet(dst, 24);
      for (int k = 0; k < NDUT; k++) exp_dec[k] = ref_route(ARTER[k], MEP[k], dst, ra);
      send_packet(q, exp_dec, 1);
      one_bit_cases++;
    end
    chk("one-bit-difference cases run", one_bit_cases >= 4, 1);
    // a packet that ends inside its address is discarded by every DMM
    q = build_packet(make_dest(ra, 0, 0), 10);
    q = q[0:60];
    repeat (6) q.push_back(1'b1);
    for (int k = 0; k < NDUT; k++) exp_dec[k] = DISCARD;
    send_packet(q, exp_dec, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
