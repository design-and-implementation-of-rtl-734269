// tb_cart_util: testbench helpers for the Cartesian router: building framed
// packets, an independent reference of the routing rule, and the line format
// (SOP 111111, a 0, 128 address bits, payload, EOP 111111; no six ones in a
// row between the markers).
package tb_cart_util;

  typedef bit [127:0] addr_t;
  typedef bit         bitq_t[$];

  // Port numbers as used by the router: 0 local, 1 east, 2 west, 3 north, 4 south.
  localparam int LOCAL = 0, EAST = 1, WEST = 2, NORTH = 3, SOUTH = 4;
  localparam int DISCARD = -1;

  // True when q has no run of six ones.
  function automatic bit runs_ok(bitq_t q);
    int run = 0;
    foreach (q[i]) begin
      run = q[i] ? run + 1 : 0;
      if (run >= 6) return 0;
    end
    return 1;
  endfunction

  // n random bits, a 0 forced after every run of five ones; run carries the
  // number of ones that precede the first bit.
  function automatic bitq_t gen_bits(int n, ref int run);
    bitq_t q;
    for (int i = 0; i < n; i++) begin
      bit b = (run >= 5) ? 1'b0 : bit'($urandom_range(0, 1));
      run = b ? run + 1 : 0;
      q.push_back(b);
    end
    return q;
  endfunction

  function automatic bitq_t addr_bits(addr_t a);
    bitq_t q;
    for (int i = 127; i >= 0; i--) q.push_back(a[i]);
    return q;
  endfunction

  function automatic addr_t bits_to_addr(bitq_t q);
    addr_t a = '0;
    foreach (q[i]) a[127-i] = q[i];
    return a;
  endfunction

  // A random address whose bits may follow a 0 on the line.
  function automatic addr_t rand_addr();
    int run = 0;
    return bits_to_addr(gen_bits(128, run));
  endfunction

  // Destination address relative to router address ra: lat_rel/lon_rel are
  // -1 (smaller), 0 (equal) or +1 (larger). Retries until the line rule holds.
  function automatic addr_t make_dest(addr_t ra, int lat_rel, int lon_rel);
    addr_t d;
    for (int tries = 0; tries < 10000; tries++) begin
      bitq_t q;
      d = rand_addr();
      if (lat_rel == 0) d[127:64] = ra[127:64];
      if (lon_rel == 0) d[63:0]   = ra[63:0];
      if (lat_rel > 0 && d[127:64] <= ra[127:64]) continue;
      if (lat_rel < 0 && d[127:64] >= ra[127:64]) continue;
      if (lon_rel > 0 && d[63:0] <= ra[63:0]) continue;
      if (lon_rel < 0 && d[63:0] >= ra[63:0]) continue;
      q = addr_bits(d);
      q.push_front(1'b0);
      if (runs_ok(q)) return d;
    end
    $fatal(1, "make_dest: no address found");
    return d;
  endfunction

  // Whole frame for destination dst with npay payload bits (last one 0).
  function automatic bitq_t build_packet(addr_t dst, int npay);
    bitq_t q, a, p;
    int run;
    repeat (6) q.push_back(1'b1);
    q.push_back(1'b0);
    a = addr_bits(dst);
    foreach (a[i]) q.push_back(a[i]);
    run = 0;
    foreach (a[i]) run = a[i] ? run + 1 : 0;
    p = gen_bits(npay - 1, run);
    foreach (p[i]) q.push_back(p[i]);
    q.push_back(1'b0);
    repeat (6) q.push_back(1'b1);
    return q;
  endfunction

  // Reference routing rule: returns the output port or DISCARD.
  function automatic int ref_route(bit arterial, int in_port, addr_t dst, addr_t ra);
    int out;
    bit [63:0] dlat = dst[127:64], dlon = dst[63:0];
    bit [63:0] rlat = ra[127:64],  rlon = ra[63:0];
    if (dlat != rlat) begin
      if (arterial)              out = (dlat > rlat) ? NORTH : SOUTH;
      else if (in_port == WEST)  out = EAST;
      else if (in_port == EAST)  out = WEST;
      else if (dlon > rlon)      out = EAST;
      else if (dlon < rlon)      out = WEST;
      else                       out = DISCARD;
    end else if (dlon > rlon) out = EAST;
    else if (dlon < rlon)     out = WEST;
    else                      out = LOCAL;
    if (out == in_port) out = DISCARD;
    return out;
  endfunction

endpackage
