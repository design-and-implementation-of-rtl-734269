// tb_cart_router_collector: end-to-end test of the router in its collector
// form (east, west and local ports): pass-through of packets whose latitude
// differs, east/west/keep decisions on longitude, discards, contention.
// Traffic and checks are in tb_router_checker.
module tb_cart_router_collector;
  import cart_pkg::*;

  localparam int NP = 3;

  logic clk = 0, rst_n;
  logic [127:0] router_addr;
  logic [NP-1:0] rx, tx, overflow, contention, skip;
  bit finished;
  int checks, failures;

  cart_router #(.KIND(COLLECTOR)) dut (.clk, .rst_n, .router_addr, .rx, .tx, .overflow);

  for (genvar p = 0; p < NP; p++) begin : g_obs
    assign contention[p] = (dut.g_port[p].u_port.u_ops.pkts[0] != 0)
                        && (dut.g_port[p].u_port.u_ops.pkts[1] != 0);
    assign skip[p]       = dut.g_port[p].u_port.u_ops.skip;
  end

  tb_router_checker #(.ARTERIAL(0), .NP(NP)) chk (
    .clk, .rst_n, .router_addr, .rx, .tx, .overflow, .contention, .skip,
    .finished, .checks, .failures);

  always #5 clk = ~clk;

  initial begin
    do @(posedge clk); while (!finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
