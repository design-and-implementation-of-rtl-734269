// tb_cart_router: end-to-end test of the arterial (north, south, east, west
// and local) Cartesian router at its default sizes (8-bit queue words,
// 512-word queues). Traffic and checks are in tb_router_checker.
module tb_cart_router;
  import cart_pkg::*;

  localparam int NP = 5;

  logic clk = 0, rst_n;
  logic [127:0] router_addr;
  logic [NP-1:0] rx, tx, overflow, contention, skip;
  bit finished;
  int checks, failures;

  cart_router dut (.clk, .rst_n, .router_addr, .rx, .tx, .overflow);

  // OPS activity seen inside the router
  for (genvar p = 0; p < NP; p++) begin : g_obs
    int busy_q;
    always_comb begin
      busy_q = 0;
      for (int i = 0; i < NP - 1; i++)
        if (dut.g_port[p].u_port.u_ops.pkts[i] != 0) busy_q++;
    end
    assign contention[p] = (busy_q >= 2);
    assign skip[p]       = dut.g_port[p].u_port.u_ops.skip;
  end

  tb_router_checker #(.ARTERIAL(1), .NP(NP)) chk (
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
