// tb_word_fifo: random pushes and pops against a queue model; checks the
// head word, empty, full, occupancy, and that a push into a full FIFO is
// dropped and flagged. Uses a small depth to reach full often.
module tb_word_fifo;
  localparam int W = 8, D = 16;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] used;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  word_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata,
                                     .empty, .full, .overflow, .used);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%0t %s = %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    int ovf_seen;
    bit accept;
    ovf_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // bias toward filling in the first half, draining in the second
      push  = ($urandom_range(0, 99) < ((n % 600) < 300 ? 70 : 30));
      pop   = ($urandom_range(0, 99) < ((n % 600) < 300 ? 30 : 70));
      wdata = W'($urandom);
      #1;
      chk("empty", empty, model.size() == 0);
      chk("full", full, model.size() == D);
      chk("used", used, model.size());
      chk("overflow", overflow, push && model.size() == D);
      if (model.size() != 0) chk("rdata", rdata, model[0]);
      if (overflow) ovf_seen++;
      accept = push && model.size() < D;
      @(negedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (accept) model.push_back(wdata);
    end
    chk("overflow exercised", ovf_seen > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
