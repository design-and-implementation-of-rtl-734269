// tb_clk_div: checks the divided strobe of the clock divider: with enable
// held high, exactly one tick every 2**N_BITS clocks, on the clock where the
// count reads all ones; no tick while disabled; clear restarts the count.
module tb_clk_div;
  localparam int N = 3;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic tick;
  logic [N-1:0] count;
  int checks = 0, failures = 0;
  int model;

  clk_div #(.N_BITS(N)) dut (.clk, .rst_n, .en, .clr, .tick, .count);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ticks;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 0;
    ticks = 0;
    for (int n = 0; n < 400; n++) begin
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 40) == 0);
      #1;
      checks++;
      if (tick !== (en && model == (1 << N) - 1)) begin
        failures++;
        $display("cycle %0d: tick %0b model count %0d en %0b", n, tick, model, en);
      end
      checks++;
      if (count !== N'(model)) begin
        failures++;
        $display("cycle %0d: count %0d expected %0d", n, count, model);
      end
      if (tick) ticks++;
      @(negedge clk);
      if (clr)     model = 0;
      else if (en) model = (model + 1) % (1 << N);
    end
    // rate: enable held high, one tick per 2**N clocks
    clr = 1; en = 0; @(negedge clk); clr = 0; en = 1;
    ticks = 0;
    for (int n = 0; n < 64; n++) begin
      #1;
      if (tick) ticks++;
      @(negedge clk);
    end
    checks++;
    if (ticks != 64 / (1 << N)) begin
      failures++;
      $display("rate: %0d ticks in 64 clocks", ticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
