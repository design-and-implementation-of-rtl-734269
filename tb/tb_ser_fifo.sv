// tb_ser_fifo: checks the serial queue. Bursts of bits are recorded (each
// burst padded with zeros to a whole word), then read back at one bit per
// clock without gaps; rd_flush must drop the rest of the current word;
// reading that trails a running recording by a few words must never stall.
module tb_ser_fifo;
  localparam int W = 8, D = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_bit = 0, rd_en = 0, rd_flush = 0;
  logic rd_bit, rd_valid, empty, overflow;
  int checks = 0, failures = 0;
  bit exp_q[$];

  ser_fifo #(.WORD_W(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .wr_bit, .rd_en, .rd_flush,
                                         .rd_bit, .rd_valid, .empty, .overflow);

  always #5 clk = ~clk;

  initial begin
    #500000;
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

  task automatic write_burst(int n);
    for (int i = 0; i < n; i++) begin
      wr_en  = 1;
      wr_bit = $urandom_range(0, 1);
      exp_q.push_back(wr_bit);
      @(negedge clk);
    end
    wr_en = 0; wr_bit = 0;
    while (exp_q.size() % W != 0) exp_q.push_back(0);
    @(negedge clk);
  endtask

  initial begin
    int lens[5] = '{8, 13, 3, 24, 1};
    int nread;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk("empty after reset", empty, 1);
    foreach (lens[i]) write_burst(lens[i]);
    chk("not empty", empty, 0);
    // read everything back, one bit per clock
    rd_en = 1;
    nread = exp_q.size();
    for (int i = 0; i < nread; i++) begin
      #1;
      chk("rd_valid", rd_valid, 1);
      chk("rd_bit", rd_bit, exp_q[0]);
      void'(exp_q.pop_front());
      @(negedge clk);
    end
    #1;
    chk("rd_valid when empty", rd_valid, 0);
    chk("empty at end", empty, 1);
    rd_en = 0;
    // flush drops the rest of a word
    exp_q.delete();
    write_burst(16);
    rd_en = 1;
    for (int i = 0; i < 3; i++) begin
      #1; chk("pre-flush bit", rd_bit, exp_q[i]); @(negedge clk);
    end
    rd_en = 0; rd_flush = 1; @(negedge clk); rd_flush = 0; rd_en = 1;
    for (int i = 8; i < 16; i++) begin
      #1; chk("post-flush valid", rd_valid, 1); chk("post-flush bit", rd_bit, exp_q[i]); @(negedge clk);
    end
    #1; chk("empty after flush read", empty, 1);
    rd_en = 0;
    // reading trails a running recording by 20 clocks
    exp_q.delete();
    fork
      write_burst(200);
      begin
        repeat (20) @(negedge clk);
        rd_en = 1;
        for (int i = 0; i < 200; i++) begin
          #1; chk("trailing valid", rd_valid, 1); chk("trailing bit", rd_bit, exp_q[i]); @(negedge clk);
        end
        rd_en = 0;
      end
    join
    chk("no overflow", overflow, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
