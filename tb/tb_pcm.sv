// tb_pcm: RECEIVING-ADDRESS must rise exactly N clocks after RECEIVING rises,
// stay high while RECEIVING stays high, and drop with it.
module tb_pcm;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, receiving = 0, receiving_address;
  int checks = 0, failures = 0;

  pcm #(.N(N)) dut (.clk, .rst_n, .receiving, .receiving_address);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens[4] = '{3, 6, 40, 200};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (lens[p]) begin
      for (int c = 0; c < lens[p]; c++) begin
        receiving = 1;
        #1;
        checks++;
        if (receiving_address !== (c >= N)) begin
          failures++;
          $display("packet %0d clock %0d: receiving_address %0b", p, c, receiving_address);
        end
        @(negedge clk);
      end
      receiving = 0;
      for (int c = 0; c < 4; c++) begin
        #1;
        checks++;
        if (receiving_address !== 1'b0) begin
          failures++;
          $display("idle: receiving_address high");
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
