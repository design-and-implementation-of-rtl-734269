// tb_rap: the router address must come out MSB first, one bit per shifting
// clock, the latitude half then the longitude half, and be reloaded when
// shifting stops.
module tb_rap;
  import tb_cart_util::*;
  logic clk = 0, rst_n = 0, shift = 0, ra;
  logic [127:0] router_addr;
  int checks = 0, failures = 0;

  rap dut (.clk, .rst_n, .router_addr, .shift, .ra);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) begin
      router_addr = {$urandom, $urandom, $urandom, $urandom};
      rst_n = 0; shift = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      repeat (2) @(negedge clk);
      for (int i = 0; i < 128; i++) begin
        shift = 1;
        #1;
        checks++;
        if (ra !== router_addr[127 - i]) begin
          failures++;
          if (failures < 10) $display("bit %0d: ra %0b expected %0b", i, ra, router_addr[127 - i]);
        end
        @(negedge clk);
      end
      shift = 0;
      router_addr = ~router_addr;
      @(negedge clk);
      #1;
      checks++;
      if (ra !== router_addr[127]) begin failures++; $display("no reload"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
