// tb_acm: with RECEIVING-ADDRESS held, the latitude flag must cover address
// bits 0..63, the longitude flag bits 64..127, ADDRESS-RECEIVED only bit 127,
// and all flags must be low after the address and while idle.
module tb_acm;
  logic clk = 0, rst_n = 0, receiving_address = 0;
  logic rx_lat, rx_lon, addr_rcvd;
  logic [6:0] bit_index;
  int checks = 0, failures = 0;

  acm dut (.clk, .rst_n, .receiving_address, .receiving_latitude(rx_lat),
           .receiving_longitude(rx_lon), .address_received(addr_rcvd), .bit_index);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int c, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("clock %0d: %s = %0b expected %0b", c, what, got, exp);
    end
  endtask

  initial begin
    int nrcvd;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) begin
      nrcvd = 0;
      for (int c = 0; c < 300; c++) begin
        receiving_address = 1;
        #1;
        chk("lat", c, rx_lat, c < 64);
        chk("lon", c, rx_lon, c >= 64 && c < 128);
        chk("rcvd", c, addr_rcvd, c == 127);
        if (c < 128) chk("index", c, bit_index == 7'(c), 1);
        if (addr_rcvd) nrcvd++;
        @(negedge clk);
      end
      checks++;
      if (nrcvd != 1) begin failures++; $display("ADDRESS-RECEIVED %0d times", nrcvd); end
      receiving_address = 0;
      repeat (3) begin
        #1; chk("idle", 0, rx_lat || rx_lon || addr_rcvd, 0); @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
