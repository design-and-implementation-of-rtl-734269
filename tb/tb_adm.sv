// tb_adm: compares random 64-bit field pairs bit-serially (MSB first, two
// fields back to back) and checks DA>RA / DA<RA after every bit against the
// comparison of the prefixes seen so far.
module tb_adm;
  logic clk = 0, rst_n = 0, en = 0, first = 0, da = 0, ra = 0;
  logic gt, lt;
  int checks = 0, failures = 0;

  adm dut (.clk, .rst_n, .en, .first, .da, .ra, .da_gt_ra(gt), .da_lt_ra(lt));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [63:0] a, b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      case (t % 4)
        0: b = a;                                   // equal
        1: b = a ^ (64'd1 << $urandom_range(0, 63)); // one bit apart
        2: b[63:20] = a[63:20];                      // long common prefix
        default: ;
      endcase
      for (int i = 63; i >= 0; i--) begin
        bit [63:0] pa, pb;
        en = 1; first = (i == 63); da = a[i]; ra = b[i];
        #1;
        pa = a >> i; pb = b >> i;
        checks++;
        if (gt !== (pa > pb) || lt !== (pa < pb)) begin
          failures++;
          if (failures < 10) $display("pair %0d bit %0d: gt %0b lt %0b", t, i, gt, lt);
        end
        @(negedge clk);
      end
      en = 0; first = 0;
      if (t % 3 == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
