// tb_signal_holder: lines are copied only in clocks with load high and held
// unchanged otherwise.
module tb_signal_holder;
  localparam int NL = 6;
  logic clk = 0, rst_n = 0, load = 0;
  logic [NL-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  signal_holder #(.NLINES(NL)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      load = ($urandom_range(0, 4) == 0);
      d    = NL'(1) << $urandom_range(0, NL - 1);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("clock %0d: q %b expected %b", n, q, model);
      end
      @(negedge clk);
      if (load) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
