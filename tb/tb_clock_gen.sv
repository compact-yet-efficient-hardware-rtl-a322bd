// tb_clock_gen: the Clk1 enable must be high in exactly one of every four
// clocks (Clk1 high for one Clk2 period, low for three), starting with the
// first clock after reset.
module tb_clock_gen;
  logic clk = 0, rst_n = 0, clk1, clk1_tick;
  int checks = 0, failures = 0;

  clock_gen #(.RATIO(4)) dut (.clk(clk), .rst_n(rst_n), .clk1(clk1), .clk1_tick(clk1_tick));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 64; c++) begin
      checks++;
      if (clk1_tick !== (c % 4 == 0) || clk1 !== clk1_tick) begin
        failures++;
        $display("FAIL cycle %0d tick=%0d", c, clk1_tick);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
