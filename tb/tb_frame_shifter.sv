// tb_frame_shifter: checks adaptive framing against the reference.
// The worked example 450023/1279030 must frame to 14063/39969 after exactly
// five shifts; random wide fractions must match the reference value and take
// exactly as many clocks as shifts; a huge numerator over a tiny denominator
// must saturate to 65535/1; a value that already fits must not move.
module tb_frame_shifter;
  import ffp_pkg::*;
  import ffp_ref_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0;
  logic [32:0] num_in = '0;
  logic [31:0] den_in = 32'd1;
  logic        sign_in = 0;
  frac_t       fo;
  logic        fits;
  int checks = 0, failures = 0;

  frame_shifter #(.NUM_IN_W(33), .DEN_IN_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .num_in(num_in), .den_in(den_in),
    .sign_in(sign_in), .frac_out(fo), .fits(fits));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(longint unsigned n, longint unsigned d, bit s, frac_t exp_f, int exp_k);
    int k = 0;
    @(negedge clk);
    num_in = 33'(n); den_in = 32'(d); sign_in = s; load = 1;
    @(negedge clk);
    load = 0;
    while (!fits) begin
      @(negedge clk);
      k++;
    end
    checks++;
    if (fo !== exp_f || k != exp_k) begin
      failures++;
      $display("FAIL %0d/%0d: got %0d/%0d s%0d in %0d, want %0d/%0d s%0d in %0d",
               n, d, fo.num, fo.den, fo.sign, k, exp_f.num, exp_f.den, exp_f.sign, exp_k);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(450023, 1279030, 0, mkf(14063, 39969, 0), 5);
    run(450023, 1279030, 1, mkf(14063, 39969, 1), 5);
    run(64'h1_FFFF_FFFF, 1, 0, mkf(65535, 1, 0), 1);
    run(12, 3777, 1, mkf(12, 3777, 1), 0);
    for (int i = 0; i < 3000; i++) begin
      longint unsigned n, d;
      bit s;
      n = {$urandom, $urandom} & ((64'd1 << $urandom_range(33, 1)) - 1);
      d = {$urandom, $urandom} & ((64'd1 << $urandom_range(32, 1)) - 1);
      if (d == 0) d = 1;
      s = 1'($urandom_range(1, 0));
      run(n, d, s, ref_frame(n, d, s), ref_shifts(n, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
