// tb_aspu: exhaustive check of the sign prediction unit. For every input
// combination the expected outcome is derived from signed arithmetic on two
// small sample magnitudes that realise the given order: the sign of the real
// product or sum, and, for sums of opposite signs, which term must be negated
// so the adder yields a non-negative magnitude.
module tb_aspu;
  logic is_sum, s_a, s_b, a_ge_b, a_eq_b;
  logic twoc1, twoc2, s_res;
  int checks = 0, failures = 0;

  aspu dut (.is_sum(is_sum), .s_a(s_a), .s_b(s_b), .a_ge_b(a_ge_b), .a_eq_b(a_eq_b),
            .twoc1(twoc1), .twoc2(twoc2), .s_res(s_res));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int ma, mb, va, vb, r, ta, tb_, mag;
      bit es;
      {is_sum, s_a, s_b, a_ge_b, a_eq_b} = 5'(i);
      if (a_eq_b && !a_ge_b) continue;          // impossible combination
      ma = a_eq_b ? 5 : (a_ge_b ? 7 : 3);
      mb = 5;
      va = s_a ? -ma : ma;
      vb = s_b ? -mb : mb;
      #1;
      checks++;
      if (!is_sum) begin
        es = (va * vb) < 0;
        if (s_res !== es || twoc1 || twoc2) failures++;
      end else begin
        r  = va + vb;
        es = r < 0;
        // what the adder produces from the chosen operands
        ta  = twoc1 ? -ma : ma;
        tb_ = twoc2 ? -mb : mb;
        mag = ta + tb_;
        if (s_res !== es || mag != (r < 0 ? -r : r) || (twoc1 && twoc2)) begin
          failures++;
          $display("FAIL sum sa=%0d sb=%0d ge=%0d eq=%0d: s=%0d t1=%0d t2=%0d", s_a, s_b, a_ge_b, a_eq_b, s_res, twoc1, twoc2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
