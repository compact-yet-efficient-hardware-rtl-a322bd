// aspu: arithmetic signal processing unit of a hardware neuron.
//
// Fractions carry their sign separately from the two natural integers, so the
// sign of a result must be predicted alongside the integer arithmetic. For a
// product the result sign is the XOR of the operand signs. For a sum
// A + B of two signed terms (magnitudes |A|, |B| held as naturals) the adder
// must subtract when the signs differ: the unit then asks for the two's
// complement of the smaller-magnitude term (twoc1 for A, twoc2 for B), so the
// adder output is the non-negative magnitude, and gives the sign of the larger
// term. Equal magnitudes of opposite sign give +0.
//
// The design names this unit, its inputs (the two signs) and its outputs
// (two's complement selects for both adder operands and the sum sign); the
// gate-level circuit, with its flip-flops and clock gating, is not reproduced.
// Here it is purely combinational and the magnitude order comes from the
// neuron's comparator through a_ge_b / a_eq_b.
module aspu (
  input  logic is_sum,   // 0: product, 1: sum
  input  logic s_a,      // sign of operand / term A
  input  logic s_b,      // sign of operand / term B
  input  logic a_ge_b,   // |A| >= |B| (sums only)
  input  logic a_eq_b,   // |A| == |B| (sums only)
  output logic twoc1,    // negate term A before the adder
  output logic twoc2,    // negate term B before the adder
  output logic s_res     // sign of the result
);

  always_comb begin
    twoc1 = 1'b0;
    twoc2 = 1'b0;
    if (!is_sum) begin
      s_res = s_a ^ s_b;
    end else if (s_a == s_b) begin
      s_res = s_a;
    end else if (a_eq_b) begin
      twoc2 = 1'b1;
      s_res = 1'b0;
    end else if (a_ge_b) begin
      twoc2 = 1'b1;
      s_res = s_a;
    end else begin
      twoc1 = 1'b1;
      s_res = s_b;
    end
  end

endmodule
