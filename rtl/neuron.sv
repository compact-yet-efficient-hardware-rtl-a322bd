// neuron: one hardware neuron, a small fraction-arithmetic datapath.
//
// Every neuron of the physical layer receives the same micro-operation
// (ffp_pkg::neuron_op_t) from the control unit once per Clk1 period and works
// on its own data: the broadcast input x, and its own weight or coefficient w
// and accumulator preset r, both taken from its Regw register. The same
// datapath computes the weighted sum and then the sigmoid:
//
//   * Reg1 holds operand A (an input x, or |v| during the sigmoid); Reg2 and
//     Reg3 hold the numerator and signed denominator of operand B.
//   * One combinational 16x16 MULTIPLIER is shared by all products. A fraction
//     product needs two uses (N_MUL_N, N_MUL_D), a fraction sum three
//     (N_SUM_1..3): Acc.N*P.D, P.N*Acc.D and Acc.D*P.D.
//   * The ADDER adds or subtracts the two cross products; the ASPU chooses
//     which term goes through the two's complementer and the result sign.
//   * Results are framed back to 16/16 bits by frame_shifter, which shifts on
//     every clock (Clk2); 'ready' is high once framing has ended.
//   * The accumulator (numerator and signed denominator, the ShiftReg3/Reg4
//     pair) holds the weighted sum v.
//   * The COMPARATOR tests (Acc.N >> s) < Acc.D, i.e. |v| < 2^s, for s = 1,2,3
//     to pick the polynomial segment of exp(-|v|) on [0,2), [2,4), [4,8) or
//     [8,inf) (seg = 0..3). Integer division by 2^s is exact for this test.
//   * N_SIG frames D/(D+N) (v >= 0) or N/(D+N) (v < 0), where N/D = exp(-|v|)
//     is the polynomial result left in the accumulator.
//
// Follows the design: one multiplier and one adder reused for weighted sum and
// sigmoid, joint right-shift framing, ASPU sign prediction, two's complement
// on the adder inputs, comparator-based segment selection, and Eq. 27/29 for
// the sigmoid. This implementation's own choices: the micro-operation set, one
// frame_shifter shared by products and sums (the design keeps separate
// numerator shift registers for the two), two 32-bit temporaries for the cross
// products, the comparator shifting by a constant amount instead of reusing
// the shift register, and a negative polynomial result treated as 0.
//
// Timing: an operation is taken when op_valid is high (one Clk1 tick). After
// N_MUL_D, N_SUM_3 or N_SIG, 'ready' falls for as many clocks as shifts are
// needed (at most 17); the controller waits for it before the next operation.
// A neuron with en low ignores all operations and reports ready.
module neuron
  import ffp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       op_valid,
  input  neuron_op_t op,
  input  logic [1:0] cmp_shift,  // s of N_CMP, 1..3
  input  frac_t      x_in,
  input  frac_t      w_in,
  input  frac_t      r_in,
  output frac_t      y,          // framed result (product, sum or sigmoid)
  output frac_t      acc,        // accumulator
  output logic       ready,
  output logic       lower,      // comparator output
  output logic [1:0] seg         // selected polynomial segment
);

  // Operand and accumulator registers (Clk1 domain).
  frac_t        reg1_q;          // operand A
  logic [15:0]  reg2_q;          // operand B numerator
  logic         reg3_s_q;        // operand B sign
  logic [15:0]  reg3_q;          // operand B denominator
  frac_t        acc_q;           // accumulator (ShiftReg3 / Reg4)
  logic [31:0]  t1_q, t2_q;      // cross products
  logic         vsign_q;         // sign of the weighted sum v
  logic         seg_found_q;
  logic [1:0]   seg_q;

  logic         take;
  assign take = en & op_valid;

  // ---------------- shared multiplier and its operand muxes ----------------
  logic [15:0] mul_a, mul_b;
  logic [31:0] mul_p;
  frac_t       p;                // framed product (framer output)

  always_comb begin
    unique case (op)
      N_MUL_N: begin mul_a = reg1_q.num; mul_b = reg2_q;   end
      N_MUL_D: begin mul_a = reg1_q.den; mul_b = reg3_q;   end
      N_SUM_1: begin mul_a = acc_q.num;  mul_b = p.den;    end
      N_SUM_2: begin mul_a = p.num;      mul_b = acc_q.den; end
      N_SUM_3: begin mul_a = acc_q.den;  mul_b = p.den;    end
      default: begin mul_a = '0;         mul_b = '0;       end
    endcase
  end
  assign mul_p = mul_a * mul_b;

  // ---------------- comparator, ASPU, two's complementers, adder ----------
  logic        t_ge, t_eq;
  logic        twoc1, twoc2, s_res;
  logic        is_sum;
  logic [32:0] add_a, add_b, add_s;

  assign t_ge   = (t1_q >= t2_q);
  assign t_eq   = (t1_q == t2_q);
  assign is_sum = (op == N_SUM_3);

  aspu u_aspu (
    .is_sum (is_sum),
    .s_a    (is_sum ? acc_q.sign : reg1_q.sign),
    .s_b    (is_sum ? p.sign     : reg3_s_q),
    .a_ge_b (t_ge),
    .a_eq_b (t_eq),
    .twoc1  (twoc1),
    .twoc2  (twoc2),
    .s_res  (s_res)
  );

  assign add_a = twoc1 ? (~{1'b0, t1_q} + 33'd1) : {1'b0, t1_q};
  assign add_b = twoc2 ? (~{1'b0, t2_q} + 33'd1) : {1'b0, t2_q};
  assign add_s = add_a + add_b;

  assign lower = (acc_q.num >> cmp_shift) < acc_q.den;

  // ---------------- sigmoid output terms (Eq. 27 / 29) ---------------------
  logic [15:0] e_num;
  logic [16:0] sig_den;
  logic [15:0] sig_num;
  assign e_num   = acc_q.sign ? 16'd0 : acc_q.num;
  assign sig_den = {1'b0, e_num} + {1'b0, acc_q.den};
  assign sig_num = vsign_q ? e_num : acc_q.den;

  // ---------------- framing shift registers --------------------------------
  logic        fr_load;
  logic [32:0] fr_num;
  logic [31:0] fr_den;
  logic        fr_sign;
  logic        fr_fits;

  always_comb begin
    fr_load = 1'b0;
    fr_num  = '0;
    fr_den  = 32'd1;
    fr_sign = 1'b0;
    if (take) begin
      unique case (op)
        N_MUL_D: begin
          fr_load = 1'b1;
          fr_num  = {1'b0, t1_q};
          fr_den  = mul_p;
          fr_sign = s_res;
        end
        N_SUM_3: begin
          fr_load = 1'b1;
          fr_num  = add_s;
          fr_den  = mul_p;
          fr_sign = s_res;
        end
        N_SIG: begin
          fr_load = 1'b1;
          fr_num  = {17'd0, sig_num};
          fr_den  = {15'd0, sig_den};
          fr_sign = 1'b0;
        end
        default: ;
      endcase
    end
  end

  frame_shifter #(.NUM_IN_W(33), .DEN_IN_W(32)) u_frame (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (fr_load),
    .num_in   (fr_num),
    .den_in   (fr_den),
    .sign_in  (fr_sign),
    .frac_out (p),
    .fits     (fr_fits)
  );

  // ---------------- register updates ---------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1_q      <= FRAC_ZERO;
      reg2_q      <= '0;
      reg3_s_q    <= 1'b0;
      reg3_q      <= 16'd1;
      acc_q       <= FRAC_ZERO;
      t1_q        <= '0;
      t2_q        <= '0;
      vsign_q     <= 1'b0;
      seg_found_q <= 1'b0;
      seg_q       <= '0;
    end else if (take) begin
      unique case (op)
        N_ACC_CLR:    acc_q <= FRAC_ZERO;
        N_LOAD_XW: begin
          reg1_q   <= x_in;
          reg2_q   <= w_in.num;
          reg3_s_q <= w_in.sign;
          reg3_q   <= w_in.den;
        end
        N_LOAD_V: begin
          reg1_q  <= '{num: acc_q.num, sign: 1'b0, den: acc_q.den};
          vsign_q <= acc_q.sign;
        end
        N_LOAD_W: begin
          reg2_q   <= w_in.num;
          reg3_s_q <= w_in.sign;
          reg3_q   <= w_in.den;
        end
        N_LOAD_B_ACC: begin
          reg2_q   <= acc_q.num;
          reg3_s_q <= acc_q.sign;
          reg3_q   <= acc_q.den;
        end
        N_ACC_LOAD:   acc_q <= r_in;
        N_MUL_N:      t1_q  <= mul_p;
        N_SUM_1:      t1_q  <= mul_p;
        N_SUM_2:      t2_q  <= mul_p;
        N_ACC_WB:     acc_q <= p;
        N_CMP: begin
          if (cmp_shift == 2'd1 || !seg_found_q) begin
            if (lower) begin
              seg_q       <= cmp_shift - 2'd1;
              seg_found_q <= 1'b1;
            end else if (cmp_shift == 2'd3) begin
              seg_q       <= 2'd3;
              seg_found_q <= 1'b1;
            end else begin
              seg_found_q <= 1'b0;
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign y     = p;
  assign acc   = acc_q;
  assign ready = fr_fits | ~en;
  assign seg   = seg_q;

endmodule
