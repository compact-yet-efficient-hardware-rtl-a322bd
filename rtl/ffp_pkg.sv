// ffp_pkg: types and constants shared by the fraction-based MLP accelerator.
//
// A real number is held as a fraction of two integers, N/D, in one 33-bit
// word (frac_t): bits 32..17 hold the 16-bit natural numerator N, bit 16 holds
// the sign of the whole fraction, and bits 15..0 hold the 16-bit magnitude of
// the denominator D. The value is (-1)^sign * N / D. The largest magnitude is
// 65535/1; zero is written 0/1. This layout follows the fraction format the
// design is built around; the encodings of the micro-operations, the data-bus
// request kinds and the host-port targets below are this implementation's own.
package ffp_pkg;

  localparam int unsigned NUM_W  = 16;
  localparam int unsigned DEN_W  = 16;
  localparam int unsigned FRAC_W = 33;

  typedef struct packed {
    logic [NUM_W-1:0] num;   // bits 32..17
    logic             sign;  // bit 16
    logic [DEN_W-1:0] den;   // bits 15..0
  } frac_t;

  localparam frac_t FRAC_ZERO = '{num: 16'd0, sign: 1'b0, den: 16'd1};
  localparam frac_t FRAC_ONE  = '{num: 16'd1, sign: 1'b0, den: 16'd1};

  // Micro-operations the control unit broadcasts to every hardware neuron.
  // One is issued per Clk1 period.
  typedef enum logic [3:0] {
    N_NOP        = 4'd0,
    N_ACC_CLR    = 4'd1,   // accumulator <= 0/1
    N_LOAD_XW    = 4'd2,   // Reg1 <= x, Reg2/Reg3 <= w (weighted-sum term)
    N_LOAD_V     = 4'd3,   // Reg1 <= |accumulator|, remember its sign
    N_LOAD_W     = 4'd4,   // Reg2/Reg3 <= w
    N_LOAD_B_ACC = 4'd5,   // Reg2/Reg3 <= accumulator
    N_ACC_LOAD   = 4'd6,   // accumulator <= r
    N_MUL_N      = 4'd7,   // T1 <= Reg1.N * Reg2
    N_MUL_D      = 4'd8,   // frame (T1 / Reg1.D * Reg3.D): product P
    N_SUM_1      = 4'd9,   // T1 <= Acc.N * P.D
    N_SUM_2      = 4'd10,  // T2 <= P.N * Acc.D
    N_SUM_3      = 4'd11,  // frame ((T1 +/- T2) / Acc.D * P.D): sum
    N_ACC_WB     = 4'd12,  // accumulator <= framed sum
    N_CMP        = 4'd13,  // polynomial range test: (Acc.N >> s) < Acc.D
    N_SIG        = 4'd14   // frame the sigmoid D/(D+N) or N/(D+N)
  } neuron_op_t;

  // Kinds of word the control unit asks the load and control system for.
  typedef enum logic [1:0] {
    REQ_X    = 2'd0,   // network input x_j
    REQ_W    = 2'd1,   // weight (or bias) of one neuron
    REQ_COEF = 2'd2    // sigmoid polynomial coefficient
  } req_kind_t;

  // Source of the input word broadcast to all neurons.
  typedef enum logic [1:0] {
    X_BUS      = 2'd0,  // data bus (first layer)
    X_FEEDBACK = 2'd1,  // Regy of the previous layer
    X_ONE      = 2'd2   // constant 1/1 multiplying the bias
  } x_src_t;

  // Targets of the host write port.
  typedef enum logic [2:0] {
    H_INPUT  = 3'd0,   // input memory, word addr
    H_WEIGHT = 3'd1,   // weight and bias memory, word addr
    H_COEF   = 3'd2,   // sigmoid coefficient memory, word addr (0..8)
    H_NET    = 3'd3,   // addr 0: inputs, addr 1: layers; count in data[15:0]
    H_LAYER  = 3'd4    // addr = layer: data[15:0] neurons, data[16] bias on
  } host_sel_t;

  // Number of polynomial coefficients held by the sigmoid memory.
  localparam int unsigned N_COEF = 9;

endpackage
