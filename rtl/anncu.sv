// anncu: control unit of the ANN computing hardware.
//
// Two cooperating state machines sequence the hardware layer through every
// network layer:
//
// Primary FSM (steps on Clk1 ticks, and only once every active neuron has
// finished framing):
//   START -> LAYER (clear accumulators) -> for each input term j:
//     DI  (copy the staged x_j and weights into the neurons)
//     WSC (MUL_N, MUL_D, SUM_1, SUM_2, SUM_3, ACC_WB: acc += x_j * w_j)
//   then AFC, the sigmoid on the same datapath:
//     CMP s=1,2,3 (segment of |v|), LOAD_V (Reg1 <= |v|),
//     LOAD_A, MUL, LOAD_R(b), SUM, WB            acc = a|v| + b
//     LOAD_B_ACC, MUL, LOAD_R(c), SUM, WB        acc = (a|v| + b)|v| + c
//     SIG, CAPY (Regy <= sigmoid)
//   then LAYER again for the next network layer, or END. END waits for a new
//   start. A layer with its bias flag on has one more input term, the
//   constant 1/1 times the bias word.
//
// Secondary FSM LSW (steps every clock): stages the next operands while the
// primary FSM computes. An input job loads the broadcast register with x_j
// (data bus for layer 0, Regy[j] feedback for later layers, 1/1 for the bias
// term) and Regw[m] with the weight of neuron m, one bus request per clock. A
// coefficient job loads Regw[m] with coefficient k of the segment neuron m
// selected. The primary FSM starts a job as soon as it has consumed the
// previous one, so loading overlaps arithmetic.
//
// Follows the design: the primary FSM with Start, DI, WSC, AFC and End, the
// AFC -> DI loop over layers, and LSW loading synaptic weights in parallel
// with the weighted sum; the LCS supplies words on request. The detailed
// state sequences, the request protocol (one request per clock, data one clock
// later with bus_valid) and the use of LSW for coefficients too are this
// implementation's choices.
module anncu
  import ffp_pkg::*;
#(
  parameter int unsigned IMAX = 220,
  parameter int unsigned NMAX = 24,
  parameter int unsigned LMAX = 7,
  localparam int unsigned JMAX = (IMAX > NMAX) ? IMAX : NMAX,
  localparam int unsigned JW   = $clog2(JMAX + 1),
  localparam int unsigned MW   = (NMAX > 1) ? $clog2(NMAX) : 1,
  localparam int unsigned LW   = (LMAX > 1) ? $clog2(LMAX) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clk1_tick,
  // control bus from / to the LCS
  input  logic                      start,
  input  logic [$clog2(IMAX+1)-1:0] n_inputs,
  input  logic [$clog2(LMAX+1)-1:0] n_layers,
  input  logic [$clog2(NMAX+1)-1:0] layer_n    [LMAX],
  input  logic [LMAX-1:0]           layer_bias,
  output logic                      req_valid,
  output req_kind_t                 req_kind,
  output logic [LW-1:0]             req_layer,
  output logic [JW-1:0]             req_j,
  output logic                      req_bias,
  output logic [MW-1:0]             req_m,
  output logic [3:0]                req_coef,
  input  logic                      bus_valid,
  // control of the hardware layer
  output logic                      op_valid,
  output neuron_op_t                op,
  output logic [1:0]                cmp_shift,
  output logic [$clog2(NMAX+1)-1:0] active_n,
  output logic                      x_load,
  output x_src_t                    x_src,
  output logic [MW-1:0]             x_idx,
  output logic                      regw_we,
  output logic [MW-1:0]             regw_idx,
  output logic                      regy_capture,
  input  logic                      ready_all,
  input  logic [1:0]                seg        [NMAX],
  // status
  output logic                      busy,
  output logic                      done,
  output logic [LW-1:0]             layer
);

  typedef enum logic [4:0] {
    S_START, S_LAYER, S_DI, S_MULN, S_MULD, S_LOADR, S_SUM1, S_SUM2, S_SUM3,
    S_WB, S_CMP1, S_CMP2, S_CMP3, S_LOADV, S_LOADA, S_LOADBACC, S_SIG, S_CAPY,
    S_END
  } state_t;

  typedef enum logic [2:0] {
    L_IDLE, L_XREQ, L_WREQ, L_DRAIN, L_FULL
  } lsw_state_t;

  state_t      st_q, st_d;
  logic [LW-1:0] layer_q, layer_d;
  logic [JW-1:0] j_q, j_d;
  logic [1:0]    pass_q, pass_d;

  // LSW
  lsw_state_t  lsw_q;
  logic        lsw_coef_q;     // job kind: 1 = coefficient job
  logic [1:0]  lsw_k_q;        // coefficient index of a coefficient job
  logic [JW-1:0] lsw_j_q;      // input index of an input job
  logic [MW-1:0] lsw_m_q;      // neuron counter
  logic        resp_x_q;       // tag of the word arriving on the bus
  logic [MW-1:0] resp_m_q;

  logic        lsw_start, lsw_consume, lsw_start_coef;
  logic [1:0]  lsw_start_k;
  logic [JW-1:0] lsw_start_j;
  logic        lsw_full;

  // ---------------- current layer shape -----------------------------------
  logic [JW-1:0] n_in, n_terms;
  logic          bias_on;
  logic [$clog2(NMAX+1)-1:0] n_out;
  logic          can_tick;

  assign n_in     = (layer_q == '0) ? JW'(n_inputs) : JW'(layer_n[layer_q - 1'b1]);
  assign n_out    = layer_n[layer_q];
  assign bias_on  = layer_bias[layer_q];
  assign n_terms  = n_in + JW'(bias_on);
  assign active_n = (st_q == S_START || st_q == S_END) ? '0 : n_out;
  assign can_tick = clk1_tick & ready_all;
  assign lsw_full = (lsw_q == L_FULL);

  // ---------------- primary FSM -------------------------------------------
  always_comb begin
    st_d           = st_q;
    layer_d        = layer_q;
    j_d            = j_q;
    pass_d         = pass_q;
    op_valid       = 1'b0;
    op             = N_NOP;
    cmp_shift      = 2'd1;
    regy_capture   = 1'b0;
    lsw_start      = 1'b0;
    lsw_start_coef = 1'b0;
    lsw_start_k    = '0;
    lsw_start_j    = '0;
    lsw_consume    = 1'b0;

    unique case (st_q)
      S_START, S_END: begin
        if (start) begin
          layer_d = '0;
          st_d    = S_LAYER;
        end
      end
      S_LAYER: if (can_tick) begin
        op_valid    = 1'b1;
        op          = N_ACC_CLR;
        pass_d      = 2'd0;
        j_d         = '0;
        lsw_start   = 1'b1;
        lsw_start_j = '0;
        st_d        = S_DI;
      end
      S_DI: if (can_tick && lsw_full) begin
        op_valid    = 1'b1;
        op          = N_LOAD_XW;
        lsw_consume = 1'b1;
        if (j_q + 1'b1 < n_terms) begin
          lsw_start   = 1'b1;
          lsw_start_j = j_q + 1'b1;
        end
        st_d = S_MULN;
      end
      S_MULN: if (can_tick) begin
        op_valid = 1'b1;
        op       = N_MUL_N;
        st_d     = S_MULD;
      end
      S_MULD: if (can_tick) begin
        op_valid = 1'b1;
        op       = N_MUL_D;
        st_d     = (pass_q == 2'd0) ? S_SUM1 : S_LOADR;
      end
      S_LOADR: if (can_tick && lsw_full) begin
        op_valid    = 1'b1;
        op          = N_ACC_LOAD;
        lsw_consume = 1'b1;
        if (pass_q == 2'd1) begin
          lsw_start      = 1'b1;
          lsw_start_coef = 1'b1;
          lsw_start_k    = 2'd2;
        end
        st_d = S_SUM1;
      end
      S_SUM1: if (can_tick) begin
        op_valid = 1'b1;
        op       = N_SUM_1;
        st_d     = S_SUM2;
      end
      S_SUM2: if (can_tick) begin
        op_valid = 1'b1;
        op       = N_SUM_2;
        st_d     = S_SUM3;
      end
      S_SUM3: if (can_tick) begin
        op_valid = 1'b1;
        op       = N_SUM_3;
        st_d     = S_WB;
      end
      S_WB: if (can_tick) begin
        op_valid = 1'b1;
        op       = N_ACC_WB;
        unique case (pass_q)
          2'd0: begin
            if (j_q + 1'b1 < n_terms) begin
              j_d  = j_q + 1'b1;
              st_d = S_DI;
            end else begin
              st_d = S_CMP1;
            end
          end
          2'd1:    st_d = S_LOADBACC;
          default: st_d = S_SIG;
        endcase
      end
      S_CMP1: if (can_tick) begin
        op_valid  = 1'b1;
        op        = N_CMP;
        cmp_shift = 2'd1;
        st_d      = S_CMP2;
      end
      S_CMP2: if (can_tick) begin
        op_valid  = 1'b1;
        op        = N_CMP;
        cmp_shift = 2'd2;
        st_d      = S_CMP3;
      end
      S_CMP3: if (can_tick) begin
        op_valid  = 1'b1;
        op        = N_CMP;
        cmp_shift = 2'd3;
        st_d      = S_LOADV;
      end
      S_LOADV: if (can_tick) begin
        op_valid       = 1'b1;
        op             = N_LOAD_V;
        lsw_start      = 1'b1;
        lsw_start_coef = 1'b1;
        lsw_start_k    = 2'd0;
        st_d           = S_LOADA;
      end
      S_LOADA: if (can_tick && lsw_full) begin
        op_valid       = 1'b1;
        op             = N_LOAD_W;
        lsw_consume    = 1'b1;
        lsw_start      = 1'b1;
        lsw_start_coef = 1'b1;
        lsw_start_k    = 2'd1;
        pass_d         = 2'd1;
        st_d           = S_MULN;
      end
      S_LOADBACC: if (can_tick) begin
        op_valid = 1'b1;
        op       = N_LOAD_B_ACC;
        pass_d   = 2'd2;
        st_d     = S_MULN;
      end
      S_SIG: if (can_tick) begin
        op_valid = 1'b1;
        op       = N_SIG;
        st_d     = S_CAPY;
      end
      S_CAPY: if (can_tick) begin
        regy_capture = 1'b1;
        pass_d       = 2'd0;
        if (32'(layer_q) + 1 < 32'(n_layers)) begin
          layer_d = layer_q + 1'b1;
          st_d    = S_LAYER;
        end else begin
          st_d = S_END;
        end
      end
      default: st_d = S_START;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_START;
      layer_q <= '0;
      j_q     <= '0;
      pass_q  <= '0;
    end else begin
      st_q    <= st_d;
      layer_q <= layer_d;
      j_q     <= j_d;
      pass_q  <= pass_d;
    end
  end

  // ---------------- LSW: operand staging -----------------------------------
  logic last_m;
  assign last_m = (32'(lsw_m_q) + 1 >= 32'(n_out));

  always_comb begin
    req_valid = 1'b0;
    req_kind  = REQ_W;
    req_layer = layer_q;
    req_j     = lsw_j_q;
    req_bias  = bias_on && (lsw_j_q == n_in);
    req_m     = lsw_m_q;
    req_coef  = {seg[lsw_m_q], 2'b00} - {2'b00, seg[lsw_m_q]} + {2'b00, lsw_k_q};
    x_load    = 1'b0;
    x_src     = X_BUS;
    x_idx     = lsw_j_q[MW-1:0];

    unique case (lsw_q)
      L_XREQ: begin
        if (req_bias) begin
          x_load = 1'b1;
          x_src  = X_ONE;
        end else if (layer_q == '0) begin
          req_valid = 1'b1;
          req_kind  = REQ_X;
        end else begin
          x_load = 1'b1;
          x_src  = X_FEEDBACK;
        end
      end
      L_WREQ: begin
        req_valid = 1'b1;
        req_kind  = lsw_coef_q ? REQ_COEF : REQ_W;
      end
      default: ;
    endcase

    // a word arriving on the data bus
    if (bus_valid && resp_x_q) begin
      x_load = 1'b1;
      x_src  = X_BUS;
    end
  end

  assign regw_we  = bus_valid && !resp_x_q;
  assign regw_idx = resp_m_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lsw_q      <= L_IDLE;
      lsw_coef_q <= 1'b0;
      lsw_k_q    <= '0;
      lsw_j_q    <= '0;
      lsw_m_q    <= '0;
      resp_x_q   <= 1'b0;
      resp_m_q   <= '0;
    end else begin
      resp_x_q <= req_valid && (req_kind == REQ_X);
      resp_m_q <= lsw_m_q;
      if (lsw_start) begin
        lsw_coef_q <= lsw_start_coef;
        lsw_k_q    <= lsw_start_k;
        lsw_j_q    <= lsw_start_j;
        lsw_m_q    <= '0;
        lsw_q      <= lsw_start_coef ? L_WREQ : L_XREQ;
      end else begin
        unique case (lsw_q)
          L_XREQ:  lsw_q <= L_WREQ;
          L_WREQ: begin
            if (last_m) lsw_q   <= L_DRAIN;
            else        lsw_m_q <= lsw_m_q + 1'b1;
          end
          L_DRAIN: lsw_q <= L_FULL;
          L_FULL:  if (lsw_consume) lsw_q <= L_IDLE;
          default: ;
        endcase
      end
    end
  end

  // ---------------- status --------------------------------------------------
  assign busy  = (st_q != S_START) && (st_q != S_END);
  assign done  = (st_q == S_END);
  assign layer = layer_q;

  // Handshake rules between the two machines.
  property p_start_idle;
    @(posedge clk) disable iff (!rst_n)
      lsw_start |-> (lsw_q == L_IDLE || lsw_consume);
  endproperty
  a_start_idle: assert property (p_start_idle);

  property p_consume_full;
    @(posedge clk) disable iff (!rst_n)
      lsw_consume |-> lsw_full;
  endproperty
  a_consume_full: assert property (p_consume_full);

endmodule
