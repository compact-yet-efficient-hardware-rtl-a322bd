// annalu: the physical neuron layer (hardware layer) of the accelerator.
//
// NMAX identical neurons work in lockstep on one broadcast micro-operation.
// Only the first active_n of them are switched on for the current network
// layer. Around them sit:
//   * x_q, the input word broadcast to all neurons. It is loaded (x_load) from
//     the 33-bit data bus for the first layer, from Regy[x_idx] (the previous
//     layer's outputs fed back) for later layers, or with the constant 1/1
//     that multiplies the bias.
//   * Regw[m], one per neuron, written from the data bus (regw_we, regw_idx)
//     with the neuron's weight or polynomial coefficient for the next step, so
//     that loading overlaps the current arithmetic. Regw[m] drives both the
//     neuron's w and r inputs.
//   * Regy[m], one per neuron, capturing the neuron's framed sigmoid output on
//     regy_capture. Regy drives the y outputs and the feedback path.
// ready_all is high when every active neuron has finished framing.
//
// Follows the design: a single hardware layer reused for all network layers,
// per-neuron weight registers loaded from the data bus, output registers fed
// back through a multiplexer as the next layer's inputs, and a shared input
// broadcast. The explicit broadcast register x_q and the X_ONE source are this
// implementation's choices.
module annalu
  import ffp_pkg::*;
#(
  parameter int unsigned NMAX = 24
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // micro-operation broadcast
  input  logic                      op_valid,
  input  neuron_op_t                op,
  input  logic [1:0]                cmp_shift,
  input  logic [$clog2(NMAX+1)-1:0] active_n,
  // input broadcast register
  input  logic                      x_load,
  input  x_src_t                    x_src,
  input  logic [$clog2(NMAX)-1:0]   x_idx,
  // data bus and Regw
  input  frac_t                     bus_data,
  input  logic                      regw_we,
  input  logic [$clog2(NMAX)-1:0]   regw_idx,
  // Regy
  input  logic                      regy_capture,
  output frac_t                     y     [NMAX],
  output logic                      ready_all,
  output logic [1:0]                seg   [NMAX],
  output logic [NMAX-1:0]           lower
);

  frac_t             x_q;
  frac_t             regw_q [NMAX];
  frac_t             regy_q [NMAX];
  frac_t             n_y    [NMAX];
  logic [NMAX-1:0]   n_ready;
  logic [NMAX-1:0]   n_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= FRAC_ZERO;
    end else if (x_load) begin
      unique case (x_src)
        X_BUS:      x_q <= bus_data;
        X_FEEDBACK: x_q <= regy_q[x_idx];
        default:    x_q <= FRAC_ONE;
      endcase
    end
  end

  for (genvar m = 0; m < NMAX; m++) begin : g_neuron
    assign n_en[m] = (m < int'(active_n));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        regw_q[m] <= FRAC_ZERO;
        regy_q[m] <= FRAC_ZERO;
      end else begin
        if (regw_we && regw_idx == $bits(regw_idx)'(m)) regw_q[m] <= bus_data;
        if (regy_capture && n_en[m])                    regy_q[m] <= n_y[m];
      end
    end

    neuron u_neuron (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (n_en[m]),
      .op_valid  (op_valid),
      .op        (op),
      .cmp_shift (cmp_shift),
      .x_in      (x_q),
      .w_in      (regw_q[m]),
      .r_in      (regw_q[m]),
      .y         (n_y[m]),
      .acc       (),
      .ready     (n_ready[m]),
      .lower     (lower[m]),
      .seg       (seg[m])
    );

    assign y[m] = regy_q[m];
  end

  assign ready_all = &n_ready;

endmodule
