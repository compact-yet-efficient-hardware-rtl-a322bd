// annch: ANN computing hardware, the part of the accelerator that computes.
//
// Groups the hardware layer (annalu), its control unit (anncu) and the clock
// generator (clock_gen). It talks to the load and control system over a
// control bus (start, topology registers, word requests) and receives words
// on the 33-bit data bus. The outputs y[m] are the Regy registers of the
// hardware layer; after done rises, y[0..n-1] hold the outputs of the last
// network layer, n being that layer's neuron count.
//
// Follows the design's partition of the computing hardware into arithmetic
// unit, control unit and clock generator. One clock, clk, runs at the Clk2
// rate; the Clk1 rate is a clock enable from clock_gen (this implementation's
// choice).
module annch
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
  // control bus
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
  // data bus
  input  frac_t                     bus_data,
  input  logic                      bus_valid,
  // results
  output frac_t                     y          [NMAX],
  output logic                      busy,
  output logic                      done
);

  logic                      clk1, clk1_tick;
  logic                      op_valid;
  neuron_op_t                op;
  logic [1:0]                cmp_shift;
  logic [$clog2(NMAX+1)-1:0] active_n;
  logic                      x_load;
  x_src_t                    x_src;
  logic [MW-1:0]             x_idx;
  logic                      regw_we;
  logic [MW-1:0]             regw_idx;
  logic                      regy_capture;
  logic                      ready_all;
  logic [1:0]                seg [NMAX];
  logic [NMAX-1:0]           lower;
  logic [LW-1:0]             layer;

  clock_gen #(.RATIO(4)) u_clock_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .clk1      (clk1),
    .clk1_tick (clk1_tick)
  );

  anncu #(.IMAX(IMAX), .NMAX(NMAX), .LMAX(LMAX)) u_anncu (
    .clk          (clk),
    .rst_n        (rst_n),
    .clk1_tick    (clk1_tick),
    .start        (start),
    .n_inputs     (n_inputs),
    .n_layers     (n_layers),
    .layer_n      (layer_n),
    .layer_bias   (layer_bias),
    .req_valid    (req_valid),
    .req_kind     (req_kind),
    .req_layer    (req_layer),
    .req_j        (req_j),
    .req_bias     (req_bias),
    .req_m        (req_m),
    .req_coef     (req_coef),
    .bus_valid    (bus_valid),
    .op_valid     (op_valid),
    .op           (op),
    .cmp_shift    (cmp_shift),
    .active_n     (active_n),
    .x_load       (x_load),
    .x_src        (x_src),
    .x_idx        (x_idx),
    .regw_we      (regw_we),
    .regw_idx     (regw_idx),
    .regy_capture (regy_capture),
    .ready_all    (ready_all),
    .seg          (seg),
    .busy         (busy),
    .done         (done),
    .layer        (layer)
  );

  annalu #(.NMAX(NMAX)) u_annalu (
    .clk          (clk),
    .rst_n        (rst_n),
    .op_valid     (op_valid),
    .op           (op),
    .cmp_shift    (cmp_shift),
    .active_n     (active_n),
    .x_load       (x_load),
    .x_src        (x_src),
    .x_idx        (x_idx),
    .bus_data     (bus_data),
    .regw_we      (regw_we),
    .regw_idx     (regw_idx),
    .regy_capture (regy_capture),
    .y            (y),
    .ready_all    (ready_all),
    .seg          (seg),
    .lower        (lower)
  );

endmodule
