// mlp_top: fraction-arithmetic multilayer-perceptron accelerator.
//
// Computes the forward pass of an MLP whose topology (number of inputs, of
// layers, of neurons per layer, bias per layer) is set at run time, up to
// IMAX inputs, NMAX neurons per layer and LMAX layers. All numbers are
// fractions of 16-bit integers (ffp_pkg::frac_t); the activation is the
// logistic sigmoid, computed from a piecewise-quadratic fit of exp(-v) on the
// same multiplier and adder that compute the weighted sums.
//
// It joins the load and control system (lcs: memories, topology registers,
// data-bus server) and the computing hardware (annch: one physical layer of
// NMAX neurons, reused for every network layer, plus its control unit and
// clock generator).
//
// Use: with host_we/host_sel/host_addr/host_wdata write the inputs, weights
// and biases, the nine sigmoid coefficients and the topology (see lcs.sv for
// the layouts), then pulse host_start for one clock. busy rises; when done
// rises, y[0..n-1] hold the outputs of the last layer. A new host_start runs
// the network again (for example on new inputs). In the design this host
// side is a processor on a point-to-point FIFO link; here it is a plain port.
module mlp_top
  import ffp_pkg::*;
#(
  parameter int unsigned IMAX = 220,
  parameter int unsigned NMAX = 24,
  parameter int unsigned LMAX = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_we,
  input  host_sel_t   host_sel,
  input  logic [15:0] host_addr,
  input  frac_t       host_wdata,
  input  logic        host_start,
  output frac_t       y [NMAX],
  output logic        busy,
  output logic        done
);

  localparam int unsigned JMAX = (IMAX > NMAX) ? IMAX : NMAX;
  localparam int unsigned JW   = $clog2(JMAX + 1);
  localparam int unsigned MW   = (NMAX > 1) ? $clog2(NMAX) : 1;
  localparam int unsigned LW   = (LMAX > 1) ? $clog2(LMAX) : 1;

  logic                      start;
  logic [$clog2(IMAX+1)-1:0] n_inputs;
  logic [$clog2(LMAX+1)-1:0] n_layers;
  logic [$clog2(NMAX+1)-1:0] layer_n [LMAX];
  logic [LMAX-1:0]           layer_bias;
  logic                      req_valid;
  req_kind_t                 req_kind;
  logic [LW-1:0]             req_layer;
  logic [JW-1:0]             req_j;
  logic                      req_bias;
  logic [MW-1:0]             req_m;
  logic [3:0]                req_coef;
  frac_t                     bus_data;
  logic                      bus_valid;

  lcs #(.IMAX(IMAX), .NMAX(NMAX), .LMAX(LMAX)) u_lcs (
    .clk        (clk),
    .rst_n      (rst_n),
    .host_we    (host_we),
    .host_sel   (host_sel),
    .host_addr  (host_addr),
    .host_wdata (host_wdata),
    .host_start (host_start),
    .start      (start),
    .n_inputs   (n_inputs),
    .n_layers   (n_layers),
    .layer_n    (layer_n),
    .layer_bias (layer_bias),
    .req_valid  (req_valid),
    .req_kind   (req_kind),
    .req_layer  (req_layer),
    .req_j      (req_j),
    .req_bias   (req_bias),
    .req_m      (req_m),
    .req_coef   (req_coef),
    .bus_data   (bus_data),
    .bus_valid  (bus_valid)
  );

  annch #(.IMAX(IMAX), .NMAX(NMAX), .LMAX(LMAX)) u_annch (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .n_inputs   (n_inputs),
    .n_layers   (n_layers),
    .layer_n    (layer_n),
    .layer_bias (layer_bias),
    .req_valid  (req_valid),
    .req_kind   (req_kind),
    .req_layer  (req_layer),
    .req_j      (req_j),
    .req_bias   (req_bias),
    .req_m      (req_m),
    .req_coef   (req_coef),
    .bus_data   (bus_data),
    .bus_valid  (bus_valid),
    .y          (y),
    .busy       (busy),
    .done       (done)
  );

endmodule
