// lcs: load and control system of the accelerator.
//
// Holds everything a network application needs and serves it to the
// computing hardware over the 33-bit data bus:
//   * input memory, IMAX fractions (network inputs x_j);
//   * weight and bias memory, (IMAX+1)*NMAX + NMAX*(NMAX+1)*(LMAX-1) words:
//     layer 0 has IMAX+1 rows of NMAX words (row IMAX holds the biases), every
//     later layer NMAX+1 rows of NMAX words (row NMAX holds the biases). Word
//     (layer l, row j, neuron m) is at base(l) + j*NMAX + m, with base(0) = 0
//     and base(l) = (IMAX+1)*NMAX + (l-1)*(NMAX+1)*NMAX;
//   * sigmoid memory, nine coefficients: word 3*s+k is coefficient k (0: v^2,
//     1: v, 2: constant) of the polynomial for exp(-v) on segment s (s = 0..2
//     for [0,2), [2,4), [4,8)); segment 3 ([8,inf)) reads as 0/1;
//   * topology registers: number of inputs, number of layers, and per layer
//     the number of neurons and whether it uses a bias. A host writes a count
//     in bits 15..0 of the data word and a layer's bias flag in bit 16.
// A host writes all of these through the host port and pulses host_start; the
// LCS then triggers the control unit (start). The control unit asks for words
// with req_valid/req_kind and the index fields; the word appears on bus_data
// with bus_valid one clock later (synchronous memory read). One request can be
// taken every clock.
//
// Follows the design: three memories (inputs, weights and biases, sigmoid
// coefficients), the weight memory size formula, the topology parameters, and
// the LCS as bus master answering the control unit's requests. The memory
// layout, the request encoding and the host port are this implementation's
// choices.
module lcs
  import ffp_pkg::*;
#(
  parameter int unsigned IMAX = 220,
  parameter int unsigned NMAX = 24,
  parameter int unsigned LMAX = 7,
  localparam int unsigned JMAX    = (IMAX > NMAX) ? IMAX : NMAX,
  localparam int unsigned JW      = $clog2(JMAX + 1),
  localparam int unsigned W_DEPTH = (IMAX + 1) * NMAX + NMAX * (NMAX + 1) * (LMAX - 1),
  localparam int unsigned WAW     = $clog2(W_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host port
  input  logic                      host_we,
  input  host_sel_t                 host_sel,
  input  logic [15:0]               host_addr,
  input  frac_t                     host_wdata,
  input  logic                      host_start,
  // control bus to the control unit
  output logic                      start,
  output logic [$clog2(IMAX+1)-1:0] n_inputs,
  output logic [$clog2(LMAX+1)-1:0] n_layers,
  output logic [$clog2(NMAX+1)-1:0] layer_n    [LMAX],
  output logic [LMAX-1:0]           layer_bias,
  input  logic                      req_valid,
  input  req_kind_t                 req_kind,
  input  logic [$clog2(LMAX)-1:0]   req_layer,
  input  logic [JW-1:0]             req_j,
  input  logic                      req_bias,
  input  logic [$clog2(NMAX)-1:0]   req_m,
  input  logic [3:0]                req_coef,
  // data bus
  output frac_t                     bus_data,
  output logic                      bus_valid
);

  frac_t in_mem   [IMAX];
  frac_t w_mem    [W_DEPTH];
  frac_t coef_mem [N_COEF];

  // ---------------- host writes --------------------------------------------
  always_ff @(posedge clk) begin
    if (host_we) begin
      unique case (host_sel)
        H_INPUT:  if (32'(host_addr) < IMAX)    in_mem[host_addr[$clog2(IMAX)-1:0]] <= host_wdata;
        H_WEIGHT: if (32'(host_addr) < W_DEPTH) w_mem[host_addr[WAW-1:0]] <= host_wdata;
        H_COEF:   if (32'(host_addr) < N_COEF)  coef_mem[host_addr[3:0]] <= host_wdata;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_inputs   <= '0;
      n_layers   <= '0;
      layer_bias <= '0;
      for (int l = 0; l < int'(LMAX); l++) layer_n[l] <= '0;
      start      <= 1'b0;
    end else begin
      start <= host_start;
      if (host_we && host_sel == H_NET) begin
        if (host_addr == 16'd0) n_inputs <= host_wdata[$bits(n_inputs)-1:0];
        if (host_addr == 16'd1) n_layers <= host_wdata[$bits(n_layers)-1:0];
      end
      if (host_we && host_sel == H_LAYER && 32'(host_addr) < LMAX) begin
        layer_n[host_addr[$clog2(LMAX+1)-1:0]]    <= host_wdata[$bits(layer_n[0])-1:0];
        layer_bias[host_addr[$clog2(LMAX+1)-1:0]] <= host_wdata[16];
      end
    end
  end

  // ---------------- request decoding and synchronous read ------------------
  logic [WAW-1:0] w_addr;
  logic [JW-1:0]  row;

  always_comb begin
    row = req_bias ? ((req_layer == '0) ? JW'(IMAX) : JW'(NMAX)) : req_j;
    if (req_layer == '0)
      w_addr = WAW'(row) * WAW'(NMAX) + WAW'(req_m);
    else
      w_addr = WAW'((IMAX + 1) * NMAX)
             + WAW'(req_layer - 1'b1) * WAW'((NMAX + 1) * NMAX)
             + WAW'(row) * WAW'(NMAX) + WAW'(req_m);
  end

  always_ff @(posedge clk) begin
    if (req_valid) begin
      unique case (req_kind)
        REQ_X:    bus_data <= in_mem[req_j[$clog2(IMAX)-1:0]];
        REQ_W:    bus_data <= w_mem[w_addr];
        REQ_COEF: bus_data <= (req_coef < 4'(N_COEF)) ? coef_mem[req_coef] : FRAC_ZERO;
        default:  bus_data <= FRAC_ZERO;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_valid <= 1'b0;
    else        bus_valid <= req_valid;
  end

endmodule
