// tb_annch: the computing hardware (hardware layer, control unit, clock
// generator) with the load and control system replaced by a testbench model
// that answers each request one clock later from its own memory images.
// A 4-input network of 3 layers (3 neurons with bias, 2 without, 3 with) on a
// 3-neuron hardware layer is run on three random input sets; every output is
// compared bit-exactly with the reference network.
module tb_annch;
  import ffp_pkg::*;
  import ffp_ref_pkg::*;

  localparam int IMAX = 4, NMAX = 3, LMAX = 3;
  localparam int W_DEPTH = (IMAX + 1) * NMAX + NMAX * (NMAX + 1) * (LMAX - 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] n_inputs = 3'd4;
  logic [1:0] n_layers = 2'd3;
  logic [1:0] layer_n [LMAX] = '{2'd3, 2'd2, 2'd3};
  logic [LMAX-1:0] layer_bias = 3'b101;
  logic req_valid, req_bias;
  req_kind_t req_kind;
  logic [1:0] req_layer;
  logic [2:0] req_j;
  logic [1:0] req_m;
  logic [3:0] req_coef;
  frac_t bus_data = FRAC_ZERO;
  logic bus_valid = 0;
  frac_t y [NMAX];
  logic busy, done;
  int checks = 0, failures = 0;
  frac_t xin [$], wimg [$];

  annch #(.IMAX(IMAX), .NMAX(NMAX), .LMAX(LMAX)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    bus_valid <= rst_n && req_valid;
    if (req_valid) begin
      case (req_kind)
        REQ_X: bus_data <= xin[req_j];
        REQ_W: bus_data <= wimg[waddr(IMAX, NMAX, int'(req_layer),
                                      req_bias ? ((req_layer == 0) ? IMAX : NMAX) : int'(req_j),
                                      int'(req_m))];
        default: bus_data <= sig_coef(int'(req_coef));
      endcase
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frac_t out[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < W_DEPTH; i++)
      wimg.push_back(mkf($urandom_range(3000, 0), $urandom_range(1500, 300), 1'($urandom_range(1, 0))));
    for (int run = 0; run < 3; run++) begin
      xin = {};
      for (int i = 0; i < IMAX; i++) xin.push_back(mkf($urandom_range(2000, 0), $urandom_range(1000, 1), 1'($urandom_range(1, 0))));
      ref_network(IMAX, NMAX, 4, 3, '{3, 2, 3}, '{1'b1, 1'b0, 1'b1}, xin, wimg, out);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (y[m] != out[m]) begin
          failures++;
          $display("FAIL run %0d y%0d = %0d/%0d want %0d/%0d", run, m, y[m].num, y[m].den, out[m].num, out[m].den);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
