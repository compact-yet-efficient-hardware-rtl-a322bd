// frame_shifter: adaptive framing of a wide fraction into the 16/16-bit format.
//
// A product or sum of two fractions yields a numerator and a denominator that
// are wider than 16 bits. Loading them here starts a sequence of joint one-bit
// right shifts of both, one per clock (the fast clock Clk2), until neither has
// a set bit above bit 15. The sign is carried through unchanged. If a shift
// leaves the denominator zero, the result saturates to 65535/1, the largest
// magnitude the format holds. This is the framing algorithm of the design
// (shift until it fits, saturate on a zero denominator); the register widths,
// the load port and the 'fits' flag are this implementation's choices.
//
// Interface: 'load' captures num_in/den_in/sign_in (den_in is the magnitude).
// 'fits' is the NOR of the upper bits of both registers: while it is low the
// registers shift every clock; once high, 'frac_out' holds the framed result.
// Timing: a value needing k shifts has fits high k clocks after the load.
module frame_shifter
  import ffp_pkg::*;
#(
  parameter int unsigned NUM_IN_W = 33,
  parameter int unsigned DEN_IN_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [NUM_IN_W-1:0] num_in,
  input  logic [DEN_IN_W-1:0] den_in,
  input  logic                sign_in,
  output frac_t               frac_out,
  output logic                fits
);

  logic [NUM_IN_W-1:0] num_q;
  logic [DEN_IN_W-1:0] den_q;
  logic                sign_q;
  logic [DEN_IN_W-1:0] den_sh;

  assign fits   = ~(|num_q[NUM_IN_W-1:NUM_W]) & ~(|den_q[DEN_IN_W-1:DEN_W]);
  assign den_sh = den_q >> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num_q  <= '0;
      den_q  <= DEN_IN_W'(1);
      sign_q <= 1'b0;
    end else if (load) begin
      num_q  <= num_in;
      den_q  <= den_in;
      sign_q <= sign_in;
    end else if (!fits) begin
      if (den_sh == '0) begin
        num_q <= NUM_IN_W'({NUM_W{1'b1}});
        den_q <= DEN_IN_W'(1);
      end else begin
        num_q <= num_q >> 1;
        den_q <= den_sh;
      end
    end
  end

  assign frac_out = '{num: num_q[NUM_W-1:0], sign: sign_q, den: den_q[DEN_W-1:0]};

endmodule
