// act_func: the neuron activation function phi, chosen by the ACT parameter.
//
// Combinational. Input and output are signed fixed point with WIDTH bits,
// FRAC of them fractional (Q8.8 by default).
//
//   ACT_RELU       y = max(0, x)
//   ACT_THRESHOLD  y = 1.0 if x >= 0, else 0
//   ACT_SIGMOID    y = 1 / (1 + e^-x), piecewise linear (see below)
//   ACT_TANH       y = 2 * sigmoid(2x) - 1, with the same sigmoid
//
// The four functions and the fact that one of them is selected per network
// build follow the source design. How each is computed is this design's own
// choice. The sigmoid uses a multiplier-free piecewise-linear approximation
// on a = |x|:
//
//   a >= 5          s = 1
//   2.375 <= a < 5  s = a/32 + 0.84375
//   1 <= a < 2.375  s = a/8  + 0.625
//   a < 1           s = a/4  + 0.5
//
// and sigmoid(x) = 1 - s for negative x. Its error against the exact
// function stays below about 0.02 (0.04 for tanh). All divisions are right
// shifts; the segment constants need FRAC >= 5.
module act_func
  import ann_pkg::*;
#(
  parameter act_t ACT    = ACT_SIGMOID,
  parameter int   WIDTH  = ann_pkg::DATA_W,
  parameter int   FRAC   = ann_pkg::FRAC_W
) (
  input  logic signed [WIDTH-1:0] x_i,
  output logic signed [WIDTH-1:0] y_o
);

  localparam int UW = WIDTH + 1;  // unsigned magnitude width with headroom
  typedef logic [UW-1:0] mag_t;

  localparam mag_t ONE     = mag_t'(1) << FRAC;
  localparam mag_t MAXMAG  = mag_t'(2**(WIDTH-1) - 1);
  localparam mag_t BRK_5   = mag_t'(5)  << FRAC;        // 5.0
  localparam mag_t BRK_238 = mag_t'(19) << (FRAC - 3);  // 2.375
  localparam mag_t OFS_843 = mag_t'(27) << (FRAC - 5);  // 0.84375
  localparam mag_t OFS_625 = mag_t'(5)  << (FRAC - 3);  // 0.625
  localparam mag_t OFS_500 = mag_t'(1)  << (FRAC - 1);  // 0.5

  // Sigmoid of a non-negative magnitude, result in 0.5 .. 1.0.
  function automatic mag_t sig_pos(input mag_t a);
    if (a >= BRK_5)        return ONE;
    else if (a >= BRK_238) return (a >> 5) + OFS_843;
    else if (a >= ONE)     return (a >> 3) + OFS_625;
    else                   return (a >> 2) + OFS_500;
  endfunction

  logic neg;
  mag_t mag, mag2, s, s2;
  logic [WIDTH-1:0] t;

  always_comb begin
    neg = x_i[WIDTH-1];
    // |x|, with the most negative value clamped to the most positive one
    if (neg) mag = (mag_t'(-x_i) > MAXMAG) ? MAXMAG : mag_t'(-x_i);
    else     mag = mag_t'(x_i);
    // |2x| for tanh, saturated to the data range
    mag2 = ((mag << 1) > MAXMAG) ? MAXMAG : (mag << 1);
    s  = sig_pos(mag);
    s2 = sig_pos(mag2);
    t  = WIDTH'((s2 << 1) - ONE);                 // tanh(|x|) in 0 .. 1.0

    unique case (ACT)
      ACT_RELU:      y_o = neg ? '0 : x_i;
      ACT_THRESHOLD: y_o = neg ? '0 : WIDTH'(ONE);
      ACT_SIGMOID:   y_o = neg ? WIDTH'(ONE - s) : WIDTH'(s);
      ACT_TANH:      y_o = neg ? -t : t;
      default:       y_o = '0;
    endcase
  end

  initial assert (FRAC >= 5 && FRAC <= WIDTH - 4)
    else $error("act_func: FRAC must be between 5 and WIDTH-4");

endmodule
