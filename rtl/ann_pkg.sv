// ann_pkg: shared fixed-point configuration of the neural network.
//
// All data in the network is signed two's-complement fixed point with
// DATA_W bits, FRAC_W of them fractional (Q8.8 by default, so 1.0 = 256).
// The neuron accumulates in ACC_W bits, in the same fractional format, and
// saturates to DATA_W bits before the activation function.
//
// The package also holds the activation-function selector, a saturation
// helper, a real-to-fixed conversion for testbenches and the formula that
// produces the default weights and biases.
//
// Following the source design, one configuration file fixes the integer and
// fractional sizes for every component and the data width sits in the
// 8..16-bit range. The exact split, the accumulator width and the weight
// formula are this design's own choices: the source gives no trained
// weights, so default_weight()/default_bias() are deterministic stand-ins
// in the range -0.5 .. +0.4375 that a user replaces with trained values.
package ann_pkg;

  localparam int DATA_W = 16;
  localparam int FRAC_W = 8;
  localparam int ACC_W  = 32;

  typedef logic signed [DATA_W-1:0] fix_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Activation function, chosen at elaboration time.
  typedef enum logic [1:0] {
    ACT_RELU      = 2'd0,
    ACT_THRESHOLD = 2'd1,
    ACT_TANH      = 2'd2,
    ACT_SIGMOID   = 2'd3
  } act_t;

  // Largest layer and deepest network supported by the weight tables.
  localparam int MAX_N      = 16;
  localparam int MAX_LAYERS = 8;

  // Weight table: [layer][neuron][input]; bias table: [layer][neuron].
  // Packed, so that a constant function can build the defaults.
  typedef fix_t [MAX_LAYERS-1:0][MAX_N-1:0][MAX_N-1:0] wtab_t;
  typedef fix_t [MAX_LAYERS-1:0][MAX_N-1:0]            btab_t;

  // Clamp an accumulator value into the DATA_W range.
  function automatic fix_t sat_fix(input acc_t a);
    if (a > acc_t'(2**(DATA_W-1) - 1))
      return fix_t'(2**(DATA_W-1) - 1);
    else if (a < -acc_t'(2**(DATA_W-1)))
      return fix_t'(-(2**(DATA_W-1)));
    else
      return fix_t'(a);
  endfunction

  // Real number to fixed point, rounded to nearest and saturated.
  // Used for constants and by testbenches; not meant for synthesis.
  function automatic fix_t to_fix(input real r);
    real s;
    s = r * real'(1 << FRAC_W);
    if (s >= 0.0) s = s + 0.5;
    else          s = s - 0.5;
    if (s > real'(2**(DATA_W-1) - 1)) return fix_t'(2**(DATA_W-1) - 1);
    if (s < -real'(2**(DATA_W-1)))    return fix_t'(-(2**(DATA_W-1)));
    return fix_t'($rtoi(s));
  endfunction

  // Fixed point to real.
  function automatic real to_real(input fix_t f);
    return real'(f) / real'(1 << FRAC_W);
  endfunction

  // Default weight of input i of neuron n in layer l:
  // ((5l + 3n + 7i + 1) mod 16 - 8) / 16, i.e. -0.5 .. +0.4375 in 1/16 steps.
  function automatic fix_t default_weight(input int l, input int n, input int i);
    int k;
    k = (5*l + 3*n + 7*i + 1) % 16;
    return fix_t'((k - 8) * (1 << (FRAC_W - 4)));
  endfunction

  // Default bias of neuron n in layer l: ((3l + 5n + 2) mod 8 - 4) / 16.
  function automatic fix_t default_bias(input int l, input int n);
    int k;
    k = (3*l + 5*n + 2) % 8;
    return fix_t'((k - 4) * (1 << (FRAC_W - 4)));
  endfunction

  // Full tables of the default values.
  function automatic wtab_t default_wtab();
    wtab_t t;
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int n = 0; n < MAX_N; n++)
        for (int i = 0; i < MAX_N; i++)
          t[l][n][i] = default_weight(l, n, i);
    return t;
  endfunction

  function automatic btab_t default_btab();
    btab_t t;
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int n = 0; n < MAX_N; n++)
        t[l][n] = default_bias(l, n);
    return t;
  endfunction

endpackage
