// tb_ref_pkg: reference model of the network arithmetic for the testbenches.
//
// Written with plain integer arithmetic (floor division instead of shifts,
// explicit range tests instead of casts) so that it does not share code
// with the RTL. Values are Q8.8 integers held in int.
package tb_ref_pkg;
  import ann_pkg::*;

  localparam int ONE  = 256;
  localparam int DMAX = 32767;
  localparam int DMIN = -32768;

  // Mechanism counters, filled in by the model as it evaluates.
  int n_sat_hi, n_sat_lo;      // accumulator clamped at the top / bottom
  int n_seg[4];                // sigmoid segments hit: a<1, <2.375, <5, >=5
  int n_neg_act, n_pos_act;    // activation inputs below zero / at or above

  function automatic int floor_div(input longint p, input longint d);
    if (p >= 0) return int'(p / d);
    return int'(-((-p + d - 1) / d));
  endfunction

  function automatic int clamp(input longint a);
    if (a > longint'(DMAX)) begin n_sat_hi++; return DMAX; end
    if (a < longint'(DMIN)) begin n_sat_lo++; return DMIN; end
    return int'(a);
  endfunction

  // Piecewise-linear sigmoid of a >= 0 (Q8.8 integers).
  function automatic int sig_pos(input int a);
    if (a >= 5 * ONE)            begin n_seg[3]++; return ONE; end
    if (a * 8 >= 19 * ONE)       begin n_seg[2]++; return a / 32 + (27 * ONE) / 32; end
    if (a >= ONE)                begin n_seg[1]++; return a / 8 + (5 * ONE) / 8; end
    n_seg[0]++;
    return a / 4 + ONE / 2;
  endfunction

  function automatic int act(input act_t f, input int x);
    int a, a2, t;
    if (x < 0) n_neg_act++; else n_pos_act++;
    a  = (x < 0) ? ((-x > DMAX) ? DMAX : -x) : x;
    a2 = (2 * a > DMAX) ? DMAX : 2 * a;
    case (f)
      ACT_RELU:      return (x < 0) ? 0 : x;
      ACT_THRESHOLD: return (x < 0) ? 0 : ONE;
      ACT_SIGMOID:   return (x < 0) ? ONE - sig_pos(a) : sig_pos(a);
      default: begin
        t = 2 * sig_pos(a2) - ONE;
        return (x < 0) ? -t : t;
      end
    endcase
  endfunction

  // y = act(sat(b + sum floor(x_j * w_j / 256)))
  function automatic int neuron(input act_t f, input int x[], input int w[], input int b);
    longint acc;
    acc = longint'(b);
    for (int j = 0; j < x.size(); j++)
      acc += longint'(floor_div(longint'(x[j]) * longint'(w[j]), longint'(ONE)));
    return act(f, clamp(acc));
  endfunction

  // Whole network with the package's default weights; returns the last layer.
  function automatic void network(input act_t f, input int layer_n[], input int x[],
                                  output int y[]);
    int cur[], nxt[], w[];
    cur = x;
    for (int l = 0; l < layer_n.size(); l++) begin
      nxt = new[layer_n[l]];
      w = new[cur.size()];
      for (int n = 0; n < layer_n[l]; n++) begin
        for (int i = 0; i < cur.size(); i++) w[i] = int'(default_weight(l, n, i));
        nxt[n] = neuron(f, cur, w, int'(default_bias(l, n)));
      end
      cur = nxt;
    end
    y = cur;
  endfunction

endpackage
