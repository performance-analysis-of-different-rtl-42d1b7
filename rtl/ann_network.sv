// ann_network: fully connected feed-forward neural network, evaluated one
// layer at a time.
//
// The network is N_LAYERS layers of neurons (module neuron). Layer 0 reads
// the network input input_i directly; every later layer reads all outputs of
// the layer before it; the outputs of the last layer are output_o. A layer is
// only an arrangement of neurons, not a component of its own: the neurons are
// instantiated here in a generate loop.
//
// Control: start_i starts all neurons of layer 0 at once. When every neuron
// of layer l has pulsed done, the AND of those pulses starts layer l+1, and
// the AND of the last layer's pulses is done_o. A busy flag ignores start_i
// while an inference runs; start_i is accepted again in the done_o cycle, so
// inferences can run back to back. Every neuron of a layer has the same number of
// inputs m, so a layer takes 2*m + 3 cycles and the whole inference
//   sum over layers (2*m_l + 3) + (N_LAYERS - 1)
// cycles from the edge that samples start_i to done_o (35 with the
// defaults). output_o holds its value until the next inference ends.
//
// Ports clk, rst, start_i, input_i, output_o and done_o, the hidden layers
// h1..hn and the choice of one activation function per build (ACT) follow
// the source design. The layer sizes (4 inputs, layers of 4, 4 and 2
// neurons), the layer hand-over and the busy flag are this design's own.
// Weights and biases are elaboration-time parameters W[layer][neuron][input]
// and B[layer][neuron] in Q8.8; their defaults come from the package's
// placeholder formula and are meant to be replaced by trained values.
module ann_network
  import ann_pkg::*;
#(
  parameter int    N_IN              = 4,
  parameter int    N_LAYERS          = 3,
  parameter int    LAYER_N[MAX_LAYERS] = '{4, 4, 2, 0, 0, 0, 0, 0},
  parameter act_t  ACT               = ACT_SIGMOID,
  parameter wtab_t W                 = default_wtab(),
  parameter btab_t B                 = default_btab()
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               start_i,
  input  fix_t [N_IN-1:0]                    input_i,
  output fix_t [LAYER_N[N_LAYERS-1]-1:0]     output_o,
  output logic                               done_o
);

  localparam int N_OUT = LAYER_N[N_LAYERS-1];

  // Outputs and done pulses of every neuron; unused slots are tied off.
  fix_t [MAX_N-1:0]    y    [N_LAYERS];
  logic [MAX_N-1:0]    done [N_LAYERS];
  logic [N_LAYERS-1:0] layer_start, layer_done;
  logic                busy, accept;

  // A new inference may start when idle, or in the cycle the previous one
  // reports done (the last layer has then finished with its inputs).
  assign accept = start_i && (!busy || done_o);

  always_ff @(posedge clk) begin
    if (rst)             busy <= 1'b0;
    else if (accept)     busy <= 1'b1;
    else if (done_o)     busy <= 1'b0;
  end

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    localparam int M = (l == 0) ? N_IN : LAYER_N[l-1];

    assign layer_done[l] = &done[l];
    if (l == 0) begin : g_first
      assign layer_start[l] = accept;
    end else begin : g_next
      assign layer_start[l] = layer_done[l-1];
    end

    for (genvar n = 0; n < MAX_N; n++) begin : g_neuron
      if (n < LAYER_N[l]) begin : g_used
        fix_t [M-1:0] x, w;
        for (genvar i = 0; i < M; i++) begin : g_in
          if (l == 0) begin : g_net_in
            assign x[i] = input_i[i];
          end else begin : g_prev
            assign x[i] = y[l-1][i];
          end
          assign w[i] = W[l][n][i];
        end

        neuron #(.N_IN(M), .ACT(ACT)) u_neuron (
          .clk      (clk),
          .rst      (rst),
          .start_i  (layer_start[l]),
          .input_i  (x),
          .weight_i (w),
          .bias_i   (B[l][n]),
          .output_o (y[l][n]),
          .done_o   (done[l][n])
        );
      end else begin : g_unused
        assign y[l][n]    = '0;
        assign done[l][n] = 1'b1;
      end
    end
  end

  assign done_o = layer_done[N_LAYERS-1];
  assign output_o = y[N_LAYERS-1][N_OUT-1:0];

  initial begin
    assert (N_LAYERS >= 1 && N_LAYERS <= MAX_LAYERS)
      else $error("ann_network: N_LAYERS out of range");
    assert (N_IN >= 1 && N_IN <= MAX_N)
      else $error("ann_network: N_IN out of range");
    for (int l = 0; l < N_LAYERS; l++)
      assert (LAYER_N[l] >= 1 && LAYER_N[l] <= MAX_N)
        else $error("ann_network: LAYER_N[%0d] out of range", l);
  end

endmodule
