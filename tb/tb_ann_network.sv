// tb_ann_network: end-to-end test of the network with each activation
// function.
//
// Five networks run side by side on the same input vectors: the default
// 4-input, {4, 4, 2} network once per activation function (ReLU, Threshold,
// Tanh, Sigmoid) and a deeper ReLU network of a different shape
// (3 inputs, layers {5, 3, 6, 1}) to exercise the parameterisation. Every
// result is compared with the reference model, and the latency with
//   sum over layers (2*m_l + 3) + (layers - 1).
// The test counts, and requires at least once each: layer hand-overs,
// start_i pulses ignored while busy, a start accepted in the done cycle,
// accumulator saturation,
// negative and non-negative activation inputs, and all four segments of
// the piecewise-linear sigmoid.
module tb_ann_network;
  import ann_pkg::*;

  localparam int NIN = 4;
  localparam int NOUT = 2;
  localparam int NIN_D = 3;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  fix_t [NIN-1:0]  x;
  fix_t [NOUT-1:0] y_relu, y_thr, y_tanh, y_sig;
  fix_t [0:0]      y_deep;
  logic d_relu, d_thr, d_tanh, d_sig, d_deep;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  ann_network #(.ACT(ACT_RELU)) u_relu (.clk, .rst, .start_i(start), .input_i(x),
                                        .output_o(y_relu), .done_o(d_relu));
  ann_network #(.ACT(ACT_THRESHOLD)) u_thr (.clk, .rst, .start_i(start), .input_i(x),
                                            .output_o(y_thr), .done_o(d_thr));
  ann_network #(.ACT(ACT_TANH)) u_tanh (.clk, .rst, .start_i(start), .input_i(x),
                                        .output_o(y_tanh), .done_o(d_tanh));
  ann_network #(.ACT(ACT_SIGMOID)) u_sig (.clk, .rst, .start_i(start), .input_i(x),
                                          .output_o(y_sig), .done_o(d_sig));
  ann_network #(.N_IN(NIN_D), .N_LAYERS(4), .LAYER_N('{5, 3, 6, 1, 0, 0, 0, 0}), .ACT(ACT_RELU))
    u_deep (.clk, .rst, .start_i(start), .input_i(x[NIN_D-1:0]),
            .output_o(y_deep), .done_o(d_deep));

  // Layer hand-overs seen inside the default sigmoid network
  int n_handover = 0;
  always @(posedge clk) if (!rst) n_handover += $countones(u_sig.layer_start[2:1]);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d expected=%0d", what, got, exp);
    end
  endtask

  function automatic fix_t rnd(input int range);
    return fix_t'(int'($urandom_range(2 * range - 1)) - range);
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LAT_STD  = 3 * (2 * 4 + 3) + 2;              // 35
  localparam int LAT_DEEP = (2*3+3) + (2*5+3) + (2*3+3) + (2*6+3) + 3;  // 49

  int n_ignored = 0;
  int n_b2b = 0;

  initial begin
    int xi[], xd[], e_relu[], e_thr[], e_tanh[], e_sig[], e_deep[];
    int start_at, t_std, t_deep;
    x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int op = 0; op < 300; op++) begin
      xi = new[NIN];
      for (int i = 0; i < NIN; i++) begin
        case (op % 6)
          // full-scale input lined up with the weights of one first-layer
          // neuron, so that its accumulator saturates
          4: x[i] = ((default_weight(0, (op / 6) % 4, i) < 0) ^ ((op / 24) % 2 == 1))
                    ? fix_t'(-32768) : fix_t'(32767);
          5:       x[i] = rnd(6000);
          default: x[i] = rnd(1536);   // -6.0 .. +6.0
        endcase
        xi[i] = int'(x[i]);
      end
      xd = new[NIN_D];
      for (int i = 0; i < NIN_D; i++) xd[i] = xi[i];
      tb_ref_pkg::network(ACT_RELU,      '{4, 4, 2}, xi, e_relu);
      tb_ref_pkg::network(ACT_THRESHOLD, '{4, 4, 2}, xi, e_thr);
      tb_ref_pkg::network(ACT_TANH,      '{4, 4, 2}, xi, e_tanh);
      tb_ref_pkg::network(ACT_SIGMOID,   '{4, 4, 2}, xi, e_sig);
      tb_ref_pkg::network(ACT_RELU,      '{5, 3, 6, 1}, xd, e_deep);

      @(negedge clk) start = 1'b1;
      @(posedge clk); #1 start_at = cycle;
      @(negedge clk) start = 1'b0;
      // scramble the input and pulse start again while busy
      repeat (2) @(negedge clk);
      x = ~x;
      if (op % 3 != 0) begin
        repeat (op % 30) @(negedge clk);
        start = 1'b1;
        n_ignored++;
        @(negedge clk) start = 1'b0;
      end
      t_std = -1;
      t_deep = -1;
      while (t_std < 0 || t_deep < 0) begin
        @(posedge clk); #1;
        if (d_sig && t_std < 0) begin
          t_std = cycle - start_at;
          check("relu done together",      int'(d_relu), 1);
          check("threshold done together", int'(d_thr), 1);
          check("tanh done together",      int'(d_tanh), 1);
          for (int k = 0; k < NOUT; k++) begin
            check($sformatf("relu out %0d op %0d", k, op),      int'(y_relu[k]), e_relu[k]);
            check($sformatf("threshold out %0d op %0d", k, op), int'(y_thr[k]),  e_thr[k]);
            check($sformatf("tanh out %0d op %0d", k, op),      int'(y_tanh[k]), e_tanh[k]);
            check($sformatf("sigmoid out %0d op %0d", k, op),   int'(y_sig[k]),  e_sig[k]);
          end
          check("latency {4,4,2}", t_std, LAT_STD);
        end
        if (d_deep && t_deep < 0) begin
          t_deep = cycle - start_at;
          check($sformatf("deep out op %0d", op), int'(y_deep[0]), e_deep[0]);
          check("latency {5,3,6,1}", t_deep, LAT_DEEP);
        end
      end
      if (op % 4 == 2) begin
        n_b2b++;   // next start lands in the deep network's done cycle
      end else begin
        repeat (2) @(posedge clk);
        #1;
        check("done low afterwards", (d_sig || d_deep) ? 1 : 0, 0);
        check("output held", int'(y_sig[0]), e_sig[0]);
      end
    end

    $display("hand-overs %0d, ignored starts %0d, saturations %0d/%0d, act inputs neg %0d pos %0d",
             n_handover, n_ignored, tb_ref_pkg::n_sat_hi, tb_ref_pkg::n_sat_lo,
             tb_ref_pkg::n_neg_act, tb_ref_pkg::n_pos_act);
    $display("back-to-back starts %0d", n_b2b);
    $display("sigmoid segments %0d %0d %0d %0d", tb_ref_pkg::n_seg[0], tb_ref_pkg::n_seg[1],
             tb_ref_pkg::n_seg[2], tb_ref_pkg::n_seg[3]);
    check("layer hand-overs happened", int'(n_handover == 2 * 300), 1);
    check("ignored starts happened",   int'(n_ignored > 0), 1);
    check("back-to-back starts happened", int'(n_b2b > 0), 1);
    // (the default weights are too small for the top end to be reachable;
    // the neuron test covers both ends)
    check("accumulator saturation happened",
          int'(tb_ref_pkg::n_sat_hi + tb_ref_pkg::n_sat_lo > 0), 1);
    check("negative act inputs",       int'(tb_ref_pkg::n_neg_act > 0), 1);
    check("non-negative act inputs",   int'(tb_ref_pkg::n_pos_act > 0), 1);
    for (int s = 0; s < 4; s++)
      check($sformatf("sigmoid segment %0d used", s), int'(tb_ref_pkg::n_seg[s] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
