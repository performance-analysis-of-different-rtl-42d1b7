// tb_neuron: checks the sequential neuron against the reference model.
//
// Four neurons with different input counts and activation functions run side
// by side on random inputs, weights and biases (every eighth operation uses
// large values so the accumulator saturates). For each operation the test
// checks the output value, the latency of 2*N_IN + 3 cycles from the edge
// that samples start_i to done_o, that done_o lasts one cycle, that output_o
// holds afterwards, and that a start_i pulse during a computation is ignored.
module tb_neuron;
  import ann_pkg::*;

  localparam int NDUT = 4;
  localparam int NI[NDUT] = '{4, 3, 5, 2};
  localparam act_t AF[NDUT] = '{ACT_SIGMOID, ACT_RELU, ACT_TANH, ACT_THRESHOLD};
  localparam int MAXI = 5;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  fix_t [MAXI-1:0] x [NDUT];
  fix_t [MAXI-1:0] w [NDUT];
  fix_t            b [NDUT];
  fix_t            y [NDUT];
  logic [NDUT-1:0] done;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  neuron u0 (.clk, .rst, .start_i(start), .input_i(x[0][NI[0]-1:0]),
             .weight_i(w[0][NI[0]-1:0]), .bias_i(b[0]), .output_o(y[0]), .done_o(done[0]));
  neuron #(.N_IN(NI[1]), .ACT(AF[1])) u1 (.clk, .rst, .start_i(start),
             .input_i(x[1][NI[1]-1:0]), .weight_i(w[1][NI[1]-1:0]), .bias_i(b[1]),
             .output_o(y[1]), .done_o(done[1]));
  neuron #(.N_IN(NI[2]), .ACT(AF[2])) u2 (.clk, .rst, .start_i(start),
             .input_i(x[2][NI[2]-1:0]), .weight_i(w[2][NI[2]-1:0]), .bias_i(b[2]),
             .output_o(y[2]), .done_o(done[2]));
  neuron #(.N_IN(NI[3]), .ACT(AF[3])) u3 (.clk, .rst, .start_i(start),
             .input_i(x[3][NI[3]-1:0]), .weight_i(w[3][NI[3]-1:0]), .bias_i(b[3]),
             .output_o(y[3]), .done_o(done[3]));

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_y [NDUT];
  int done_at [NDUT];
  int start_at;
  int n_ignored = 0;

  initial begin
    foreach (x[d]) begin x[d] = '0; w[d] = '0; b[d] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int op = 0; op < 400; op++) begin
      // new operands, model results
      for (int d = 0; d < NDUT; d++) begin
        int xi[], wi[];
        xi = new[NI[d]];
        wi = new[NI[d]];
        for (int i = 0; i < MAXI; i++) begin
          x[d][i] = (op % 8 == 7) ? rnd(32000) : rnd(1024);
          w[d][i] = (op % 8 == 7) ? rnd(32000) : rnd(512);
        end
        b[d] = rnd(256);
        for (int i = 0; i < NI[d]; i++) begin
          xi[i] = int'(x[d][i]);
          wi[i] = int'(w[d][i]);
        end
        exp_y[d] = tb_ref_pkg::neuron(AF[d], xi, wi, int'(b[d]));
        done_at[d] = -1;
      end
      @(negedge clk) start = 1'b1;
      @(posedge clk); #1 start_at = cycle;
      @(negedge clk) start = 1'b0;
      // change the operands after they were registered, and pulse start
      // again mid-way: neither may affect the result
      @(negedge clk);
      for (int d = 0; d < NDUT; d++) begin
        x[d] = ~x[d];
        w[d] = ~w[d];
        b[d] = ~b[d];
      end
      @(negedge clk) start = (op % 2 == 1);
      if (op % 2 == 1) n_ignored++;
      @(negedge clk) start = 1'b0;
      // wait for all, recording when each finished
      while (done_at[0] < 0 || done_at[1] < 0 || done_at[2] < 0 || done_at[3] < 0) begin
        @(posedge clk); #1;
        for (int d = 0; d < NDUT; d++)
          if (done[d] && done_at[d] < 0) begin
            done_at[d] = cycle;
            check($sformatf("neuron %0d value (op %0d)", d, op), int'(y[d]), exp_y[d]);
            check($sformatf("neuron %0d latency", d), done_at[d] - start_at, 2 * NI[d] + 3);
          end
      end
      // done is a single pulse and the output is held
      @(posedge clk); #1;
      for (int d = 0; d < NDUT; d++) begin
        if (done_at[d] == cycle - 1) check("done one cycle", int'(done[d]), 0);
      end
      repeat (2) @(posedge clk);
      #1;
      for (int d = 0; d < NDUT; d++) check("output held", int'(y[d]), exp_y[d]);
    end
    check("saturation high seen", int'(tb_ref_pkg::n_sat_hi > 0), 1);
    check("saturation low seen",  int'(tb_ref_pkg::n_sat_lo > 0), 1);
    check("ignored starts seen",  int'(n_ignored > 0), 1);
    $display("accumulator saturations: %0d high, %0d low; starts ignored: %0d",
             tb_ref_pkg::n_sat_hi, tb_ref_pkg::n_sat_lo, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
