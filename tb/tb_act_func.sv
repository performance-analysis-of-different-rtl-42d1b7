// tb_act_func: checks the four activation functions over the input range.
//
// One act_func instance per function. Inputs sweep the whole Q8.8 range in
// steps of 7 plus the segment boundaries and the extremes. Every output is
// compared bit for bit with the integer reference model, and Sigmoid and
// Tanh are also compared with the exact real-valued functions (error limits
// 0.025 and 0.05).
module tb_act_func;
  import ann_pkg::*;

  fix_t x;
  fix_t y_relu, y_thr, y_tanh, y_sig;
  int   checks = 0, failures = 0;

  act_func #(.ACT(ACT_RELU))      u_relu (.x_i(x), .y_o(y_relu));
  act_func #(.ACT(ACT_THRESHOLD)) u_thr  (.x_i(x), .y_o(y_thr));
  act_func #(.ACT(ACT_TANH))      u_tanh (.x_i(x), .y_o(y_tanh));
  act_func #(.ACT(ACT_SIGMOID))   u_sig  (.x_i(x), .y_o(y_sig));

  task automatic check_exact(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s x=%0d got=%0d expected=%0d", what, int'(x), got, exp);
    end
  endtask

  task automatic check_close(input string what, input int got, input real exp, input real tol);
    real g;
    g = real'(got) / 256.0;
    checks++;
    if (g - exp > tol || exp - g > tol) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s x=%f got=%f exact=%f", what, real'(int'(x)) / 256.0, g, exp);
    end
  endtask

  task automatic try_one(input int v);
    real xr;
    x = fix_t'(v);
    #1;
    xr = real'(v) / 256.0;
    check_exact("relu",      int'(y_relu), tb_ref_pkg::act(ACT_RELU, v));
    check_exact("threshold", int'(y_thr),  tb_ref_pkg::act(ACT_THRESHOLD, v));
    check_exact("tanh",      int'(y_tanh), tb_ref_pkg::act(ACT_TANH, v));
    check_exact("sigmoid",   int'(y_sig),  tb_ref_pkg::act(ACT_SIGMOID, v));
    check_close("sigmoid~",  int'(y_sig),  1.0 / (1.0 + $exp(-xr)), 0.025);
    check_close("tanh~",     int'(y_tanh),
                ($exp(xr) - $exp(-xr)) / ($exp(xr) + $exp(-xr)), 0.05);
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int edges[$] = '{-32768, -32767, -1281, -1280, -1279, -609, -608, -607,
                     -257, -256, -255, -1, 0, 1, 255, 256, 257, 607, 608,
                     609, 1279, 1280, 1281, 32766, 32767};
    foreach (edges[i]) try_one(edges[i]);
    for (int v = -32768; v <= 32767; v += 7) try_one(v);
    // Spot values worked out by hand
    try_one(0);
    check_exact("sigmoid(0)=0.5", int'(y_sig), 128);
    check_exact("tanh(0)=0",      int'(y_tanh), 0);
    check_exact("threshold(0)=1", int'(y_thr), 256);
    try_one(-512);   // -2.0: sigmoid = 1 - (2/8 + 0.625) = 0.125
    check_exact("sigmoid(-2)", int'(y_sig), 32);
    check_exact("relu(-2)",    int'(y_relu), 0);
    try_one(768);    // 3.0: sigmoid = 3/32 + 0.84375 = 0.9375; tanh = 2*1-1 = 1
    check_exact("sigmoid(3)", int'(y_sig), 240);
    check_exact("tanh(3)",    int'(y_tanh), 256);
    check_exact("relu(3)",    int'(y_relu), 768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
