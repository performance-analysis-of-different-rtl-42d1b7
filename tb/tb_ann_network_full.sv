// tb_ann_network_full: the network exactly as built by default (4 inputs,
// layers of 4, 4 and 2 neurons, sigmoid, package default weights).
//
// Runs 500 inferences on random inputs in -8.0 .. +8.0. Each result is
// compared bit for bit with the integer reference model and, as a sanity
// check of the fixed-point arithmetic as a whole, with a floating-point
// evaluation of the same network using the exact sigmoid (limit 0.06).
// The latency of 35 cycles from start_i to done_o is checked every time.
module tb_ann_network_full;
  import ann_pkg::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  fix_t [3:0] x;
  fix_t [1:0] y;
  logic done;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  ann_network dut (.clk, .rst, .start_i(start), .input_i(x), .output_o(y), .done_o(done));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d expected=%0d", what, got, exp);
    end
  endtask

  // Floating-point network with the exact sigmoid
  function automatic void float_net(input int xi[], output real yo[]);
    real cur[], nxt[];
    int sizes[3] = '{4, 4, 2};
    real acc;
    cur = new[xi.size()];
    foreach (xi[i]) cur[i] = real'(xi[i]) / 256.0;
    for (int l = 0; l < 3; l++) begin
      nxt = new[sizes[l]];
      for (int n = 0; n < sizes[l]; n++) begin
        acc = real'(default_bias(l, n)) / 256.0;
        foreach (cur[i]) acc += cur[i] * real'(default_weight(l, n, i)) / 256.0;
        nxt[n] = 1.0 / (1.0 + $exp(-acc));
      end
      cur = nxt;
    end
    yo = cur;
  endfunction

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi[], e[];
    real ef[];
    int start_at;
    real err, max_err;
    max_err = 0.0;
    x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int op = 0; op < 500; op++) begin
      xi = new[4];
      for (int i = 0; i < 4; i++) begin
        x[i] = fix_t'(int'($urandom_range(4095)) - 2048);
        xi[i] = int'(x[i]);
      end
      tb_ref_pkg::network(ACT_SIGMOID, '{4, 4, 2}, xi, e);
      float_net(xi, ef);
      @(negedge clk) start = 1'b1;
      @(posedge clk); #1 start_at = cycle;
      @(negedge clk) start = 1'b0;
      do begin
        @(posedge clk); #1;
      end while (!done);
      check("latency", cycle - start_at, 35);
      for (int k = 0; k < 2; k++) begin
        check($sformatf("out %0d op %0d", k, op), int'(y[k]), e[k]);
        err = real'(int'(y[k])) / 256.0 - ef[k];
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        checks++;
        if (err > 0.06) begin
          failures++;
          $display("FAIL float comparison op %0d out %0d err %f", op, k, err);
        end
      end
    end
    $display("largest difference from floating point: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
