// neuron: one artificial neuron, y = phi(sum_j w_j * x_j + b).
//
// A small state machine runs one multiplier and one accumulator over the
// N_IN inputs in turn:
//
//   idle        wait for start_i
//   reg_inputs  register inputs, weights and bias; load the accumulator
//               with the bias and the index with the number of inputs m
//   mult        if index is zero go to act_func, else multiply the input
//               at position index by its weight
//   sum         add the product to the accumulator, decrement index,
//               return to mult
//   act_func    apply the activation function to the accumulator and
//               register the result on output_o, pulse done_o
//
// The states, their order, the '!index' exit from mult and the port names
// clk, rst, start_i, input_i, weight_i, output_o, done_o follow the source
// design. This design's own choices: a bias_i port (the source adds a bias
// but shows no port for it), weights presented all at once on weight_i,
// inputs taken from the last to the first, products truncated back to
// FRAC_W fractional bits before they are added, the accumulator saturated
// to the data width before phi, and a synchronous active-high reset.
//
// Timing: start_i is sampled only in idle. done_o is high for exactly one
// cycle, 2*N_IN + 3 clock edges after the edge that sampled start_i, and
// output_o holds its value until the next computation finishes. input_i,
// weight_i and bias_i need to be stable only on the edge after start_i.
module neuron
  import ann_pkg::*;
#(
  parameter int   N_IN = 4,
  parameter act_t ACT  = ACT_SIGMOID
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start_i,
  input  fix_t [N_IN-1:0]       input_i,
  input  fix_t [N_IN-1:0]       weight_i,
  input  fix_t                  bias_i,
  output fix_t                  output_o,
  output logic                  done_o
);

  localparam int IDX_W = $clog2(N_IN + 1);
  localparam int PROD_W = 2 * DATA_W;

  typedef enum logic [2:0] {
    S_IDLE,
    S_REG_INPUTS,
    S_MULT,
    S_SUM,
    S_ACT_FUNC
  } state_t;

  state_t                     state;
  fix_t [N_IN-1:0]            x_r, w_r;
  logic [IDX_W-1:0]           index;
  logic signed [PROD_W-1:0]   prod;
  acc_t                       acc;
  fix_t                       phi_in, phi_out;

  assign phi_in = sat_fix(acc);

  act_func #(.ACT(ACT)) u_act (
    .x_i (phi_in),
    .y_o (phi_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      index    <= '0;
      acc      <= '0;
      prod     <= '0;
      x_r      <= '0;
      w_r      <= '0;
      output_o <= '0;
      done_o   <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_i) state <= S_REG_INPUTS;
        end
        S_REG_INPUTS: begin
          x_r   <= input_i;
          w_r   <= weight_i;
          acc   <= acc_t'(bias_i);
          index <= IDX_W'(N_IN);
          state <= S_MULT;
        end
        S_MULT: begin
          if (index == '0) begin
            state <= S_ACT_FUNC;
          end else begin
            prod  <= x_r[index - 1'b1] * w_r[index - 1'b1];
            state <= S_SUM;
          end
        end
        S_SUM: begin
          acc   <= acc + acc_t'(prod >>> FRAC_W);
          index <= index - 1'b1;
          state <= S_MULT;
        end
        S_ACT_FUNC: begin
          output_o <= phi_out;
          done_o   <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The index never exceeds the number of inputs.
  assert property (@(posedge clk) disable iff (rst) index <= IDX_W'(N_IN));
  // mult leaves for act_func exactly when no inputs are left.
  assert property (@(posedge clk) disable iff (rst)
                   state == S_MULT |=> (state == S_ACT_FUNC) == ($past(index) == '0));
  // done_o is a single-cycle pulse.
  assert property (@(posedge clk) disable iff (rst) done_o |=> !done_o);

endmodule
