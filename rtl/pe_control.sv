// pe_control: the local controller of one processing element.
//
// It follows the control scheme of the original design: wait for the external request, then in
// one step copy the last result B into the output register S and the input registers E
// and R into B and I; then run two nested loops. The outer loop counts the iterations
// given by the instruction. Each pass of the outer loop first copies the previous
// iteration result B into L (the register the neighbours sample) and then, in the inner
// loop, combines the selected neighbours one by one with B; for a geodesic instruction
// the reference pixel I is combined last, with the dual operation (Minimum after a
// Maximum and vice versa). When the PE's own value (neighbourhood bit B) is not part of
// the neighbourhood, the first operand is passed into B instead of being combined.
//
// Timing (one state per clock while step_en is high):
//   IDLE    : req seen high -> transfer (start); this step does not wait for step_en
//   ITER    : all iterations done -> DONE, else L <= B and start the inner loop
//   SAMPLE  : operand mux select, Q-Flops sample (sample)
//   COMPUTE : B <= ALU(A, B)  (b_en)
//   DONE    : done high until req goes low (four-phase handshake)
// An iteration with k operands therefore takes 1 + 2k enabled cycles. The order of the
// operands (N, E, S, O, then I), the clocked state machine and the step_en input, which
// stands for the independent speed of each self-timed PE, are this design's choices; in
// the chip the control is a set of asynchronous automata.
module pe_control
  import morpho_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req,
  input  instr_t instr,
  input  logic   step_en,
  output logic   start,     // S <= B, B <= E, I <= R
  output logic   l_load,    // L <= B
  output opsel_t sel,       // operand multiplexer select
  output logic   sample,    // Q-Flops sample request
  output logic   b_en,      // B <= ALU result
  output logic   alu_pass,
  output logic   alu_max,
  output logic   done
);

  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_ITER    = 3'd1,
    ST_SAMPLE  = 3'd2,
    ST_COMPUTE = 3'd3,
    ST_DONE    = 3'd4
  } state_t;

  state_t            state;
  instr_t            ins;
  logic [ITER_W-1:0] iter_cnt;
  logic [4:0]        pending;   // operands left in this iteration: {I, O, S, E, N}
  logic [4:0]        ops_mask;
  logic              first;     // next ALU operation is the first of the iteration
  opsel_t            cur;       // operand held by the Q-Flops
  opsel_t            next_op;

  assign ops_mask = {ins.geodesic, ins.nb_o, ins.nb_s, ins.nb_e, ins.nb_n};

  // Lowest pending operand: N, E, S, O, then the reference I.
  always_comb begin
    if      (pending[0]) next_op = SEL_N;
    else if (pending[1]) next_op = SEL_E;
    else if (pending[2]) next_op = SEL_S;
    else if (pending[3]) next_op = SEL_O;
    else                 next_op = SEL_I;
  end

  always_comb begin
    start    = (state == ST_IDLE) && req;
    l_load   = (state == ST_ITER) && step_en && (iter_cnt != ins.n_iter);
    sample   = (state == ST_SAMPLE) && step_en;
    b_en     = (state == ST_COMPUTE) && step_en;
    sel      = next_op;
    alu_pass = first;
    alu_max  = ins.max_op ^ (cur == SEL_I);
    done     = (state == ST_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      ins      <= '0;
      iter_cnt <= '0;
      pending  <= '0;
      first    <= 1'b0;
      cur      <= SEL_I;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (req) begin
            ins      <= instr;
            iter_cnt <= '0;
            state    <= ST_ITER;
          end
        end
        ST_ITER: if (step_en) begin
          if (iter_cnt == ins.n_iter) begin
            state <= ST_DONE;
          end else begin
            iter_cnt <= iter_cnt + 1'b1;
            pending  <= ops_mask;
            first    <= ~ins.nb_b;
            if (ops_mask != '0) state <= ST_SAMPLE;
          end
        end
        ST_SAMPLE: if (step_en) begin
          cur     <= next_op;
          pending <= pending & (pending - 5'd1);   // clear the lowest set bit
          state   <= ST_COMPUTE;
        end
        ST_COMPUTE: if (step_en) begin
          first <= 1'b0;
          state <= (pending == '0) ? ST_ITER : ST_SAMPLE;
        end
        ST_DONE: begin
          if (!req) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
