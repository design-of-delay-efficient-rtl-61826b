// Booth controller ("control block Y"): sequences one multiplication.
//
// States: IDLE -> LOAD -> RUN (x iterations) -> IDLE.
//   IDLE  `idle` is high. A `go` pulse raises op_load for one edge, so the
//         operand registers capture the inputs, and moves to LOAD.
//   LOAD  raises cfg_load, pa_load and cnt_load for one edge: the
//         configuration register latches the range, PA is loaded with
//         {0, multiplier, 0} and the counter is preset to iterations - 1.
//   RUN   raises `step` on every edge; alu_op is the Booth recoding of
//         PA[1:0] (01 add, 10 subtract, 00/11 shift only), and the counter
//         counts down. The edge on which the counter is zero performs the
//         last iteration and returns to IDLE.
// `done` is high for the one cycle after the last iteration, when the
// product is first valid. A multiplication of n iterations therefore takes
// n + 2 clock edges from the edge that samples `go` to the edge after which
// `done` is high. `go` is ignored outside IDLE.
//
// The Go input, the idle output and the add/sub/shift/load control lines
// are the paper's (its block diagram); the state encoding, the separate
// LOAD state and the `done` pulse are this design's choices.
module cbm_controller
  import cbm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  logic [1:0] pa_lsbs,
  input  logic       cnt_zero,
  output logic       op_load,
  output logic       cfg_load,
  output logic       pa_load,
  output logic       cnt_load,
  output logic       step,
  output alu_op_e    alu_op,
  output logic       idle,
  output logic       done
);

  typedef enum logic [1:0] {
    S_IDLE = 2'b00,
    S_LOAD = 2'b01,
    S_RUN  = 2'b10
  } state_e;

  state_e state, state_next;

  always_comb begin
    state_next = state;
    op_load    = 1'b0;
    cfg_load   = 1'b0;
    pa_load    = 1'b0;
    cnt_load   = 1'b0;
    step       = 1'b0;
    alu_op     = ALU_NONE;
    idle       = 1'b0;
    unique case (state)
      S_IDLE: begin
        idle = 1'b1;
        if (go) begin
          op_load    = 1'b1;
          state_next = S_LOAD;
        end
      end
      S_LOAD: begin
        cfg_load   = 1'b1;
        pa_load    = 1'b1;
        cnt_load   = 1'b1;
        state_next = S_RUN;
      end
      S_RUN: begin
        step   = 1'b1;
        alu_op = booth_decode(pa_lsbs);
        if (cnt_zero) state_next = S_IDLE;
      end
      default: state_next = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      state <= state_next;
      done  <= (state == S_RUN) && cnt_zero;
    end
  end

  // Handshake rules: at most one phase is active per cycle, a run never
  // overlaps `idle`, and `done` is only seen once the controller is idle.
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({op_load, pa_load, step}));
  a_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (pa_load || step) |-> !idle);
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> idle);

endmodule
