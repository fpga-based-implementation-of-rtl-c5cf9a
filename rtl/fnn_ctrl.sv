// fnn_ctrl: state machine that sequences one FNN T-H inference.
//
//   ST_INIT     entered only from reset; one clock in which every block is known
//               to be cleared, then LOAD.
//   ST_LOAD     sets up the inputs: in_ready is high, and when in_valid is seen
//               the input registers are loaded (in_load) and the task flags
//               cleared (flags_clear). The input registers' valid pulse starts
//               all MLPs in the next clock.
//   ST_PROCESS  the SIG MLP and the LINEAR MLPs run in parallel; the state is left
//               in the clock the task flags report all_done, which also loads the
//               membership registers (mu_load).
//   ST_SYNC     the pi nodes and the output adder complete the result as a chain of
//               valid pulses; the state is left when out_valid arrives.
// A result therefore takes 1 (LOAD) + 4 (MLPs with one hidden layer) + 1
// (membership registers) + 1 (pi) + 1 (adder) = 8 clocks from the clock in which
// in_valid is accepted, and a new input set can be accepted every 9 clocks. rst is synchronous and active high.
// The four states and their roles follow the published controller; the
// handshake and the exact clock counts are this design's choices.
module fnn_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       in_load,
  output logic       flags_clear,
  input  logic       all_done,
  output logic       mu_load,
  input  logic       out_valid,
  output logic [1:0] state
);

  typedef enum logic [1:0] {
    ST_INIT    = 2'd0,
    ST_LOAD    = 2'd1,
    ST_PROCESS = 2'd2,
    ST_SYNC    = 2'd3
  } state_t;

  state_t st, st_n;

  always_ff @(posedge clk) begin
    if (rst) st <= ST_INIT;
    else     st <= st_n;
  end

  always_comb begin
    st_n        = st;
    in_ready    = 1'b0;
    in_load     = 1'b0;
    flags_clear = 1'b0;
    mu_load     = 1'b0;
    unique case (st)
      ST_INIT: st_n = ST_LOAD;
      ST_LOAD: begin
        in_ready = 1'b1;
        if (in_valid) begin
          in_load     = 1'b1;
          flags_clear = 1'b1;
          st_n        = ST_PROCESS;
        end
      end
      ST_PROCESS: begin
        if (all_done) begin
          mu_load = 1'b1;
          st_n    = ST_SYNC;
        end
      end
      ST_SYNC: if (out_valid) st_n = ST_LOAD;
      default: st_n = ST_INIT;
    endcase
  end

  assign state = st;

  // Handshake rules: inputs are only loaded when offered and accepted, and the
  // membership registers are only loaded while the MLPs are being waited on.
  a_load_when_ready: assert property (@(posedge clk) disable iff (rst)
    in_load |-> (in_ready && in_valid));
  a_mu_load_in_process: assert property (@(posedge clk) disable iff (rst)
    mu_load |-> (st == ST_PROCESS && all_done));
  a_init_only_after_reset: assert property (@(posedge clk) disable iff (rst)
    st != ST_INIT |=> st != ST_INIT);

endmodule
