// bist_controller: sequences one built-in self-test session.
//
// A session is started by start (ignored while one is running) and has
// three phases:
//   init   the cycle start is seen: the pattern generator takes its seed,
//          the signature register and the test result are cleared, and
//          num_patterns is captured;
//   apply  num_patterns cycles, one test pattern per cycle; pattern_index
//          counts 0..num_patterns-1 and the signature register shifts in
//          one compacted response bit each cycle;
//   check  one cycle in which the comparator captures the verdict.
// done is then held (with the verdict) until the next start. With start
// seen on clock edge 0, apply covers edges 1..N, check is edge N+1 and
// done is high from edge N+2 on. num_patterns = 0 goes straight to check.
//
// That BIST starts the test sequence itself and reports pass or fail is the
// scheme being implemented; the state machine, its phases and its timing
// are this design's own.
module bist_controller #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] num_patterns,
  output logic             init,
  output logic             apply,
  output logic [CNT_W-1:0] pattern_index,
  output logic             check,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {S_IDLE, S_APPLY, S_CHECK, S_DONE} state_e;

  state_e           state;
  logic [CNT_W-1:0] n_pat;

  assign init  = start && (state == S_IDLE || state == S_DONE);
  assign apply = (state == S_APPLY);
  assign check = (state == S_CHECK);
  assign busy  = (state == S_APPLY) || (state == S_CHECK);
  assign done  = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      n_pat         <= '0;
      pattern_index <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            n_pat         <= num_patterns;
            pattern_index <= '0;
            state         <= (num_patterns == '0) ? S_CHECK : S_APPLY;
          end
        end
        S_APPLY: begin
          if (pattern_index == n_pat - 1'b1) begin
            state <= S_CHECK;
          end else begin
            pattern_index <= pattern_index + 1'b1;
          end
        end
        S_CHECK: state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_phase : assert property (@(posedge clk) disable iff (!rst_n) !(apply && check))
    else $error("bist_controller: apply and check in the same cycle");
  a_index_range : assert property (@(posedge clk) disable iff (!rst_n) apply |-> pattern_index < n_pat)
    else $error("bist_controller: pattern index beyond the session length");

endmodule
