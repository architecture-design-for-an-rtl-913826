// lms_ctrl: sequencer of the time-multiplexed LMS equalizer.
//
// Each input sample takes two passes through the shared tap multipliers:
//   FILTER  multiplexer control bit sel = 1: the taps form x(n-k)*w_k, the
//           output adder gives y(n), the error e(n) and mu*e(n) are formed
//           and captured (cap_en).
//   UPDATE  sel = 0: the taps form x(n-k)*mu*e(n) and write their weights
//           (upd_en); y(n) and e(n) are presented with out_valid.
// The meaning of the control bit ('1' filtering, '0' weight update) follows
// the original architecture; the state machine and handshake are this
// design's own.
//
// Interface: a sample is accepted when in_valid and in_ready are both high;
// shift_en is that acceptance and loads the tap delay line. in_ready is high
// in IDLE and during UPDATE, so a new sample can enter while the weights of
// the previous one are written: a steady stream runs at one sample every two
// clock cycles. out_valid is a one-cycle pulse, two cycles after acceptance,
// with no back-pressure.
module lms_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,   // a new sample is offered
  output logic in_ready,   // the equalizer can take a sample
  output logic shift_en,   // sample accepted: shift the delay line
  output logic sel,        // multiplexer control bit: 1 filter, 0 update
  output logic cap_en,     // capture y(n), e(n) and mu*e(n)
  output logic upd_en,     // write the updated weights
  output logic out_valid   // y(n) and e(n) are valid
);

  typedef enum logic [1:0] {
    S_IDLE   = 2'd0,
    S_FILTER = 2'd1,
    S_UPDATE = 2'd2
  } state_e;

  state_e state, state_next;

  always_comb begin
    in_ready  = (state == S_IDLE) || (state == S_UPDATE);
    shift_en  = in_valid && in_ready;
    sel       = (state != S_UPDATE);
    cap_en    = (state == S_FILTER);
    upd_en    = (state == S_UPDATE);
    out_valid = (state == S_UPDATE);
    unique case (state)
      S_IDLE:   state_next = shift_en ? S_FILTER : S_IDLE;
      S_FILTER: state_next = S_UPDATE;
      S_UPDATE: state_next = shift_en ? S_FILTER : S_IDLE;
      default:  state_next = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_next;
  end

  // The weights are only written while the multiplexer selects the update
  // operand, and y/e are only captured while it selects the weights.
  a_upd_sel: assert property (@(posedge clk) disable iff (!rst_n) upd_en |-> !sel);
  a_cap_sel: assert property (@(posedge clk) disable iff (!rst_n) cap_en |-> sel);
  // Every filtering pass is followed by its update pass.
  a_filter_update: assert property (@(posedge clk) disable iff (!rst_n)
                                    cap_en |=> upd_en);

endmodule
