// islip_scheduler: N x N modified i-SLIP scheduler for virtual output queues.
//
// Every one of N devices is an input, holding one queue per output, and an
// output. Each input presents a request vector (bit j: it has a packet for
// output j). On START the scheduler runs N_ITER iterations, one per clock,
// to build a one-to-one match of inputs to outputs:
//   request  each input not yet matched requests every unmatched, available
//            output it has a packet for;
//   grant    each unmatched output's grant arbiter picks one requesting
//            input, round robin from its pointer;
//   accept   each unmatched input's accept arbiter picks one granting
//            output, round robin from its pointer; the pair is matched.
// Pointers move (to one beyond the chosen device) only for pairs matched in
// the first iteration: a grant arbiter only when its grant was accepted.
// Three swizzles turn the vectors between the input view (one vector per
// input) and the output view (one per output); the update-enable unit and
// the FSM complete the structure. All of this follows the design.
//
// Interface (this implementation's choices where the design only names the
// signals): `resetb` is asynchronous and active low. `output_available[j]`
// low keeps output j out of the match. `input_decision[k]` is one-hot on
// the output input k was matched to; `output_decision[j]` one-hot on the
// input output j was matched to. The decisions build up during the
// iterations; `done` is high for one clock when the match is complete, and
// only then are `input_decision_valid`/`output_decision_valid` non-zero
// (bit set for every matched port).
//
// Timing: with `start` held high, DONE follows N_ITER + 1 clocks after the
// cycle began and the next cycle starts immediately, so one match is made
// every N_ITER + 1 clocks. Requests and availability are sampled in every
// iteration and should be held steady during a cycle.
module islip_scheduler #(
  parameter int unsigned N      = islip_pkg::N_PORTS,
  parameter int unsigned N_ITER = islip_pkg::N_ITER
) (
  input  logic         clk,
  input  logic         resetb,
  input  logic         start,
  output logic         done,
  input  logic [N-1:0] input_request [N],
  input  logic [N-1:0] output_available,
  output logic [N-1:0] output_decision [N],
  output logic [N-1:0] output_decision_valid,
  output logic [N-1:0] input_decision [N],
  output logic [N-1:0] input_decision_valid
);

  logic reset;
  assign reset = ~resetb;

  // Controller
  logic clear, iterate, first_iter;

  islip_fsm #(.N_ITER(N_ITER)) u_fsm (
    .clk, .reset, .start, .clear, .iterate, .first_iter, .done
  );

  // Match registers: which ports are already matched, and to whom.
  logic [N-1:0] in_matched, out_matched;
  logic [N-1:0] in_dec  [N];
  logic [N-1:0] out_dec [N];

  // Request step, input view: only unmatched inputs, towards unmatched
  // available outputs.
  logic [N-1:0] input_req [N];
  always_comb begin
    for (int unsigned k = 0; k < N; k++)
      input_req[k] = in_matched[k] ? '0
                   : (input_request[k] & ~out_matched & output_available);
  end

  logic [N-1:0] output_req [N];
  swizzle #(.N(N)) u_req_swizzle (.in(input_req), .out(output_req));

  // Grant step: one arbiter per output.
  logic [N-1:0] output_gnt [N];
  logic [N-1:0] grant_update, accept_update;
  logic [N-1:0] grant_any;

  for (genvar j = 0; j < N; j++) begin : g_grant_arb
    arbiter #(.N(N)) u_grant_arb (
      .clk, .reset,
      .req          (output_req[j]),
      .arb_enable   (iterate & ~out_matched[j] & output_available[j]),
      .update_enable(grant_update[j]),
      .gnt          (output_gnt[j]),
      .anygnt       (grant_any[j])
    );
  end

  logic [N-1:0] input_gnt [N];
  swizzle #(.N(N)) u_gnt_swizzle (.in(output_gnt), .out(input_gnt));

  // Accept step: one arbiter per input.
  logic [N-1:0] input_acc [N];
  logic [N-1:0] accept_any;

  for (genvar k = 0; k < N; k++) begin : g_accept_arb
    arbiter #(.N(N)) u_accept_arb (
      .clk, .reset,
      .req          (input_gnt[k]),
      .arb_enable   (iterate & ~in_matched[k]),
      .update_enable(accept_update[k]),
      .gnt          (input_acc[k]),
      .anygnt       (accept_any[k])
    );
  end

  logic [N-1:0] output_acc [N];
  swizzle #(.N(N)) u_acc_swizzle (.in(input_acc), .out(output_acc));

  update_enable #(.N(N)) u_update_enable (
    .output_acc, .input_acc, .first_iter, .grant_update, .accept_update
  );

  // Record the pairs matched in this iteration.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      in_matched  <= '0;
      out_matched <= '0;
      for (int unsigned i = 0; i < N; i++) begin
        in_dec[i]  <= '0;
        out_dec[i] <= '0;
      end
    end else if (clear) begin
      in_matched  <= '0;
      out_matched <= '0;
      for (int unsigned i = 0; i < N; i++) begin
        in_dec[i]  <= '0;
        out_dec[i] <= '0;
      end
    end else if (iterate) begin
      for (int unsigned i = 0; i < N; i++) begin
        in_matched[i]  <= in_matched[i]  | accept_any[i];
        out_matched[i] <= out_matched[i] | (|output_acc[i]);
        in_dec[i]      <= in_dec[i]  | input_acc[i];
        out_dec[i]     <= out_dec[i] | output_acc[i];
      end
    end
  end

  assign input_decision        = in_dec;
  assign output_decision       = out_dec;
  assign input_decision_valid  = done ? in_matched  : '0;
  assign output_decision_valid = done ? out_matched : '0;

  // An output's grant can only be accepted if that output gave a grant.
  for (genvar j = 0; j < N; j++) begin : g_acc_chk
    a_acc_granted: assert property (@(posedge clk) disable iff (reset)
                                    (|output_acc[j]) |-> grant_any[j]);
  end

  // An input and an output are matched together or not at all.
  a_pairs: assert property (@(posedge clk) disable iff (reset)
                            $countones(in_matched) == $countones(out_matched));

endmodule
