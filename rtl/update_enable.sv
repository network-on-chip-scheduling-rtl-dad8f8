// update_enable: pointer-update enables of the modified i-SLIP scheduler.
//
// A grant arbiter may move its pointer only when its grant was accepted,
// and an accept arbiter only when it accepted, and both only in the first
// iteration of a scheduling cycle. The unit receives the accept vectors in
// both views: `output_acc[j]` (which input accepted output j, from the
// accept swizzle) and `input_acc[k]` (which output input k accepted), plus
// `first_iter` from the FSM. grant_update[j] = first_iter & |output_acc[j];
// accept_update[k] = first_iter & |input_acc[k]. Combinational.
module update_enable #(
  parameter int unsigned N = islip_pkg::N_PORTS
) (
  input  logic [N-1:0] output_acc [N],
  input  logic [N-1:0] input_acc  [N],
  input  logic         first_iter,
  output logic [N-1:0] grant_update,
  output logic [N-1:0] accept_update
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      grant_update[i]  = first_iter & (|output_acc[i]);
      accept_update[i] = first_iter & (|input_acc[i]);
    end
  end

endmodule
