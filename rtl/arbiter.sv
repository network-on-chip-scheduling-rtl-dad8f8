// arbiter: round-robin arbiter of the modified i-SLIP scheduler.
//
// The same module serves as a grant arbiter (one per output, choosing among
// the inputs that request it) and as an accept arbiter (one per input,
// choosing among the outputs that grant it). A programmable priority
// encoder picks the first request at or after the priority pointer, going
// round modulo N. While `arb_enable` is low the outputs are zero.
//
// The pointer is the only state. On a clock edge where `update_enable` is
// high and a grant is given, the pointer moves to one position beyond the
// granted device (modulo N); otherwise it keeps its value, so an arbiter
// whose choice was not taken up keeps favouring the same device. The
// asynchronous, active-high `reset` puts the
// pointer on device 0. The scheduler decides when `update_enable` is high;
// the arbiter only obeys it.
//
// Timing: `gnt`/`anygnt` are combinational from `req`, `arb_enable` and the
// pointer; the pointer changes on the rising edge of `clk`.
module arbiter #(
  parameter int unsigned N  = islip_pkg::N_PORTS,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] req,
  input  logic         arb_enable,
  input  logic         update_enable,
  output logic [N-1:0] gnt,
  output logic         anygnt
);

  logic [PW-1:0] ptr;
  logic [N-1:0]  ppe_gnt;
  logic          ppe_any;
  logic [PW-1:0] gnt_idx;
  logic [PW-1:0] next_ptr;

  ppe #(.N(N)) u_ppe (.req(req), .ptr(ptr), .gnt(ppe_gnt), .anygnt(ppe_any));

  assign gnt    = arb_enable ? ppe_gnt : '0;
  assign anygnt = arb_enable & ppe_any;

  // Index of the one-hot grant, then one beyond it, modulo N.
  always_comb begin
    gnt_idx = '0;
    for (int unsigned i = 0; i < N; i++)
      if (ppe_gnt[i]) gnt_idx = PW'(i);
    next_ptr = (32'(gnt_idx) == N - 1) ? '0 : gnt_idx + PW'(1);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)
      ptr <= '0;
    else if (update_enable && anygnt)
      ptr <= next_ptr;
  end

  // The grant is one-hot or empty, and present exactly when announced.
  a_onehot: assert property (@(posedge clk) disable iff (reset) $onehot0(gnt));
  a_any:    assert property (@(posedge clk) disable iff (reset) anygnt == (|gnt));

endmodule
