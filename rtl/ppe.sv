// ppe: programmable priority encoder built from two simple priority encoders.
//
// The pointer `ptr` names the device with the highest priority. One SPE
// sees only the requests at or above the pointer, the other sees all
// requests. If any request lies at or above the pointer the first SPE's
// one-hot result is taken, otherwise the second one's, which wraps the
// search round to device 0. `anygnt` is high when a grant is given.
// Purely combinational. The two-SPE structure follows the design; the
// thermometer mask used to split the requests is this implementation's.
module ppe #(
  parameter int unsigned N  = islip_pkg::N_PORTS,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [PW-1:0] ptr,
  output logic [N-1:0]  gnt,
  output logic          anygnt
);

  logic [N-1:0] mask;        // ones at positions >= ptr
  logic [N-1:0] req_hi;      // requests at or above the pointer
  logic [N-1:0] gnt_hi;
  logic [N-1:0] gnt_all;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) mask[i] = (i >= 32'(ptr));
  end

  assign req_hi = req & mask;

  spe #(.N(N)) u_spe_hi  (.req(req_hi), .gnt(gnt_hi));
  spe #(.N(N)) u_spe_all (.req(req),    .gnt(gnt_all));

  assign gnt    = (|req_hi) ? gnt_hi : gnt_all;
  assign anygnt = |req;

endmodule
