// spe: simple priority encoder.
//
// Passes on the lowest-numbered asserted bit of the request vector as a
// one-hot grant; all zero when nothing is requested. Bit 0 has the highest
// fixed priority, as in the scan from device 1 upwards that stops at the
// first request. Purely combinational; N is the vector width.
module spe #(
  parameter int unsigned N = islip_pkg::N_PORTS
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  // Isolate the lowest set bit: req AND the two's complement of req.
  assign gnt = req & (~req + N'(1));

endmodule
