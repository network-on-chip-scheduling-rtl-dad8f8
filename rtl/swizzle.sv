// swizzle: input-to-output swizzle of N vectors of N bits.
//
// The scheduler keeps one N-bit vector per input (bit j: about output j)
// and one per output (bit k: about input k). The swizzle turns one view
// into the other: out[j][k] = in[k][j], a transpose of the N x N bit
// matrix. Three instances are used: requests (input view to output view),
// grants (output view to input view) and accepts (input view to output
// view). Pure wiring, no logic and no delay.
module swizzle #(
  parameter int unsigned N = islip_pkg::N_PORTS
) (
  input  logic [N-1:0] in  [N],
  output logic [N-1:0] out [N]
);

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar k = 0; k < N; k++) begin : g_col
      assign out[j][k] = in[k][j];
    end
  end

endmodule
