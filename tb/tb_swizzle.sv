// tb_swizzle: random self-check of the swizzle at N = 8: every output bit
// must equal the transposed input bit.
module tb_swizzle;
  localparam int unsigned N = 8;
  logic [N-1:0] in [N];
  logic [N-1:0] out [N];
  int checks = 0, failures = 0;

  swizzle #(.N(N)) dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < N; k++) in[k] = N'($urandom);
      if (t < N) begin // walking single bits first
        for (int k = 0; k < N; k++) in[k] = '0;
        in[t] = N'(1) << ((t * 3) % N);
      end
      #1;
      for (int j = 0; j < N; j++)
        for (int k = 0; k < N; k++) begin
          checks++;
          if (out[j][k] !== in[k][j]) begin
            failures++;
            $display("FAIL out[%0d][%0d]=%b in[%0d][%0d]=%b", j, k, out[j][k], k, j, in[k][j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
