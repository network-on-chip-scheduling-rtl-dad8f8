// tb_spe: exhaustive self-check of the simple priority encoder at N = 8.
// Every request vector is applied; the expected one-hot grant (lowest set
// bit) is found by a plain scan in the testbench.
module tb_spe;
  localparam int unsigned N = 8;
  logic [N-1:0] req, gnt, exp_gnt;
  int checks = 0, failures = 0;

  spe #(.N(N)) dut (.req(req), .gnt(gnt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      req = N'(v);
      #1;
      exp_gnt = '0;
      for (int i = 0; i < N; i++)
        if (req[i]) begin exp_gnt[i] = 1'b1; break; end
      checks++;
      if (gnt !== exp_gnt) begin
        failures++;
        $display("FAIL req=%b gnt=%b expected %b", req, gnt, exp_gnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
