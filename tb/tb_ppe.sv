// tb_ppe: exhaustive self-check of the programmable priority encoder at
// N = 8: every request vector with every pointer value. The expected grant
// is the first request found scanning from the pointer, wrapping modulo N.
module tb_ppe;
  localparam int unsigned N = 8;
  logic [N-1:0] req, gnt, exp_gnt;
  logic [2:0]   ptr;
  logic         anygnt;
  int checks = 0, failures = 0;

  ppe #(.N(N)) dut (.req(req), .ptr(ptr), .gnt(gnt), .anygnt(anygnt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++) begin
      for (int v = 0; v < (1 << N); v++) begin
        req = N'(v);
        ptr = 3'(p);
        #1;
        exp_gnt = '0;
        for (int s = 0; s < N; s++) begin
          int idx;
          idx = (p + s) % N;
          if (req[idx]) begin exp_gnt[idx] = 1'b1; break; end
        end
        checks++;
        if (gnt !== exp_gnt || anygnt !== (v != 0)) begin
          failures++;
          $display("FAIL ptr=%0d req=%b gnt=%b any=%b expected %b", p, req, gnt, anygnt, exp_gnt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
