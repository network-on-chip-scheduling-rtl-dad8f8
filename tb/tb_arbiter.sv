// tb_arbiter: random self-check of the round-robin arbiter at N = 8.
// The testbench keeps its own copy of the priority pointer. Each clock it
// drives random requests, enable and update-enable, checks the grant
// against a wrapped scan from the model pointer, and after the edge moves
// the model pointer one beyond the grant when an update was enabled.
// It also counts that grants, kept pointers (update low) and wrap-around
// of the pointer from N-1 to 0 all occurred.
module tb_arbiter;
  localparam int unsigned N = 8;
  logic         clk = 1'b0, reset;
  logic [N-1:0] req, gnt, exp_gnt;
  logic         arb_enable, update_enable, anygnt;
  int           mptr;
  int checks = 0, failures = 0;
  int n_update = 0, n_hold = 0, n_wrap = 0;

  arbiter #(.N(N)) dut (.clk, .reset, .req, .arb_enable, .update_enable, .gnt, .anygnt);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; req = '0; arb_enable = 1'b0; update_enable = 1'b0;
    mptr = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req           = N'($urandom);
      if (t % 5 == 0) req = N'(1) << ($urandom % N); // single requests move the pointer far
      arb_enable    = ($urandom % 8) != 0;
      update_enable = ($urandom % 2) != 0;
      #1;
      exp_gnt = '0;
      if (arb_enable)
        for (int s = 0; s < N; s++) begin
          int idx;
          idx = (mptr + s) % N;
          if (req[idx]) begin exp_gnt[idx] = 1'b1; break; end
        end
      checks++;
      if (gnt !== exp_gnt || anygnt !== (exp_gnt != 0)) begin
        failures++;
        $display("FAIL t=%0d ptr=%0d en=%b req=%b gnt=%b any=%b expected %b", t, mptr,
                 arb_enable, req, gnt, anygnt, exp_gnt);
      end
      @(posedge clk);
      if (exp_gnt != 0) begin
        if (update_enable) begin
          int g;
          g = 0;
          for (int i = 0; i < N; i++) if (exp_gnt[i]) g = i;
          if (g == N - 1) n_wrap++;
          mptr = (g + 1) % N;
          n_update++;
        end else n_hold++;
      end
    end
    checks++;
    if (n_update == 0 || n_hold == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL coverage update=%0d hold=%0d wrap=%0d", n_update, n_hold, n_wrap);
    end
    $display("pointer updates=%0d holds=%0d wraps=%0d", n_update, n_hold, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
