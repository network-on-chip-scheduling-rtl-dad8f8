// tb_islip_3x3: end-to-end self-check of the scheduler built as a 3 x 3
// switch running 3 iterations per scheduling cycle (modified 3-SLIP).
//
// The first cycle is the 3 x 3 reference example: input 0 holds packets
// for outputs 0, 1 and 2, input 1 for outputs 0 and 2, input 2 for outputs
// 0, 1 and 2, with all pointers at their reset value. Input 0 must be
// matched to output 0 in the first iteration, and afterwards the pointers
// must read g0 = 1, g1 = 0, g2 = 0 (grant) and a0 = 1, a1 = 0, a2 = 0
// (accept). Later cycles use random traffic and are compared with the same
// reference model, consistency and maximality checks and latency check as
// the 8 x 8 testbench (see tb_islip_scheduler).
module tb_islip_3x3;
  localparam int unsigned N  = 3;
  localparam int unsigned NI = 3;
  localparam int unsigned CYCLES = 400;

  logic         clk = 1'b0, resetb, start, done;
  logic [N-1:0] input_request [N];
  logic [N-1:0] output_available;
  logic [N-1:0] output_decision [N];
  logic [N-1:0] output_decision_valid;
  logic [N-1:0] input_decision [N];
  logic [N-1:0] input_decision_valid;

  islip_scheduler #(.N(N), .N_ITER(NI)) dut (
    .clk, .resetb, .start, .done,
    .input_request, .output_available,
    .output_decision, .output_decision_valid,
    .input_decision, .input_decision_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rejected = 0, n_late = 0, n_unavail = 0, n_wrap = 0, n_b2b = 0, n_idle = 0;
  int max_conv = 0;

  // Reference state and results
  int           g_ptr [N];
  int           a_ptr [N];
  logic [N-1:0] e_in_dec [N];
  logic [N-1:0] e_out_dec [N];
  logic [N-1:0] e_in_m, e_out_m;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One scheduling cycle of the reference algorithm.
  task automatic model_cycle();
    int gsel [N];
    int asel [N];
    e_in_m = '0;
    e_out_m = '0;
    for (int i = 0; i < N; i++) begin e_in_dec[i] = '0; e_out_dec[i] = '0; end
    for (int j = 0; j < N; j++)
      if (!output_available[j])
        for (int k = 0; k < N; k++) if (input_request[k][j]) begin n_unavail++; break; end
    for (int it = 0; it < NI; it++) begin
      for (int j = 0; j < N; j++) begin
        gsel[j] = -1;
        if (!e_out_m[j] && output_available[j])
          for (int s = 0; s < N; s++) begin
            int k;
            k = (g_ptr[j] + s) % N;
            if (!e_in_m[k] && input_request[k][j]) begin gsel[j] = k; break; end
          end
      end
      for (int k = 0; k < N; k++) begin
        asel[k] = -1;
        if (!e_in_m[k])
          for (int s = 0; s < N; s++) begin
            int j;
            j = (a_ptr[k] + s) % N;
            if (gsel[j] == k) begin asel[k] = j; break; end
          end
      end
      for (int j = 0; j < N; j++)
        if (gsel[j] >= 0 && asel[gsel[j]] != j && it == 0) n_rejected++;
      for (int k = 0; k < N; k++)
        if (asel[k] >= 0) begin
          int j;
          j = asel[k];
          e_in_m[k] = 1'b1;
          e_out_m[j] = 1'b1;
          e_in_dec[k][j] = 1'b1;
          e_out_dec[j][k] = 1'b1;
          if (it == 0) begin
            if (k == N - 1 || j == N - 1) n_wrap++;
            g_ptr[j] = (k + 1) % N;
            a_ptr[k] = (j + 1) % N;
          end else n_late++;
          if (it + 1 > max_conv) max_conv = it + 1;
        end
    end
  endtask

  task automatic apply_traffic(input int c);
    if (c == 0) begin
      // reference 3 x 3 example (bit j of input k: packet for output j)
      input_request[0] = 3'b111;
      input_request[1] = 3'b101;
      input_request[2] = 3'b111;
      output_available = 3'b111;
    end else begin
      int load;
      load = $urandom % 4; // 0 light .. 3 full
      for (int k = 0; k < N; k++) begin
        logic [N-1:0] r;
        r = N'($urandom);
        case (load)
          0: r = r & N'($urandom) & N'($urandom);
          1: r = r & N'($urandom);
          2: r = r | N'($urandom);
          default: r = '1;
        endcase
        input_request[k] = r;
      end
      output_available = ($urandom % 4 == 0) ? ~(N'(1) << ($urandom % N)) : '1;
    end
  endtask

  task automatic check_result(input int c);
    logic [N-1:0] in_m, out_m;
    in_m  = input_decision_valid;
    out_m = output_decision_valid;
    check(in_m == e_in_m && out_m == e_out_m,
          $sformatf("cycle %0d valid in=%b out=%b expected in=%b out=%b", c, in_m, out_m, e_in_m, e_out_m));
    for (int i = 0; i < N; i++) begin
      check(input_decision[i] == e_in_dec[i],
            $sformatf("cycle %0d input %0d decision %b expected %b", c, i, input_decision[i], e_in_dec[i]));
      check(output_decision[i] == e_out_dec[i],
            $sformatf("cycle %0d output %0d decision %b expected %b", c, i, output_decision[i], e_out_dec[i]));
      check($onehot0(input_decision[i]) && $onehot0(output_decision[i]),
            $sformatf("cycle %0d port %0d decision not one-hot", c, i));
    end
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) begin
        if (input_decision[k][j]) begin
          check(output_decision[j][k] && input_request[k][j] && output_available[j],
                $sformatf("cycle %0d pair in%0d-out%0d inconsistent", c, k, j));
        end
        // maximal: nothing left that could still be matched
        check(!(input_request[k][j] && output_available[j] && !in_m[k] && !out_m[j]),
              $sformatf("cycle %0d not maximal: in%0d-out%0d both free", c, k, j));
      end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    resetb = 1'b0;
    start = 1'b0;
    for (int i = 0; i < N; i++) begin input_request[i] = '0; g_ptr[i] = 0; a_ptr[i] = 0; end
    output_available = '1;
    repeat (3) @(posedge clk);
    @(negedge clk) resetb = 1'b1;
    @(negedge clk);
    apply_traffic(0);
    start = 1'b1;
    model_cycle();
    for (int c = 0; c < CYCLES; c++) begin
      int lat;
      lat = 0;
      do begin
        @(negedge clk);
        lat++;
        if (c == 0 && lat == 2)
          check(input_decision[0] == 3'b001 && $countones({input_decision[1], input_decision[2]}) == 0,
                "example: first iteration did not match exactly input 0 to output 0");
        if (!done) check(input_decision_valid == '0 && output_decision_valid == '0,
                         $sformatf("cycle %0d valid before DONE", c));
      end while (!done && lat < 4 * NI);
      check(lat == NI + 1, $sformatf("cycle %0d latency %0d clocks, expected %0d", c, lat, NI + 1));
      check_result(c);
      if (c == 0) begin
        $display("example cycle: input decisions %b %b %b", input_decision[0], input_decision[1],
                 input_decision[2]);
        check(input_decision[0] == 3'b001, "example: input 0 not matched to output 0");
        check(dut.g_grant_arb[0].u_grant_arb.ptr == 2'd1 && dut.g_grant_arb[1].u_grant_arb.ptr == 2'd0 &&
              dut.g_grant_arb[2].u_grant_arb.ptr == 2'd0, "example: grant pointers not g0=1 g1=0 g2=0");
        check(dut.g_accept_arb[0].u_accept_arb.ptr == 2'd1 && dut.g_accept_arb[1].u_accept_arb.ptr == 2'd0 &&
              dut.g_accept_arb[2].u_accept_arb.ptr == 2'd0, "example: accept pointers not a0=1 a1=0 a2=0");
      end
      if ($urandom % 4 == 0) begin
        start = 1'b0;
        n_idle++;
        repeat (1 + $urandom % 3) begin
          @(negedge clk);
          check(!done && output_decision_valid == '0, $sformatf("cycle %0d idle not quiet", c));
        end
      end else n_b2b++;
      apply_traffic(c + 1);
      start = 1'b1;
      model_cycle();
    end
    check(n_rejected > 0, "no first-iteration grant was ever refused");
    check(n_late > 0, "no match was ever made after the first iteration");
    check(n_unavail > 0, "no request ever met an unavailable output");
    check(n_wrap > 0, "no pointer ever wrapped");
    check(n_b2b > 0 && n_idle > 0, "back-to-back or idle cycles missing");
    $display("refused grants=%0d late matches=%0d unavailable=%0d wraps=%0d back-to-back=%0d idle=%0d latest converging iteration=%0d",
             n_rejected, n_late, n_unavail, n_wrap, n_b2b, n_idle, max_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
