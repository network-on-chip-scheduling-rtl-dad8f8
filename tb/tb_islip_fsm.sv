// tb_islip_fsm: self-check of the scheduler controller with N_ITER = 8.
// A cycle-by-cycle reference of the controller (idle, N_ITER iteration
// clocks, one DONE clock) runs in the testbench beside it while START is
// toggled at random and sometimes held high for back-to-back cycles. Every
// clock the four outputs are compared, and the clocks from the start of a
// cycle to DONE are checked to be N_ITER + 1.
module tb_islip_fsm;
  localparam int unsigned N_ITER = 8;
  logic clk = 1'b0, reset, start;
  logic clear, iterate, first_iter, done;
  int   m_state;  // 0 idle, 1 iterating, 2 done
  int   m_cnt;
  int   since_start;
  int checks = 0, failures = 0;
  int n_cycles = 0, n_back_to_back = 0;

  islip_fsm #(.N_ITER(N_ITER)) dut (.clk, .reset, .start, .clear, .iterate, .first_iter, .done);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; start = 1'b0;
    m_state = 0; m_cnt = 0; since_start = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      logic e_clear, e_iter, e_first, e_done;
      @(negedge clk);
      start = (t < 400) ? 1'b1 : (($urandom % 3) == 0);
      #1;
      e_clear = (m_state != 1) && start;
      e_iter  = (m_state == 1);
      e_first = (m_state == 1) && (m_cnt == 0);
      e_done  = (m_state == 2);
      checks++;
      if ({clear, iterate, first_iter, done} !== {e_clear, e_iter, e_first, e_done}) begin
        failures++;
        $display("FAIL t=%0d state=%0d cnt=%0d got c/i/f/d=%b%b%b%b expected %b%b%b%b", t,
                 m_state, m_cnt, clear, iterate, first_iter, done, e_clear, e_iter, e_first, e_done);
      end
      if (e_done) begin
        n_cycles++;
        checks++;
        if (since_start != N_ITER + 1) begin
          failures++;
          $display("FAIL cycle length %0d, expected %0d", since_start, N_ITER + 1);
        end
        if (start) n_back_to_back++;
      end
      @(posedge clk);
      since_start++;
      case (m_state)
        0, 2: if (start) begin m_state = 1; m_cnt = 0; since_start = 1; end
              else m_state = 0;
        1:    if (m_cnt == N_ITER - 1) m_state = 2; else m_cnt++;
        default: m_state = 0;
      endcase
    end
    checks++;
    if (n_cycles == 0 || n_back_to_back == 0) begin
      failures++;
      $display("FAIL coverage cycles=%0d back_to_back=%0d", n_cycles, n_back_to_back);
    end
    $display("scheduling cycles=%0d back-to-back=%0d", n_cycles, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
