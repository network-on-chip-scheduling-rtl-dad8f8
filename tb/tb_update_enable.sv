// tb_update_enable: random self-check of the pointer-update enables at
// N = 8. An enable is expected exactly when the first iteration is running
// and the port's accept vector has a bit set.
module tb_update_enable;
  localparam int unsigned N = 8;
  logic [N-1:0] output_acc [N];
  logic [N-1:0] input_acc  [N];
  logic         first_iter;
  logic [N-1:0] grant_update, accept_update;
  int checks = 0, failures = 0;

  update_enable #(.N(N)) dut (.output_acc, .input_acc, .first_iter, .grant_update, .accept_update);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      first_iter = 1'($urandom);
      for (int k = 0; k < N; k++) begin
        // mostly empty or one-hot vectors, as the arbiters produce
        output_acc[k] = ($urandom % 2) ? (N'(1) << ($urandom % N)) : '0;
        input_acc[k]  = ($urandom % 2) ? (N'(1) << ($urandom % N)) : '0;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        logic eg, ea;
        eg = first_iter && (output_acc[i] != 0);
        ea = first_iter && (input_acc[i] != 0);
        checks++;
        if (grant_update[i] !== eg || accept_update[i] !== ea) begin
          failures++;
          $display("FAIL port %0d first=%b gu=%b (exp %b) au=%b (exp %b)", i, first_iter,
                   grant_update[i], eg, accept_update[i], ea);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
