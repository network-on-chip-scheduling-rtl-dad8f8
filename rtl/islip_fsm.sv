// islip_fsm: controller of the modified i-SLIP scheduler.
//
// Counts the iterations of one scheduling cycle and tells the datapath what
// to do in each clock:
//   ST_IDLE  waiting; when `start` is high, `clear` empties the match
//            registers and the next clock begins iteration 0.
//   ST_ITER  one request/grant/accept iteration per clock (`iterate` high);
//            `first_iter` is high in iteration 0 only, the one iteration in
//            which the arbiters' pointers may move. After iteration
//            N_ITER-1 the FSM goes to ST_DONE.
//   ST_DONE  `done` is high for one clock and the match is valid. If
//            `start` is still high a new cycle follows at once (with
//            `clear`), otherwise the FSM returns to ST_IDLE.
// With `start` held high a scheduling cycle therefore takes N_ITER + 1
// clocks. The number of iterations and the START/DONE handshake follow the
// design; the state encoding and the single DONE clock are this
// implementation's choice. Reset is asynchronous and active high.
module islip_fsm #(
  parameter int unsigned N_ITER = islip_pkg::N_ITER,
  localparam int unsigned CW = (N_ITER > 1) ? $clog2(N_ITER) : 1
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  output logic clear,
  output logic iterate,
  output logic first_iter,
  output logic done
);

  import islip_pkg::*;

  sched_state_e state, state_n;
  logic [CW-1:0] cnt, cnt_n;

  always_comb begin
    state_n = state;
    cnt_n   = cnt;
    clear   = 1'b0;
    unique case (state)
      ST_IDLE, ST_DONE: begin
        if (start) begin
          clear   = 1'b1;
          state_n = ST_ITER;
          cnt_n   = '0;
        end else begin
          state_n = ST_IDLE;
        end
      end
      ST_ITER: begin
        if (32'(cnt) == N_ITER - 1) state_n = ST_DONE;
        else                        cnt_n   = cnt + CW'(1);
      end
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
    end
  end

  assign iterate    = (state == ST_ITER);
  assign first_iter = (state == ST_ITER) && (cnt == '0);
  assign done       = (state == ST_DONE);

endmodule
