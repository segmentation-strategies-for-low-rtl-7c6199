// fir_control: sequencer of the time-multiplexed FIR filter. One multiplier,
// one shifter and one accumulator serve all N taps, so each output takes N
// cycles.
//
// In IDLE the controller is ready for a sample (in_ready_o = 1) and lets the
// coefficient memory be written (coef_ready_o = 1). When in_valid_i is high
// it writes the sample into the data memory at the circular write pointer,
// remembers that location as the newest sample and enters RUN. RUN lasts N
// cycles; in cycle k the coefficient address is k and the data address is
// that of sample x[n-k] (newest minus k, modulo N). acc_clear_o is high in
// cycle 0 so the sum restarts; acc_en_o is high in all N cycles. After the
// last tap out_valid_o pulses for one cycle, during which the accumulator
// holds y[n], and the controller is back in IDLE, so a new sample can be
// accepted in that same cycle.
//
// Timing: a sample accepted at edge e0 gives y[n] valid in the cycle after
// edge eN (latency N cycles); at most one sample per N+1 cycles. The
// controller and this schedule are this design's own; only the block's
// existence is given.
module fir_control #(
  parameter int unsigned N  = 89,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid_i,
  output logic          in_ready_o,
  output logic          coef_ready_o,
  output logic          dmem_we_o,
  output logic [AW-1:0] dmem_waddr_o,
  output logic [AW-1:0] dmem_raddr_o,
  output logic [AW-1:0] cmem_raddr_o,
  output logic          acc_en_o,
  output logic          acc_clear_o,
  output logic          out_valid_o
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e        state;
  logic [AW-1:0] wr_ptr;   // where the next sample goes
  logic [AW-1:0] newest;   // where the current sample went
  logic [AW-1:0] k;        // tap index
  logic          accept;
  logic          last_tap;

  assign in_ready_o   = (state == S_IDLE);
  assign coef_ready_o = (state == S_IDLE);
  assign accept       = in_valid_i && in_ready_o;
  assign last_tap     = (state == S_RUN) && (int'(k) == N - 1);

  assign dmem_we_o    = accept;
  assign dmem_waddr_o = wr_ptr;
  assign cmem_raddr_o = k;
  assign dmem_raddr_o = (newest >= k) ? (newest - k) : AW'(int'(newest) + N - int'(k));
  assign acc_en_o     = (state == S_RUN);
  assign acc_clear_o  = (state == S_RUN) && (k == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      wr_ptr      <= '0;
      newest      <= '0;
      k           <= '0;
      out_valid_o <= 1'b0;
    end else begin
      out_valid_o <= last_tap;
      case (state)
        S_IDLE: if (accept) begin
          newest <= wr_ptr;
          wr_ptr <= (int'(wr_ptr) == N - 1) ? '0 : wr_ptr + 1'b1;
          k      <= '0;
          state  <= S_RUN;
        end
        S_RUN: begin
          if (last_tap) begin
            k     <= '0;
            state <= S_IDLE;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The data memory may only change between outputs.
  a_no_write_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    dmem_we_o |-> state == S_IDLE);
  // out_valid follows the last tap and never lasts more than one cycle.
  a_out_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid_o |=> !out_valid_o);

endmodule
