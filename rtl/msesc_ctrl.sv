// msesc_ctrl: the per-iteration decision of the multi-standard early stopping
// criterion.
//
// One evaluation (eval = 1 for one cycle, with SYN^i and CNMM^i of the
// iteration just finished) runs the body of the criterion's main loop for
// iteration i (counted from 1 after frame_start):
//   1. SYN^i = 0                         -> stop, successful decoding.
//   2. otherwise, only while IDD (impossible decoding detection) is active:
//      a. i >= IDD_MIN_IT and (CNMM^i > T2 or SYN^i < T3) -> IDD off for the
//         rest of the frame;
//      b. else CNMM^i < CNMM^(i-1) and SYN^i > SYN^(i-1)   -> CNT + 1;
//      c. else                                             -> CNT = 0;
//      d. CNT = It_ESC                                      -> stop, impossible;
//      e. i >= 0.6*It_max and SYN^i > T1                    -> stop, slow
//         convergence (tested as 5*i >= 3*It_max, exact and shift-add only).
//   3. if nothing stopped and i = It_max, report the end of the budget.
// CNMM^0 is taken as 0 and SYN^0 as the largest value, so the trend test of
// iteration 1 never counts. The decision order and the conditions follow the
// criterion. Its text also says that step 2e catches, at high SNR, frames
// that have already passed step 2a; as written, step 2e is skipped once IDD
// is off. SLOW_AFTER_IDD_OFF = 1 evaluates step 2e also after IDD was
// switched off; the default 0 keeps the nesting of the listing. It_ESC,
// whose value is not given, is a parameter (default 2).
//
// Timing: the decision is registered. dec_valid pulses in the cycle after
// eval, with stop, reason, iter (= i), cnt and idd_active valid from then on
// (they hold until the next eval). After a stop the controller ignores eval
// until frame_start, which resets CNT, the iteration counter and re-activates
// IDD.
module msesc_ctrl
  import msesc_pkg::*;
#(
  parameter int unsigned SYN_W              = 11,
  parameter int unsigned CNMM_W             = 20,
  parameter int unsigned M_W                = bits_for(M_MAX_DEF),
  parameter int unsigned T2_W               = M_W + LLR_W_DEF - 1,
  parameter int unsigned IT_W               = IT_W_DEF,
  parameter int unsigned IT_ESC             = IT_ESC_DEF,
  parameter int unsigned IDD_MIN_IT         = 2,
  parameter bit          SLOW_AFTER_IDD_OFF = 1'b0,
  parameter int unsigned CNT_W              = bits_for(IT_ESC)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic [IT_W-1:0]   it_max,
  input  logic [M_W-1:0]    t1,
  input  logic [T2_W-1:0]   t2,
  input  logic [M_W-1:0]    t3,
  input  logic              eval,
  input  logic [SYN_W-1:0]  syn,
  input  logic [CNMM_W-1:0] cnmm,
  output logic              dec_valid,
  output logic              stop,
  output stop_reason_e      reason,
  output logic              idd_active,
  output logic              frame_over,
  output logic [IT_W-1:0]   iter,
  output logic [CNT_W-1:0]  cnt
);

  logic [SYN_W-1:0]  prev_syn;
  logic [CNMM_W-1:0] prev_cnmm;

  // Combinational evaluation of one iteration.
  logic [IT_W-1:0]   i_now;
  logic [IT_W+2:0]   i_x5, itmax_x3;
  logic              late, slow_hit, deact, trend;
  logic [CNT_W-1:0]  cnt_nxt;
  logic              idd_nxt;
  stop_reason_e      reason_nxt;

  always_comb begin
    i_now    = iter + 1'b1;
    i_x5     = ((IT_W+3)'(i_now) << 2) + (IT_W+3)'(i_now);
    itmax_x3 = ((IT_W+3)'(it_max) << 1) + (IT_W+3)'(it_max);
    late     = (i_x5 >= itmax_x3);
    slow_hit = late && (syn > SYN_W'(t1));
    deact    = (int'(i_now) >= int'(IDD_MIN_IT)) &&
               ((CNMM_W'(cnmm) > CNMM_W'(t2)) || (syn < SYN_W'(t3)));
    trend    = (cnmm < prev_cnmm) && (syn > prev_syn);

    cnt_nxt    = cnt;
    idd_nxt    = idd_active;
    reason_nxt = STOP_NONE;

    if (syn == '0) begin
      reason_nxt = STOP_SUCCESS;
    end else if (idd_active) begin
      if (deact)      idd_nxt = 1'b0;
      else if (trend) cnt_nxt = cnt + 1'b1;
      else            cnt_nxt = '0;
      if (int'(cnt_nxt) == int'(IT_ESC)) reason_nxt = STOP_IMPOSSIBLE;
      else if (slow_hit)                 reason_nxt = STOP_SLOW_CONV;
    end else if (SLOW_AFTER_IDD_OFF && slow_hit) begin
      reason_nxt = STOP_SLOW_CONV;
    end

    if (reason_nxt == STOP_NONE && i_now == it_max) reason_nxt = STOP_MAX_ITER;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iter       <= '0;
      cnt        <= '0;
      idd_active <= 1'b1;
      prev_syn   <= '1;
      prev_cnmm  <= '0;
      dec_valid  <= 1'b0;
      stop       <= 1'b0;
      reason     <= STOP_NONE;
      frame_over <= 1'b0;
    end else begin
      dec_valid <= 1'b0;
      if (frame_start) begin
        iter       <= '0;
        cnt        <= '0;
        idd_active <= 1'b1;
        prev_syn   <= '1;
        prev_cnmm  <= '0;
        stop       <= 1'b0;
        reason     <= STOP_NONE;
        frame_over <= 1'b0;
      end else if (eval && !frame_over) begin
        iter       <= i_now;
        cnt        <= cnt_nxt;
        idd_active <= idd_nxt;
        prev_syn   <= syn;
        prev_cnmm  <= cnmm;
        dec_valid  <= 1'b1;
        stop       <= (reason_nxt != STOP_NONE);
        reason     <= reason_nxt;
        frame_over <= (reason_nxt != STOP_NONE);
      end
    end
  end

endmodule
