// tb_msesc_ctrl: self-checking test of the MSESC decision controller.
// Two controllers are driven with the same metric sequences: one with the
// default nesting (slow-convergence test only while IDD is active) and one
// with SLOW_AFTER_IDD_OFF = 1. A reference model written here from the
// stopping rules predicts every decision. Frames use random thresholds and
// It_max and metric sequences shaped to be successful, undecodable, slowly
// converging or random, so that every rule fires; the number of times each
// one fires is checked at the end.
module tb_msesc_ctrl;
  import msesc_pkg::*;
  localparam int unsigned SYN_W  = 11;
  localparam int unsigned CNMM_W = 20;
  localparam int unsigned M_W    = 11;
  localparam int unsigned T2_W   = 20;
  localparam int unsigned IT_W   = 6;
  localparam int unsigned IT_ESC = 2;
  localparam int unsigned CNT_W  = 2;

  logic clk = 1'b0, rst_n = 1'b0, frame_start = 1'b0, eval = 1'b0;
  logic [IT_W-1:0]   it_max = IT_W'(10);
  logic [M_W-1:0]    t1 = '0, t3 = '0;
  logic [T2_W-1:0]   t2 = '0;
  logic [SYN_W-1:0]  syn = '0;
  logic [CNMM_W-1:0] cnmm = '0;

  logic              dv   [2];
  logic              stp  [2];
  stop_reason_e      rsn  [2];
  logic              idd  [2];
  logic              fo   [2];
  logic [IT_W-1:0]   itr  [2];
  logic [CNT_W-1:0]  cnt  [2];

  int checks = 0, failures = 0;
  int hits [2][5];
  int n_deact = 0, n_cnt_up = 0, n_cnt_clr = 0;

  msesc_ctrl #(.SYN_W(SYN_W), .CNMM_W(CNMM_W), .M_W(M_W), .T2_W(T2_W), .IT_W(IT_W),
               .IT_ESC(IT_ESC), .IDD_MIN_IT(2), .SLOW_AFTER_IDD_OFF(1'b0), .CNT_W(CNT_W)) dut0 (
    .clk, .rst_n, .frame_start, .it_max, .t1, .t2, .t3, .eval, .syn, .cnmm,
    .dec_valid(dv[0]), .stop(stp[0]), .reason(rsn[0]), .idd_active(idd[0]),
    .frame_over(fo[0]), .iter(itr[0]), .cnt(cnt[0]));
  msesc_ctrl #(.SYN_W(SYN_W), .CNMM_W(CNMM_W), .M_W(M_W), .T2_W(T2_W), .IT_W(IT_W),
               .IT_ESC(IT_ESC), .IDD_MIN_IT(2), .SLOW_AFTER_IDD_OFF(1'b1), .CNT_W(CNT_W)) dut1 (
    .clk, .rst_n, .frame_start, .it_max, .t1, .t2, .t3, .eval, .syn, .cnmm,
    .dec_valid(dv[1]), .stop(stp[1]), .reason(rsn[1]), .idd_active(idd[1]),
    .frame_over(fo[1]), .iter(itr[1]), .cnt(cnt[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state, one per controller variant.
  int  m_i [2], m_cnt [2], m_psyn [2], m_pcnmm [2];
  bit  m_idd [2], m_over [2];

  function automatic int ref_step(input int v, input int s, input int c);
    int r = 0;  // 0 none, 1 success, 2 impossible, 3 slow, 4 max
    bit slow;
    m_i[v]++;
    // i >= 0.6 * It_max, computed in real arithmetic.
    slow = (real'(m_i[v]) >= 0.6 * real'(it_max)) && (s > int'(t1));
    if (s == 0) r = 1;
    else if (m_idd[v]) begin
      if (m_i[v] >= 2 && (c > int'(t2) || s < int'(t3))) begin
        m_idd[v] = 1'b0; if (v == 0) n_deact++;
      end else if (c < m_pcnmm[v] && s > m_psyn[v]) begin
        m_cnt[v]++; if (v == 0) n_cnt_up++;
      end else begin
        if (v == 0 && m_cnt[v] != 0) n_cnt_clr++;
        m_cnt[v] = 0;
      end
      if (m_cnt[v] == IT_ESC) r = 2;
      else if (slow) r = 3;
    end else if (v == 1 && slow) r = 3;
    if (r == 0 && m_i[v] == int'(it_max)) r = 4;
    m_psyn[v]  = s;
    m_pcnmm[v] = c;
    if (r != 0) m_over[v] = 1'b1;
    return r;
  endfunction

  initial begin
    int m, kind, s, c, r;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int frame = 0; frame < 3000; frame++) begin
      m      = $urandom_range(96, 1152);
      it_max <= IT_W'($urandom_range(0, 3) == 0 ? 20 : ($urandom_range(0, 1) ? 10 : $urandom_range(3, 25)));
      t1     <= M_W'(m >> 6);
      t3     <= M_W'(m >> 5);
      t2     <= T2_W'(m << $urandom_range(0, 3));
      frame_start <= 1'b1; @(posedge clk); frame_start <= 1'b0;
      for (int v = 0; v < 2; v++) begin
        m_i[v] = 0; m_cnt[v] = 0; m_psyn[v] = 32'h7fffffff; m_pcnmm[v] = 0;
        m_idd[v] = 1'b1; m_over[v] = 1'b0;
      end
      kind = frame % 5;
      // Starting metrics.
      s = $urandom_range(int'(t3), m / 2 + int'(t3) + 1);
      c = $urandom_range(0, int'(t2));
      for (int it = 1; it <= 30 && !(m_over[0] && m_over[1]); it++) begin
        case (kind)
          0: begin  // converging: SYN falls, CNMM rises
            s = s / 2 - $urandom_range(0, 2); if (s < 0) s = 0;
            c = c + $urandom_range(0, int'(t2) / 2 + 1);
          end
          1: begin  // undecodable: CNMM falls and SYN rises, with hiccups
            if ($urandom_range(0, 4) != 0) begin
              s = s + $urandom_range(1, 20); c = (c > 10) ? c - $urandom_range(1, 10) : c;
            end else begin
              s = s - $urandom_range(0, 5); c = c + $urandom_range(0, 5);
            end
          end
          2: begin  // slow: SYN stays between T1 and T3, CNMM below T2
            s = $urandom_range(int'(t1) + 1, int'(t3) + 10);
            c = $urandom_range(0, int'(t2));
          end
          3: begin  // high-SNR undecodable: CNMM above T2, SYN stays above T1
            s = $urandom_range(int'(t1) + 1, int'(t3) + 20);
            c = int'(t2) + $urandom_range(1, 100);
          end
          default: begin
            s = $urandom_range(0, 3) == 0 ? 0 : $urandom_range(0, 2 * int'(t3) + 2);
            c = $urandom_range(0, 2 * int'(t2) + 2);
          end
        endcase
        if (s > (1 << SYN_W) - 1) s = (1 << SYN_W) - 1;
        if (s < 0) s = 0;
        if (c < 0) c = 0;
        syn <= SYN_W'(s); cnmm <= CNMM_W'(c); eval <= 1'b1;
        @(posedge clk); eval <= 1'b0;
        #1;
        for (int v = 0; v < 2; v++) begin
          if (m_over[v]) begin
            checks++;
            if (dv[v]) begin failures++; $display("FAIL v%0d decision after stop", v); end
            continue;
          end
          r = ref_step(v, s, c);
          checks++;
          if (!dv[v] || int'(rsn[v]) != r || stp[v] != (r != 0) || int'(itr[v]) != m_i[v] ||
              int'(cnt[v]) != m_cnt[v] || idd[v] != m_idd[v] || fo[v] != (r != 0)) begin
            failures++;
            $display("FAIL v%0d frame %0d it %0d: dv=%0d reason=%0d/%0d iter=%0d/%0d cnt=%0d/%0d idd=%0d/%0d",
                     v, frame, it, dv[v], rsn[v], r, itr[v], m_i[v], cnt[v], m_cnt[v], idd[v], m_idd[v]);
          end
          hits[v][r]++;
        end
        @(posedge clk);
      end
    end
    for (int v = 0; v < 2; v++)
      for (int r = 1; r < 5; r++) begin
        checks++;
        if (hits[v][r] == 0) begin failures++; $display("FAIL v%0d: reason %0d never seen", v, r); end
      end
    checks++;
    if (n_deact == 0 || n_cnt_up == 0 || n_cnt_clr == 0) begin
      failures++; $display("FAIL coverage deact=%0d up=%0d clr=%0d", n_deact, n_cnt_up, n_cnt_clr);
    end
    $display("reasons (default): success=%0d impossible=%0d slow=%0d max=%0d; IDD off=%0d CNT up=%0d CNT cleared=%0d",
             hits[0][1], hits[0][2], hits[0][3], hits[0][4], n_deact, n_cnt_up, n_cnt_clr);
    $display("reasons (slow after IDD off): success=%0d impossible=%0d slow=%0d max=%0d",
             hits[1][1], hits[1][2], hits[1][3], hits[1][4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
