// tb_msesc_top: end-to-end test of the early stopping criterion attached to a
// 22-PE decoder, with every parameter at its default.
//
// The decoder itself is replaced by a behavioural stream generator: parity
// check l of the code is handled by PE l mod 22, and for each iteration the
// generator decides which checks are unsatisfied and what the smallest
// |R_new| of every check is, then streams each check's edges (sign of
// lambda_new, |R_new|) into the PE ports with random idle cycles. The
// per-iteration targets follow six trajectories: converging with early IDD
// switch-off, converging with IDD kept on, undecodable, undecodable with a
// broken trend, slowly converging, and undecodable with high reliability
// (runs to It_max). Codes are WiMAX and WiFi row counts with their row
// degrees, so thresholds are reloaded on every code change.
//
// Like the real decoder, the generator starts the next iteration right after
// iter_done, and abandons it when a stop decision comes in. The expected
// SYN, CNMM and decision of every iteration are computed here from the
// generated data and from the stopping rules, and compared with the outputs;
// the decision latency (P+2 clock edges after the one sampling iter_done) is
// checked too. Each mechanism (all four stop reasons, IDD switch-off, CNT
// increment and clear, threshold reload, interrupted iteration) is counted
// and must occur.
module tb_msesc_top;
  import msesc_pkg::*;

  localparam int unsigned P      = P_DEF;
  localparam int unsigned MAG_W  = LLR_W_DEF - 1;
  localparam int unsigned M_W    = bits_for(M_MAX_DEF);
  localparam int unsigned BF_W   = bits_for(LLR_W_DEF - 1);
  localparam int unsigned IT_W   = IT_W_DEF;
  localparam int unsigned T2_W   = M_W + LLR_W_DEF - 1;
  localparam int unsigned SYN_W  = bits_for(M_MAX_DEF);
  localparam int unsigned CNMM_W = bits_for(M_MAX_DEF * ((32'd1 << MAG_W) - 1));
  localparam int unsigned CNT_W  = bits_for(IT_ESC_DEF);
  localparam int          MAXMAG = (1 << MAG_W) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic code_load = 1'b0, frame_start = 1'b0, iter_done = 1'b0;
  logic [M_W-1:0]  m_rows = '0;
  logic [BF_W-1:0] bits_f = '0;
  logic [IT_W-1:0] it_max = '0;
  logic [P-1:0]    edge_valid = '0, edge_sign = '0, edge_last = '0;
  logic [P-1:0][MAG_W-1:0] edge_mag = '0;
  logic dec_valid, stop, idd_active, frame_over;
  stop_reason_e reason;
  logic [IT_W-1:0]   iter;
  logic [CNT_W-1:0]  cnt;
  logic [SYN_W-1:0]  syn;
  logic [CNMM_W-1:0] cnmm;
  logic [M_W-1:0]    t1, t3;
  logic [T2_W-1:0]   t2;

  msesc_top dut (.*);

  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  typedef struct packed {
    logic             sign;
    logic [MAG_W-1:0] mag;
    logic             last;
  } edge_t;

  typedef enum int {
    PR_CONV_DEACT, PR_CONV_IDD_ON, PR_UNDEC, PR_UNDEC_HICCUP, PR_SLOW, PR_RELIABLE_UNDEC
  } profile_e;

  edge_t q [P][$];

  int cur_m, cur_bf, cur_itmax;

  // Number of unsatisfied checks targeted in iteration it.
  function automatic int syn_target(profile_e pr, int it, int m);
    int d [8] = '{0, 0, 10, 5, 15, 25, 35, 45};
    case (pr)
      PR_CONV_DEACT:     return (it >= 5) ? 0 : (m / 8) >> (it - 1);
      PR_CONV_IDD_ON:    return (it >= 4) ? 0 : m / 4 - it * (m / 32);
      PR_UNDEC:          return m / 4 + it * (m / 64 + 1);
      PR_UNDEC_HICCUP:   return m / 4 + d[(it < 8) ? it : 7];
      PR_SLOW:           return m / 8;
      default:           return m / 8;
    endcase
  endfunction

  // Smallest |R_new| of check l in iteration it.
  function automatic int min_target(profile_e pr, int it, int l, int bf);
    int one = 1 << bf;
    case (pr)
      PR_CONV_DEACT:     return one * it + 1;
      PR_CONV_IDD_ON:    return $urandom_range(0, one);
      PR_UNDEC:          return ((l % 8) < (8 - it)) ? one : 0;
      PR_UNDEC_HICCUP:   return ((l % 8) < ((it == 3) ? 8 : (8 - it))) ? one : 0;
      PR_SLOW:           return (l % 2) * one;
      default:           return 2 * one;
    endcase
  endfunction

  // Fills the PE queues for one iteration; returns the expected SYN and CNMM.
  task automatic gen_iteration(input profile_e pr, input int it, input int deg_lo,
                               input int deg_hi, output int e_syn, output int e_cnmm);
    int st, deg, pos, mn, par, mg, s;
    st = syn_target(pr, it, cur_m);
    e_syn = 0; e_cnmm = 0;
    for (int p = 0; p < P; p++) q[p].delete();
    for (int l = 0; l < cur_m; l++) begin
      // Exactly st checks are unsatisfied: (l*7919 + it) mod M is a permutation.
      bit unsat = ((l * 7919 + it) % cur_m) < st;
      deg = $urandom_range(deg_lo, deg_hi);
      pos = $urandom_range(0, deg - 1);
      mn  = min_target(pr, it, l, cur_bf);
      if (mn > MAXMAG) mn = MAXMAG;
      par = 0;
      for (int e = 0; e < deg; e++) begin
        edge_t ed;
        mg = (e == pos) ? mn : mn + $urandom_range(0, 60);
        if (mg > MAXMAG) mg = MAXMAG;
        s = (e == deg - 1) ? (par ^ int'(unsat)) : $urandom_range(0, 1);
        par ^= s;
        ed.sign = 1'(s); ed.mag = MAG_W'(mg); ed.last = (e == deg - 1);
        q[l % P].push_back(ed);
      end
      e_syn  += int'(unsat);
      e_cnmm += mn;
    end
  endtask

  // ---------------------------------------------------------- reference model
  int  r_i, r_cnt, r_psyn, r_pcnmm;
  bit  r_idd;
  int  n_reason [5];
  int  n_deact = 0, n_cnt_up = 0, n_cnt_clr = 0, n_load = 0, n_interrupt = 0, n_stall = 0;

  function automatic int ref_step(input int s, input int c);
    int r = 0;
    bit slow;
    r_i++;
    slow = (5 * r_i >= 3 * cur_itmax) && (s > (cur_m >> 6));
    if (s == 0) r = 1;
    else if (r_idd) begin
      if (r_i >= 2 && (c > (cur_m << cur_bf) || s < (cur_m >> 5))) begin
        r_idd = 1'b0; n_deact++;
      end else if (c < r_pcnmm && s > r_psyn) begin
        r_cnt++; n_cnt_up++;
      end else begin
        if (r_cnt != 0) n_cnt_clr++;
        r_cnt = 0;
      end
      if (r_cnt == IT_ESC_DEF) r = 2;
      else if (slow) r = 3;
    end
    if (r == 0 && r_i == cur_itmax) r = 4;
    r_psyn = s; r_pcnmm = c;
    return r;
  endfunction

  int exp_syn [64], exp_cnmm [64];
  int unsigned t_done;

  // Compares a decision with the model; returns 1 if the frame has stopped.
  function automatic bit check_decision(input int k, input profile_e pr);
    int c_seen, r;
    bit idd_before;
    idd_before = r_idd;
    c_seen = idd_before ? exp_cnmm[k] : 0;
    r = ref_step(exp_syn[k], c_seen);
    n_reason[r]++;
    checks++;
    if (int'(syn) != exp_syn[k] || int'(cnmm) != c_seen) begin
      failures++;
      $display("FAIL M=%0d %s it %0d: syn=%0d/%0d cnmm=%0d/%0d", cur_m, pr.name(), k,
               syn, exp_syn[k], cnmm, c_seen);
    end
    checks++;
    if (int'(reason) != r || stop != (r != 0) || int'(iter) != k || int'(cnt) != r_cnt ||
        idd_active != r_idd || frame_over != (r != 0)) begin
      failures++;
      $display("FAIL M=%0d %s it %0d: reason=%0d/%0d iter=%0d cnt=%0d/%0d idd=%0d/%0d",
               cur_m, pr.name(), k, reason, r, iter, cnt, r_cnt, idd_active, r_idd);
    end
    checks++;
    if (cyc - t_done != P + 2) begin
      failures++;
      $display("FAIL decision latency %0d, expected %0d", cyc - t_done, P + 2);
    end
    return (r != 0);
  endfunction

  // ---------------------------------------------------------------- one frame
  task automatic run_frame(input int m, input int bf, input int itmax, input int deg_lo,
                           input int deg_hi, input profile_e pr, output int iters_run,
                           output int why);
    bit pending, stopped, busy;
    int k;
    if (m != cur_m || bf != cur_bf || itmax != cur_itmax) begin
      m_rows <= M_W'(m); bits_f <= BF_W'(bf); it_max <= IT_W'(itmax); code_load <= 1'b1;
      @(posedge clk); code_load <= 1'b0;
      cur_m = m; cur_bf = bf; cur_itmax = itmax;
      n_load++;
      #1 checks++;
      if (int'(t1) != (m >> 6) || int'(t2) != (m << bf) || int'(t3) != (m >> 5)) begin
        failures++; $display("FAIL thresholds M=%0d bf=%0d: %0d %0d %0d", m, bf, t1, t2, t3);
      end
    end
    frame_start <= 1'b1; @(posedge clk); frame_start <= 1'b0;
    r_i = 0; r_cnt = 0; r_psyn = 32'h7fffffff; r_pcnmm = 0; r_idd = 1'b1;
    pending = 0; stopped = 0; why = 0; iters_run = 0;
    for (k = 1; k <= itmax && !stopped; k++) begin
      gen_iteration(pr, k, deg_lo, deg_hi, exp_syn[k], exp_cnmm[k]);
      iters_run = k;
      // Stream until every PE is done, watching for the previous decision.
      busy = 1;
      while (busy && !stopped) begin
        busy = 0;
        for (int p = 0; p < P; p++) begin
          if (q[p].size() != 0 && $urandom_range(0, 7) != 0) begin
            edge_t ed = q[p].pop_front();
            edge_valid[p] <= 1'b1; edge_sign[p] <= ed.sign; edge_mag[p] <= ed.mag;
            edge_last[p]  <= ed.last;
          end else begin
            edge_valid[p] <= 1'b0; edge_sign[p] <= 1'($urandom); edge_last[p] <= 1'($urandom);
            edge_mag[p] <= MAG_W'($urandom);
          end
          if (q[p].size() != 0) busy = 1;
        end
        @(posedge clk);
        #1;
        if (pending && dec_valid) begin
          pending = 0;
          if (check_decision(k - 1, pr)) begin
            stopped = 1; why = int'(reason);
            n_interrupt++;
          end
        end
      end
      edge_valid <= '0;
      if (stopped) break;
      // The decision of the previous iteration must be in before iter_done.
      while (pending) begin
        @(posedge clk); #1 n_stall++;
        if (dec_valid) begin
          pending = 0;
          if (check_decision(k - 1, pr)) begin stopped = 1; why = int'(reason); end
        end
      end
      if (stopped) break;
      iter_done <= 1'b1; @(posedge clk); iter_done <= 1'b0;
      #1 t_done = cyc;
      pending = 1;
    end
    // Decision of the last iteration streamed.
    while (pending) begin
      @(posedge clk); #1;
      if (dec_valid) begin
        pending = 0;
        if (check_decision(k - 1, pr)) why = int'(reason);
        else begin failures++; $display("FAIL no stop after It_max"); end
      end
    end
    checks++;
    if (!frame_over) begin failures++; $display("FAIL frame not over"); end
  endtask

  // -------------------------------------------------------------------- main
  // M, bits_f, It_max, row degree range of each code.
  localparam int NCODES = 9;
  int codes [NCODES][5] = '{
    '{1152, 3, 10,  6,  7},  // WiMAX N=2304 R=1/2
    '{ 972, 3, 20,  7,  8},  // WiFi  N=1944 R=1/2, It_max = 20
    '{ 972, 3, 10,  7,  8},  // WiFi  N=1944 R=1/2, It_max = 10
    '{ 320, 1, 10, 10, 11},  // WiMAX N=960  R=2/3
    '{ 486, 0, 10, 14, 15},  // WiFi  N=1944 R=3/4
    '{ 240, 3, 10, 20, 20},  // WiMAX N=1440 R=5/6
    '{  96, 1, 10, 20, 20},  // WiMAX N=576  R=5/6
    '{1008, 3, 10,  6,  7},  // WiMAX N=2016 R=1/2
    '{ 216, 2, 10, 14, 15}   // WiMAX N=864  R=3/4
  };
  // Reason each trajectory must end with (default nesting of the rules).
  int expect_why [6] = '{1, 1, 2, 2, 3, 4};

  initial begin
    int its, why, total_its;
    cur_m = -1; cur_bf = -1; cur_itmax = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    total_its = 0;
    for (int c = 0; c < NCODES; c++) begin
      for (int pr = 0; pr < 6; pr++) begin
        profile_e pe;
        pe = profile_e'(pr);
        run_frame(codes[c][0], codes[c][1], codes[c][2], codes[c][3], codes[c][4],
                  pe, its, why);
        total_its += its;
        checks++;
        if (why != expect_why[pr]) begin
          failures++;
          $display("FAIL M=%0d %s ended with reason %0d after %0d iterations, expected %0d",
                   codes[c][0], pe.name(), why, its, expect_why[pr]);
        end
      end
    end
    $display("stops: success=%0d impossible=%0d slow=%0d max_iter=%0d; IDD off=%0d CNT up=%0d CNT cleared=%0d",
             n_reason[1], n_reason[2], n_reason[3], n_reason[4], n_deact, n_cnt_up, n_cnt_clr);
    $display("threshold reloads=%0d interrupted iterations=%0d stall cycles=%0d iterations=%0d",
             n_load, n_interrupt, n_stall, total_its);
    checks++;
    if (n_reason[1] == 0 || n_reason[2] == 0 || n_reason[3] == 0 || n_reason[4] == 0 ||
        n_deact == 0 || n_cnt_up == 0 || n_cnt_clr == 0 || n_load < 2 || n_interrupt == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
