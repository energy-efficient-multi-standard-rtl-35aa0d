// msesc_top: the multi-standard early stopping criterion (MSESC) as attached
// to a P-PE LDPC decoder.
//
// The decoder's PEs are outside this module. Each PE streams the messages it
// has just updated (sign of lambda_new and |R_new|, one edge per cycle, with
// a flag on the last edge of each parity check) into its own pe_esc_unit,
// which keeps a partial syndrome and a partial CNMM on the fly. When the
// decoder ends an iteration it pulses iter_done: the partial values are
// latched, esc_gather adds them up one PE per cycle, and msesc_ctrl takes the
// decision of the criterion for that iteration. The thresholds T1, T2 and T3
// come from msesc_thresholds, loaded from the code's row count M and the LLR
// fractional bits whenever the code changes (code_load). The IDD-active flag
// of the controller switches off the CNMM logic of all PEs and of the gather
// unit for the rest of the frame once the criterion deems that unnecessary.
//
// Interface: configuration (code_load, m_rows, bits_f, it_max) is sampled
// on code_load; frame_start begins a new codeword. The per-PE edge streams
// are arrays indexed by PE. The decoder may start iteration i+1 as soon as
// it has pulsed iter_done for iteration i: the decision for iteration i
// arrives while i+1 runs and, if stop is set, the decoder abandons the
// running iteration. iter_done must not be pulsed again before that
// decision (dec_valid) has arrived.
//
// Timing: dec_valid is high in the cycle that follows the (P+2)-th clock
// edge after the edge sampling iter_done (one edge latches the partial
// values and starts the gather, P edges add them, one more registers the
// decision): 24 cycles with 22 PEs. syn and cnmm show SYN^i and CNMM^i from the
// decision on. How the criterion is split into these blocks, the sums being
// gathered serially, and the latency follow the criterion's hardware
// description; the handshake and the widths are this design's own.
module msesc_top
  import msesc_pkg::*;
#(
  parameter int unsigned P                  = P_DEF,
  parameter int unsigned M_MAX              = M_MAX_DEF,
  parameter int unsigned LLR_W              = LLR_W_DEF,
  parameter int unsigned IT_W               = IT_W_DEF,
  parameter int unsigned IT_ESC             = IT_ESC_DEF,
  parameter int unsigned IDD_MIN_IT         = 2,
  parameter bit          SLOW_AFTER_IDD_OFF = 1'b0,
  // Derived widths.
  parameter int unsigned MAG_W   = LLR_W - 1,
  parameter int unsigned M_W     = bits_for(M_MAX),
  parameter int unsigned BF_W    = bits_for(LLR_W - 1),
  parameter int unsigned T2_W    = M_W + LLR_W - 1,
  parameter int unsigned CPP     = (M_MAX + P - 1) / P,
  parameter int unsigned PSYN_W  = bits_for(CPP),
  parameter int unsigned PCNMM_W = bits_for(CPP * ((32'd1 << MAG_W) - 1)),
  parameter int unsigned SYN_W   = bits_for(M_MAX),
  parameter int unsigned CNMM_W  = bits_for(M_MAX * ((32'd1 << MAG_W) - 1)),
  parameter int unsigned CNT_W   = bits_for(IT_ESC)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // Code configuration.
  input  logic                      code_load,
  input  logic [M_W-1:0]            m_rows,
  input  logic [BF_W-1:0]           bits_f,
  input  logic [IT_W-1:0]           it_max,
  // Decoder control.
  input  logic                      frame_start,
  input  logic                      iter_done,
  // Per-PE edge streams.
  input  logic [P-1:0]              edge_valid,
  input  logic [P-1:0]              edge_sign,
  input  logic [P-1:0][MAG_W-1:0]   edge_mag,
  input  logic [P-1:0]              edge_last,
  // Decision.
  output logic                      dec_valid,
  output logic                      stop,
  output stop_reason_e              reason,
  output logic                      idd_active,
  output logic                      frame_over,
  output logic [IT_W-1:0]           iter,
  output logic [CNT_W-1:0]          cnt,
  output logic [SYN_W-1:0]          syn,
  output logic [CNMM_W-1:0]         cnmm,
  // Current thresholds.
  output logic [M_W-1:0]            t1,
  output logic [T2_W-1:0]           t2,
  output logic [M_W-1:0]            t3
);

  logic [P-1:0][PSYN_W-1:0]  psyn;
  logic [P-1:0][PCNMM_W-1:0] pcnmm;
  logic                      gather_start, gather_busy, gather_done;
  logic [IT_W-1:0]           it_max_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gather_start <= 1'b0;
      it_max_q     <= IT_W'(10);
    end else begin
      gather_start <= iter_done;
      if (code_load) it_max_q <= it_max;
    end
  end

  msesc_thresholds #(.M_W(M_W), .LLR_W(LLR_W), .BF_W(BF_W), .T2_W(T2_W)) u_thr (
    .clk, .rst_n, .load(code_load), .m_rows, .bits_f, .t1, .t2, .t3
  );

  for (genvar p = 0; p < P; p++) begin : g_pe
    pe_esc_unit #(.MAG_W(MAG_W), .PSYN_W(PSYN_W), .PCNMM_W(PCNMM_W)) u_pe (
      .clk, .rst_n, .frame_start,
      .cnmm_en   (idd_active),
      .edge_valid(edge_valid[p]),
      .edge_sign (edge_sign[p]),
      .edge_mag  (edge_mag[p]),
      .edge_last (edge_last[p]),
      .iter_done,
      .psyn      (psyn[p]),
      .pcnmm     (pcnmm[p])
    );
  end

  esc_gather #(.P(P), .PSYN_W(PSYN_W), .PCNMM_W(PCNMM_W),
               .SYN_W(SYN_W), .CNMM_W(CNMM_W)) u_gather (
    .clk, .rst_n,
    .start  (gather_start),
    .cnmm_en(idd_active),
    .psyn, .pcnmm,
    .busy   (gather_busy),
    .done   (gather_done),
    .syn, .cnmm
  );

  msesc_ctrl #(.SYN_W(SYN_W), .CNMM_W(CNMM_W), .M_W(M_W), .T2_W(T2_W),
               .IT_W(IT_W), .IT_ESC(IT_ESC), .IDD_MIN_IT(IDD_MIN_IT),
               .SLOW_AFTER_IDD_OFF(SLOW_AFTER_IDD_OFF), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .frame_start,
    .it_max(it_max_q),
    .t1, .t2, .t3,
    .eval  (gather_done),
    .syn, .cnmm,
    .dec_valid, .stop, .reason, .idd_active, .frame_over, .iter, .cnt
  );

  // The decoder must wait for a decision before ending another iteration.
  a_no_iter_done_while_gathering: assert property (
    @(posedge clk) disable iff (!rst_n) iter_done |-> !(gather_busy || gather_start));

endmodule
