// msesc_thresholds: on-the-fly threshold computation of the MSESC.
//
// When a new code is selected (load = 1 for one cycle) the unit registers
//   T1 = M * 2^-6      (slow-convergence limit on SYN)
//   T2 = M * 2^bits_f  (CNMM level above which IDD is switched off)
//   T3 = M * 2^-5      (SYN level below which IDD is switched off)
// where M is the number of parity check rows of the code and bits_f the
// number of fractional bits of the LLRs. Only shifts are used, so no table of
// per-code thresholds is needed. The formulas are those of the criterion; the
// rounding (the right shifts truncate) and the one-cycle register after load
// are this design's choices. bits_f values above LLR_W-1 are clamped to LLR_W-1,
// since a magnitude cannot have more fractional bits than it has bits.
//
// Timing: t1/t2/t3 change on the clock edge that samples load = 1 and hold
// their values until the next load. Reset clears them to 0.
module msesc_thresholds #(
  parameter int unsigned M_W   = msesc_pkg::bits_for(msesc_pkg::M_MAX_DEF),
  parameter int unsigned LLR_W = msesc_pkg::LLR_W_DEF,
  parameter int unsigned BF_W  = msesc_pkg::bits_for(LLR_W - 1),
  parameter int unsigned T2_W  = M_W + LLR_W - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [M_W-1:0]    m_rows,
  input  logic [BF_W-1:0]   bits_f,
  output logic [M_W-1:0]    t1,
  output logic [T2_W-1:0]   t2,
  output logic [M_W-1:0]    t3
);

  logic [BF_W-1:0] bf_clamped;
  logic [T2_W-1:0] m_ext;

  always_comb begin
    bf_clamped = (int'(bits_f) > int'(LLR_W - 1)) ? BF_W'(LLR_W - 1) : bits_f;
    m_ext      = T2_W'(m_rows);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1 <= '0;
      t2 <= '0;
      t3 <= '0;
    end else if (load) begin
      t1 <= m_rows >> 6;
      t2 <= m_ext << bf_clamped;
      t3 <= m_rows >> 5;
    end
  end

endmodule
