// esc_gather: collects the partial syndrome and CNMM values of all PEs.
//
// At the end of an iteration every PE holds a partial SYN and a partial CNMM.
// Following the criterion, they are brought over dedicated connections and
// summed one PE at a time, so a single adder per metric serves all P PEs:
// start (one cycle) clears the sums; in each of the next P cycles the values
// of PE 0, 1, ..., P-1 are added. done pulses in the cycle after the last
// addition, with syn/cnmm holding SYN^i and CNMM^i; they then hold until the
// next start. The latency is therefore P+1 cycles from start to done.
// cnmm_en (IDD active) gates the CNMM adder, which stays idle when impossible
// decoding detection is off. A start while busy restarts the gathering.
module esc_gather #(
  parameter int unsigned P       = msesc_pkg::P_DEF,
  parameter int unsigned PSYN_W  = 6,
  parameter int unsigned PCNMM_W = 15,
  parameter int unsigned SYN_W   = PSYN_W + msesc_pkg::bits_for(P),
  parameter int unsigned CNMM_W  = PCNMM_W + msesc_pkg::bits_for(P)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic                           cnmm_en,
  input  logic [P-1:0][PSYN_W-1:0]       psyn,
  input  logic [P-1:0][PCNMM_W-1:0]      pcnmm,
  output logic                           busy,
  output logic                           done,
  output logic [SYN_W-1:0]               syn,
  output logic [CNMM_W-1:0]              cnmm
);

  localparam int unsigned IDX_W = msesc_pkg::bits_for(P - 1);

  logic [IDX_W-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      syn  <= '0;
      cnmm <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        idx  <= '0;
        busy <= 1'b1;
        syn  <= '0;
        cnmm <= '0;
      end else if (busy) begin
        syn <= syn + SYN_W'(psyn[idx]);
        if (cnmm_en) cnmm <= cnmm + CNMM_W'(pcnmm[idx]);
        if (idx == IDX_W'(P - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          idx  <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
