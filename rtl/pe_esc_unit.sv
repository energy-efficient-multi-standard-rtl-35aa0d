// pe_esc_unit: per-PE on-the-fly partial syndrome and partial CNMM.
//
// Each decoder PE streams, for every parity check it processes, the updated
// messages of that check one edge per cycle: the sign of lambda_new (hard
// decision of the bit) and |R_new|. The unit XORs the signs and keeps the
// smallest |R_new| of the check. On the last edge of a check the parity bit
// is added to the partial syndrome and the minimum to the partial CNMM, so
// that at the end of an iteration the unit holds
//   psyn  = number of this PE's checks that are not satisfied
//   pcnmm = sum over this PE's checks of min_k |R_lk|
// No extra memory access is needed: the values are those the PE has just
// produced. Accumulating per check, per PE, and gathering afterwards follows
// the criterion; the serial edge interface is this design's choice.
//
// cnmm_en (the IDD-active flag) gates the CNMM path: while impossible
// decoding detection is off, neither the running minimum nor the CNMM sum
// toggles. The syndrome path always runs, since the parity-check stop needs it.
//
// iter_done (one cycle, after or together with the last edge of the
// iteration) copies the accumulators into psyn/pcnmm and clears them, so the
// PE can start the next iteration while the partial values are gathered.
// frame_start clears everything. The syndrome counter is wide enough for
// ceil(M_MAX/P) checks per PE; the decoder is assumed never to map more
// checks than that onto one PE.
module pe_esc_unit #(
  parameter int unsigned MAG_W   = msesc_pkg::LLR_W_DEF - 1,
  parameter int unsigned PSYN_W  = msesc_pkg::bits_for(
                                     (msesc_pkg::M_MAX_DEF + msesc_pkg::P_DEF - 1) / msesc_pkg::P_DEF),
  parameter int unsigned PCNMM_W = msesc_pkg::bits_for(
                                     ((msesc_pkg::M_MAX_DEF + msesc_pkg::P_DEF - 1) / msesc_pkg::P_DEF)
                                     * ((32'd1 << (msesc_pkg::LLR_W_DEF - 1)) - 1))
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_start,
  input  logic               cnmm_en,
  input  logic               edge_valid,
  input  logic               edge_sign,
  input  logic [MAG_W-1:0]   edge_mag,
  input  logic               edge_last,
  input  logic               iter_done,
  output logic [PSYN_W-1:0]  psyn,
  output logic [PCNMM_W-1:0] pcnmm
);

  logic               run_xor;
  logic [MAG_W-1:0]   run_min;
  logic [PSYN_W-1:0]  syn_acc;
  logic [PCNMM_W-1:0] cnmm_acc;

  logic               chk_par;
  logic [MAG_W-1:0]   chk_min;
  logic [PSYN_W-1:0]  syn_nxt;
  logic [PCNMM_W-1:0] cnmm_nxt;

  always_comb begin
    chk_par  = run_xor ^ edge_sign;
    chk_min  = (edge_mag < run_min) ? edge_mag : run_min;
    syn_nxt  = syn_acc;
    cnmm_nxt = cnmm_acc;
    if (edge_valid && edge_last) begin
      syn_nxt = syn_acc + PSYN_W'(chk_par);
      if (cnmm_en) cnmm_nxt = cnmm_acc + PCNMM_W'(chk_min);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_xor  <= 1'b0;
      run_min  <= '1;
      syn_acc  <= '0;
      cnmm_acc <= '0;
      psyn     <= '0;
      pcnmm    <= '0;
    end else if (frame_start) begin
      run_xor  <= 1'b0;
      run_min  <= '1;
      syn_acc  <= '0;
      cnmm_acc <= '0;
      psyn     <= '0;
      pcnmm    <= '0;
    end else begin
      if (edge_valid) begin
        run_xor <= edge_last ? 1'b0 : chk_par;
        if (cnmm_en) run_min <= edge_last ? '1 : chk_min;
      end
      if (iter_done) begin
        psyn     <= syn_nxt;
        pcnmm    <= cnmm_nxt;
        syn_acc  <= '0;
        cnmm_acc <= '0;
      end else begin
        syn_acc  <= syn_nxt;
        cnmm_acc <= cnmm_nxt;
      end
    end
  end

endmodule
