// tb_pe_esc_unit: self-checking test of the per-PE partial syndrome / CNMM
// unit. Streams random parity checks (random degree, signs, magnitudes and
// idle cycles), computes for each iteration the number of unsatisfied checks
// and the sum of the per-check minimum magnitude, and compares them with the
// values latched at iter_done. Iterations with the CNMM path disabled must
// give a zero partial CNMM; iter_done is sometimes given together with the
// last edge.
module tb_pe_esc_unit;
  localparam int unsigned MAG_W   = 9;
  localparam int unsigned PSYN_W  = 6;
  localparam int unsigned PCNMM_W = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 1'b0, cnmm_en = 1'b1;
  logic edge_valid = 1'b0, edge_sign = 1'b0, edge_last = 1'b0, iter_done = 1'b0;
  logic [MAG_W-1:0] edge_mag = '0;
  logic [PSYN_W-1:0]  psyn;
  logic [PCNMM_W-1:0] pcnmm;
  int checks = 0, failures = 0;
  int n_en_off = 0, n_joint_done = 0;

  pe_esc_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_checks, deg, exp_syn, exp_cnmm, par, mn, mag, sgn;
    bit joint;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int frame = 0; frame < 40; frame++) begin
      frame_start <= 1'b1; @(posedge clk); frame_start <= 1'b0;
      for (int it = 0; it < 10; it++) begin
        cnmm_en  <= ($urandom_range(0, 3) != 0);
        @(posedge clk);
        exp_syn  = 0;
        exp_cnmm = 0;
        n_checks = $urandom_range(1, 53);
        joint    = $urandom_range(0, 1);
        for (int c = 0; c < n_checks; c++) begin
          deg = $urandom_range(2, 10);
          par = 0;
          mn  = (1 << MAG_W) - 1;
          for (int e = 0; e < deg; e++) begin
            while ($urandom_range(0, 3) == 0) begin
              edge_valid <= 1'b0; edge_sign <= 1'($urandom); edge_last <= 1'($urandom);
              edge_mag <= MAG_W'($urandom);
              @(posedge clk);
            end
            sgn = $urandom_range(0, 1);
            mag = ($urandom_range(0, 1) != 0) ? $urandom_range(0, 15) : $urandom_range(0, (1 << MAG_W) - 1);
            par ^= sgn;
            if (mag < mn) mn = mag;
            edge_valid <= 1'b1; edge_sign <= 1'(sgn); edge_mag <= MAG_W'(mag);
            edge_last  <= (e == deg - 1);
            iter_done  <= joint && (c == n_checks - 1) && (e == deg - 1);
            @(posedge clk);
          end
          exp_syn += par;
          if (cnmm_en) exp_cnmm += mn;
        end
        edge_valid <= 1'b0; edge_last <= 1'b0;
        if (!joint) begin
          iter_done <= 1'b1; @(posedge clk);
        end else n_joint_done++;
        iter_done <= 1'b0;
        if (!cnmm_en) n_en_off++;
        #1;
        checks++;
        if (int'(psyn) !== exp_syn || int'(pcnmm) !== exp_cnmm) begin
          failures++;
          $display("FAIL frame %0d it %0d: psyn=%0d/%0d pcnmm=%0d/%0d", frame, it,
                   psyn, exp_syn, pcnmm, exp_cnmm);
        end
      end
    end
    // Both paths must have been exercised.
    checks++;
    if (n_en_off == 0 || n_joint_done == 0) begin
      failures++; $display("FAIL coverage: en_off=%0d joint=%0d", n_en_off, n_joint_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
