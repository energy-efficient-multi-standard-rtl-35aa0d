// tb_esc_gather: self-checking test of the serial gather of partial values.
// Gives 22 random partial syndromes and CNMMs, checks that done arrives
// exactly P+1 cycles after start and that the sums are right, with the
// CNMM adder enabled and disabled, and that a start while busy restarts it.
module tb_esc_gather;
  localparam int unsigned P       = 22;
  localparam int unsigned PSYN_W  = 6;
  localparam int unsigned PCNMM_W = 15;
  localparam int unsigned SYN_W   = 11;
  localparam int unsigned CNMM_W  = 20;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cnmm_en = 1'b1;
  logic [P-1:0][PSYN_W-1:0]  psyn;
  logic [P-1:0][PCNMM_W-1:0] pcnmm;
  logic busy, done;
  logic [SYN_W-1:0]  syn;
  logic [CNMM_W-1:0] cnmm;
  int checks = 0, failures = 0;

  esc_gather #(.P(P), .PSYN_W(PSYN_W), .PCNMM_W(PCNMM_W), .SYN_W(SYN_W), .CNMM_W(CNMM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es, ec, lat;
    psyn = '0; pcnmm = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 500; k++) begin
      es = 0; ec = 0;
      for (int p = 0; p < P; p++) begin
        psyn[p]  = PSYN_W'($urandom_range(0, 53));
        pcnmm[p] = PCNMM_W'($urandom_range(0, 53 * 511));
        es += int'(psyn[p]);
        ec += int'(pcnmm[p]);
      end
      cnmm_en <= (k % 3 != 2);
      if (k % 3 == 2) ec = 0;
      if (k % 7 == 3) begin
        // Start, then restart part-way through.
        start <= 1'b1; @(posedge clk); start <= 1'b0;
        repeat ($urandom_range(1, P - 1)) @(posedge clk);
      end
      start <= 1'b1; @(posedge clk); start <= 1'b0;
      lat = 1;
      while (!done && lat < 4 * P) begin
        @(posedge clk); #1 lat++;
        if (done) break;
      end
      checks++;
      if (lat != P + 1) begin
        failures++; $display("FAIL latency %0d, expected %0d", lat, P + 1);
      end
      checks++;
      if (int'(syn) !== es || int'(cnmm) !== ec) begin
        failures++; $display("FAIL sums syn=%0d/%0d cnmm=%0d/%0d", syn, es, cnmm, ec);
      end
      @(posedge clk);
      #1 checks++;
      if (done || busy || int'(syn) !== es) begin
        failures++; $display("FAIL result not held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
