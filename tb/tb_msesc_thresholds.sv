// tb_msesc_thresholds: self-checking test of the threshold unit.
// Loads random row counts M and fractional bit counts bits_f and checks
// T1 = floor(M/64), T2 = M * 2^min(bits_f, LLR_W-1), T3 = floor(M/32), that
// the values appear one cycle after load and hold while load is low.
module tb_msesc_thresholds;
  localparam int unsigned M_W   = 11;
  localparam int unsigned LLR_W = 10;
  localparam int unsigned BF_W  = 4;
  localparam int unsigned T2_W  = M_W + LLR_W - 1;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [M_W-1:0]  m_rows = '0;
  logic [BF_W-1:0] bits_f = '0;
  logic [M_W-1:0]  t1, t3;
  logic [T2_W-1:0] t2;
  int checks = 0, failures = 0;

  msesc_thresholds dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_thr(input int m, input int bf);
    int e1, e2, e3, sh;
    sh = (bf > LLR_W - 1) ? LLR_W - 1 : bf;
    e1 = m / 64;
    e2 = m * (1 << sh);
    e3 = m / 32;
    checks++;
    if (int'(t1) !== e1 || int'(t2) !== e2 || int'(t3) !== e3) begin
      failures++;
      $display("FAIL M=%0d bits_f=%0d: t1=%0d/%0d t2=%0d/%0d t3=%0d/%0d",
               m, bf, t1, e1, t2, e2, t3, e3);
    end
  endtask

  initial begin
    int m, bf;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++;
    if (t1 !== '0 || t2 !== '0 || t3 !== '0) begin
      failures++; $display("FAIL reset values");
    end
    // Codes of the supported standards first, then random values.
    foreach (m_list[k]) begin
      m = m_list[k]; bf = k % 4;
      m_rows <= M_W'(m); bits_f <= BF_W'(bf); load <= 1'b1;
      @(posedge clk); load <= 1'b0;
      #1 expect_thr(m, bf);
    end
    for (int k = 0; k < 2000; k++) begin
      m  = $urandom_range(0, (1 << M_W) - 1);
      bf = $urandom_range(0, (1 << BF_W) - 1);
      m_rows <= M_W'(m); bits_f <= BF_W'(bf); load <= 1'b1;
      @(posedge clk); load <= 1'b0;
      #1 expect_thr(m, bf);
      // Inputs change without load: outputs must hold.
      m_rows <= M_W'($urandom); bits_f <= BF_W'($urandom);
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1 expect_thr(m, bf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // WiMAX and WiFi row counts: 2304 r1/2, 960 r2/3, 1944 r3/4, 1440 r5/6,
  // 576 r5/6, 2016 r1/2, 1944 r1/2, 864 r3/4.
  int m_list [8] = '{1152, 320, 486, 240, 96, 1008, 972, 216};
endmodule
