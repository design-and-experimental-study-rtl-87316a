// tb_sector_calc: checks the sector of random reference vectors against the
// sector derived from the vector's angle (atan2 in real arithmetic), and the
// one-clock latency of the stage. Vectors within 0.05 degree of a sector
// border are skipped, since either neighbour is correct there.
module tb_sector_calc;
  import svpwm_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ref_t    ua = '0, ub = '0;
  logic    out_valid;
  sector_t sector;
  ref_t    ua_o, ub_o;
  int      checks = 0, failures = 0;
  int      seen[7];

  always #5 clk = ~clk;

  sector_calc dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, r, deg;
    int  exp_sec;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 3000; i++) begin
      th  = 2.0 * 3.141592653589793 * real'($urandom_range(0, 35999)) / 36000.0;
      r   = real'($urandom_range(50, 2 * UNIT));
      deg = th * 180.0 / 3.141592653589793;
      exp_sec = int'($floor(deg / 60.0)) + 1;
      if (exp_sec > 6) exp_sec = 6;
      ua = ref_t'($rtoi(r * $cos(th)));
      ub = ref_t'($rtoi(r * $sin(th)));
      // recompute the angle of the rounded vector
      deg = $atan2(real'(ub), real'(ua)) * 180.0 / 3.141592653589793;
      if (deg < 0.0) deg = deg + 360.0;
      exp_sec = int'($floor(deg / 60.0)) + 1;
      if (exp_sec > 6) exp_sec = 1;
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      check(out_valid == 1'b1, "out_valid one clock after in_valid");
      if (deg - 60.0 * $floor(deg / 60.0) > 0.05 &&
          deg - 60.0 * $floor(deg / 60.0) < 59.95) begin
        check(int'(sector) == exp_sec,
              $sformatf("ua=%0d ub=%0d deg=%f sector=%0d exp=%0d", ua, ub, deg, sector, exp_sec));
        seen[exp_sec]++;
      end
      check(ua_o == ua && ub_o == ub, "reference copied");
      @(posedge clk);
      #1;
      check(out_valid == 1'b0, "out_valid is a single pulse");
    end
    for (int k = 1; k <= 6; k++) check(seen[k] > 0, $sformatf("sector %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
