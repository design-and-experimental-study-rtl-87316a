// tb_svpwm_top: end-to-end test of the inverter controller at its default
// parameters (three AD7656 models, 18 words per frame), 50 MHz clock.
//
// A 50 Hz reference vector is written once per carrier period (half period
// 5000 clocks, 5 kHz carrier, dead time 100 clocks = 2 us) for one full
// output cycle at each modulation index M = 0.3, 0.7 and 1.0, where
// |Vref| = M * Ud/sqrt(3). For every carrier period the testbench sums the
// leg levels, rebuilds the average space vector from them and compares it
// with the reference that was in force for that period (tolerance 16 LSB,
// 0.2 % of Ud/3). It also checks:
//  - the six-clock latency from a reference write to new thresholds,
//  - every sample frame delivered by the converters,
//  - break-before-make gaps of at least the dead time on every gate,
//  - blocking by neutral-point unbalance and by a gate-driver fault (all
//    gates off while blocked) and release by block_clr,
//  - a change of the cycle register (a last segment at half the period).
// Each of these mechanisms, every sector and every region must occur.
module tb_svpwm_top;
  import svpwm_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  ref_t               ua_in = '0, ub_in = '0;
  logic               uref_we = 1'b0;
  time_t              cycle_reg = time_t'(5000);
  logic [9:0]         dead_reg = 10'd100;
  logic               adc_convst, adc_rd_n;
  logic [2:0]         adc_cs_n, adc_busy;
  logic [15:0]        adc_db;
  logic               adc_soft_rst_n = 1'b1;
  logic [17:0][15:0]  samples;
  logic [15:0]        np_limit = 16'd1000;
  logic [11:0]        drv_fault_n = '1;
  logic               block_clr = 1'b0;
  logic               blocked;
  logic [1:0]         block_cause;
  logic [11:0]        pwm;
  level_t [2:0]       leg_level;
  sector_t            sector;
  region_t            region;
  logic               prd_load, calc_done, adc_frame_valid;
  time_t              carrier_th;
  logic [2:0]         adc_state;

  logic [5:0][15:0]   vin[3];
  logic [15:0]        dout[3];
  int                 conv[3], rds[3], bad[3];
  int                 checks = 0, failures = 0;

  always #10 clk = ~clk;

  svpwm_top dut (.*);

  for (genvar i = 0; i < 3; i++) begin : g_adc
    ad7656_model #(.CONV_NS(3000)) u_adc (
      .convst(adc_convst), .cs_n(adc_cs_n[i]), .rd_n(adc_rd_n), .vin(vin[i]),
      .busy(adc_busy[i]), .dout(dout[i]), .conversions(conv[i]),
      .reads(rds[i]), .bad_reads(bad[i]));
  end

  always_comb begin
    adc_db = '0;
    for (int i = 0; i < 3; i++) if (!adc_cs_n[i]) adc_db = dout[i];
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int seen_sector[7], seen_region[7];
  int n_frames, n_np_block, n_drv_block, n_clear, n_dead, n_prd_checked, n_short_prd;
  int n_latency;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real  pi, s3, theta, mag, m_list[3], ea, eb, ma, mb, tol;
    int   sum[3], nclk, act_th, pend_th, first, step, last_off[12], seg;
    int   prds_in_seg, since_we, np_phase, drv_phase;
    ref_t act_a, act_b, pend_a, pend_b;
    logic load_d, block_d;
    logic [11:0] pwm_d;
    logic [5:0][15:0] vin_snap[3];

    pi = 3.141592653589793;
    s3 = $sqrt(3.0);
    m_list = '{0.3, 0.7, 1.0};
    for (int c = 0; c < 3; c++)
      for (int ch = 0; ch < 6; ch++) vin[c][ch] = 16'($urandom_range(0, 20000));
    vin[0][0] = 16'd12000;   // Vc1
    vin[0][1] = 16'd12100;   // Vc2, balanced
    for (int c = 0; c < 3; c++) vin_snap[c] = vin[c];
    n_frames = 0; n_np_block = 0; n_drv_block = 0; n_clear = 0; n_dead = 0;
    n_prd_checked = 0; n_short_prd = 0; n_latency = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    en = 1'b1;
    first = 1; load_d = 0; block_d = 0; pwm_d = '0; nclk = 0;
    sum = '{0, 0, 0};
    act_th = 5000; pend_th = 5000;
    act_a = '0; act_b = '0; pend_a = '0; pend_b = '0;
    for (int k = 0; k < 12; k++) last_off[k] = -1000;
    since_we = -1;
    seg = 0; prds_in_seg = 0; theta = 0.0;
    np_phase = 0; drv_phase = 0;
    for (step = 0; ; step++) begin
      // ---- observe (values after the last clock edge) ----
      for (int p = 0; p < 3; p++) sum[p] += int'(leg_level[p]) - 1;
      nclk++;
      if (load_d) begin
        // the clock just summed was the last of the period
        if (!first && !(act_a == 0 && act_b == 0)) begin
          ma = (real'(sum[0]) - 0.5 * real'(sum[1] + sum[2])) / real'(2 * act_th) * real'(UNIT);
          mb = (s3 / 2.0) * real'(sum[1] - sum[2]) / real'(2 * act_th) * real'(UNIT);
          tol = 16.0;
          check(nclk == 2 * act_th, $sformatf("period of %0d clocks, expected %0d", nclk, 2 * act_th));
          check(rabs(ma - real'(act_a)) <= tol && rabs(mb - real'(act_b)) <= tol,
                $sformatf("average vector %f,%f expected %0d,%0d", ma, mb, act_a, act_b));
          n_prd_checked++;
          if (act_th != 5000) n_short_prd++;
        end
        first = 0;
        sum = '{0, 0, 0};
        nclk = 0;
        act_a = pend_a; act_b = pend_b; act_th = pend_th;
      end
      if (calc_done) begin
        seen_sector[int'(sector)]++;
        seen_region[int'(region)]++;
      end
      if (since_we >= 0) begin
        since_we++;
        if (since_we == 6) begin
          check(calc_done, "new thresholds six clocks after the reference write");
          n_latency++;
          since_we = -1;
        end
      end
      if (adc_frame_valid) begin
        int ok;
        ok = 1;
        for (int i = 0; i < 18; i++) if (samples[i] != vin_snap[i / 6][i % 6]) ok = 0;
        check(ok == 1, $sformatf("sample frame matches the converter inputs: %h %h / %h %h",
                                 samples[0], samples[17], vin_snap[0][0], vin_snap[2][5]));
        n_frames++;
      end
      if (block_d) check(pwm == '0, "all gates off while blocked");
      for (int p = 0; p < 3; p++)
        check(!(pwm[4*p] && pwm[4*p+2]) && !(pwm[4*p+1] && pwm[4*p+3]),
              "complementary gates never on together");
      for (int k = 0; k < 12; k++) begin
        if (pwm[k] && !pwm_d[k] && !block_d) begin
          int partner;
          partner = (k % 4 < 2) ? k + 2 : k - 2;
          check(step - last_off[partner] >= int'(dead_reg),
                $sformatf("gate %0d on %0d clocks after its partner went off", k, step - last_off[partner]));
          if (step - last_off[partner] < 3 * int'(dead_reg)) n_dead++;
        end
        if (!pwm[k] && pwm_d[k]) last_off[k] = step;
      end
      pwm_d = pwm;

      // ---- drive (takes effect at the next clock edge) ----
      uref_we   = 1'b0;
      block_clr = 1'b0;
      // a new reference shortly after each period start
      if (dut.up && dut.u_pwm.cnt == time_t'(10)) begin
        mag   = m_list[seg < 3 ? seg : 2] * s3 * real'(UNIT);
        ua_in = ref_t'($rtoi(mag * $cos(theta)));
        ub_in = ref_t'($rtoi(mag * $sin(theta)));
        uref_we = 1'b1;
        since_we = 0;
        pend_a = ua_in; pend_b = ub_in;
        theta = theta + 2.0 * pi * 50.0 * real'(2 * int'(carrier_th)) * 20.0e-9;
        prds_in_seg++;
      end
      // converter inputs change mid-period, far from the conversion
      if (dut.up && dut.u_pwm.cnt == time_t'(carrier_th / 2)) begin
        for (int c = 0; c < 3; c++)
          for (int ch = 2; ch < 6; ch++) vin[c][ch] = 16'($urandom_range(0, 20000));
        // protection scenarios in the M = 0.7 cycle
        if (seg == 1 && prds_in_seg == 20 && np_phase == 0) begin
          vin[0][1] = 16'd14000;          // unbalance of 2000 > 1000
          np_phase = 1;
        end else if (np_phase == 1 && blocked) begin
          check(block_cause == 2'b10, "block caused by neutral point");
          n_np_block++;
          vin[0][1] = 16'd12100;          // balanced again
          np_phase = 2;
        end else if (np_phase == 2 && !dut.u_proc.np_fault) begin
          block_clr = 1'b1;
          n_clear++;
          np_phase = 3;
        end
        if (seg == 1 && prds_in_seg == 60 && drv_phase == 0) begin
          drv_fault_n[7] = 1'b0;
          drv_phase = 1;
        end else if (drv_phase == 1) begin
          check(blocked && block_cause == 2'b01, "block caused by gate driver");
          n_drv_block++;
          drv_fault_n = '1;
          drv_phase = 2;
        end else if (drv_phase == 2) begin
          block_clr = 1'b1;
          n_clear++;
          drv_phase = 3;
        end
      end
      // segment control: 100 periods per 50 Hz cycle
      if (prd_load && prds_in_seg >= 100 && seg < 3) begin
        seg++;
        prds_in_seg = 0;
        theta = 0.0;
        if (seg == 3) cycle_reg = time_t'(2500);   // last segment: 10 kHz carrier
      end
      if (prd_load) pend_th = (int'(dut.th5) < 2) ? 2 : int'(dut.th5);
      // the converters sample when the controller leaves ST0
      if (prd_load && adc_state == 3'd0)
        for (int c = 0; c < 3; c++) vin_snap[c] = vin[c];
      if (seg == 3 && prds_in_seg >= 12) break;
      load_d  = prd_load;
      block_d = blocked;
      @(posedge clk);
      #1;
    end

    for (int k = 1; k <= 6; k++) begin
      check(seen_sector[k] > 0, $sformatf("sector %0d used", k));
      check(seen_region[k] > 0, $sformatf("region %0d used", k));
    end
    check(n_prd_checked >= 300, $sformatf("%0d carrier periods checked", n_prd_checked));
    check(n_short_prd >= 5, "periods after the cycle register change checked");
    check(n_frames >= 300, $sformatf("%0d sample frames", n_frames));
    check(n_np_block == 1, "neutral-point blocking happened");
    check(n_drv_block == 1, "driver-fault blocking happened");
    check(n_clear == 2, "blocking released twice");
    check(n_dead > 100, "dead-time gaps observed");
    check(n_latency >= 300, "reference-to-threshold latency observed");
    for (int i = 0; i < 3; i++) check(bad[i] == 0, "no read during a conversion");
    $display("periods %0d, frames %0d, dead gaps %0d, blocks np %0d drv %0d",
             n_prd_checked, n_frames, n_dead, n_np_block, n_drv_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
