// tb_pwm_gen: random thresholds, changed at random instants, random half
// periods and dead times, and random blocking. Checks, per carrier period,
// that each leg spends exactly 2*(th-op) clocks at P and 2*(th-no) clocks at
// O or above, using the thresholds present at the period's start (shadow
// loading); that the twelve gates follow the leg levels once the dead time
// has passed; that no complementary pair is ever on together and that
// every turn-on comes at least `dead` clocks after its partner turned off;
// and that blocking clears all gates one clock later.
module tb_pwm_gen;
  import svpwm_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0, en = 1'b0, block = 1'b0;
  time_t              th = time_t'(30);
  logic [9:0]         dead = 10'd3;
  phase_cmp_t [2:0]   cmp_in;
  logic [NUM_PWM-1:0] pwm;
  level_t [2:0]       level;
  time_t              cnt, th_act;
  logic               up, prd_load;
  int                 checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwm_gen #(.DEAD_W(10)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  function automatic logic [3:0] pattern(level_t l);
    case (l)
      LV_P:    return 4'b0011;    // S1 S2
      LV_O:    return 4'b0110;    // S2 S3
      default: return 4'b1100;    // S3 S4
    endcase
  endfunction

  function automatic phase_cmp_t rnd_cmp(int t);
    phase_cmp_t c;
    int no, op;
    no = $urandom_range(0, t + 3);
    op = $urandom_range(no, t + 3);
    c.no = ($urandom_range(0, 9) == 0) ? '1 : time_t'(no);
    c.op = ($urandom_range(0, 5) == 0 || c.no == '1) ? '1 : time_t'(op);
    return c;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase_cmp_t [2:0] pend, act;
    int   pend_th, act_th, first, nP[3], nO[3], eP, eO, no, op;
    int   last_off[12], step, periods, blocked_steps;
    logic load_d, block_d;
    level_t hist[3][$];
    logic [NUM_PWM-1:0] pwm_d;
    int   stable;

    for (int p = 0; p < 3; p++) cmp_in[p] = rnd_cmp(30);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    en = 1'b1;
    first = 1; load_d = 0; block_d = 0; pwm_d = '0; periods = 0; blocked_steps = 0;
    for (int p = 0; p < 3; p++) begin nP[p] = 0; nO[p] = 0; end
    for (int k = 0; k < 12; k++) last_off[k] = 0;
    pend_th = 30; act_th = 30; pend = cmp_in; act = cmp_in;
    for (step = 1; step < 150000; step++) begin
      #1;
      // level now reflects the count of the previous clock
      for (int p = 0; p < 3; p++) begin
        if (level[p] == LV_P) nP[p]++;
        if (level[p] != LV_N) nO[p]++;
        hist[p].push_front(level[p]);
        if (hist[p].size() > 40) void'(hist[p].pop_back());
      end
      if (load_d) begin
        if (!first) begin
          for (int p = 0; p < 3; p++) begin
            no = (int'(act[p].no) > act_th) ? act_th : int'(act[p].no);
            op = (int'(act[p].op) > act_th) ? act_th : int'(act[p].op);
            eP = 2 * (act_th - op);
            eO = 2 * (act_th - no);
            check(nP[p] == eP && nO[p] == eO,
                  $sformatf("leg %0d: P %0d / >=O %0d clocks, expected %0d / %0d (th=%0d)",
                            p, nP[p], nO[p], eP, eO, act_th));
          end
          periods++;
        end
        first = 0;
        act = pend; act_th = pend_th;
        for (int p = 0; p < 3; p++) begin nP[p] = 0; nO[p] = 0; end
      end
      // gates
      if (block_d) begin
        check(pwm == '0, "blocked: all gates off");
        blocked_steps++;
      end
      for (int p = 0; p < 3; p++) begin
        check(!(pwm[4*p] && pwm[4*p+2]) && !(pwm[4*p+1] && pwm[4*p+3]) && !(pwm[4*p] && pwm[4*p+3]),
              $sformatf("leg %0d: complementary switches never on together", p));
        stable = 1;
        if (hist[p].size() < int'(dead) + 4) stable = 0;
        else for (int j = 2; j <= int'(dead) + 3; j++) if (hist[p][j] != hist[p][2]) stable = 0;
        if (stable && !block_d && step > 50)
          check(pwm[4*p +: 4] == pattern(hist[p][2]), $sformatf("leg %0d gates follow the level", p));
      end
      for (int k = 0; k < 12; k++) begin
        if (pwm[k] && !pwm_d[k] && !block_d && step > 50) begin
          // partner: S1<->S3, S2<->S4
          int partner;
          partner = (k % 4 < 2) ? k + 2 : k - 2;
          check(step - last_off[partner] >= int'(dead),
                $sformatf("gate %0d on %0d clocks after partner off, dead=%0d", k, step - last_off[partner], dead));
        end
        if (!pwm[k] && pwm_d[k]) last_off[k] = step;
      end
      pwm_d = pwm;
      // stimulus for the next clock edge
      if ($urandom_range(0, 15) == 0) cmp_in[$urandom_range(0, 2)] = rnd_cmp(int'(th));
      if ($urandom_range(0, 999) == 0) th = time_t'($urandom_range(8, 60));
      if ($urandom_range(0, 2999) == 0) dead = 10'($urandom_range(0, 6));
      if ($urandom_range(0, 1999) == 0) block = 1'b1;
      else if (block && $urandom_range(0, 99) == 0) block = 1'b0;
      // what the next edge takes over
      if (prd_load) begin
        pend = cmp_in;
        pend_th = (int'(th) < 2) ? 2 : int'(th);
      end
      load_d  = prd_load;
      block_d = block;
      @(posedge clk);
    end
    check(periods > 1000, "many periods checked");
    check(blocked_steps > 0, "blocking exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
