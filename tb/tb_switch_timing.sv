// tb_switch_timing: random references in sector I, given as projections
// (m1, m2) on U1 and U2; the region is found in the testbench from the
// triangle borders. For every output the testbench checks that
//  - the four dwell times are non-negative and add up to th,
//  - every step of the sequence moves exactly one leg up by one level,
//  - the first and last states are the two redundant states of the same
//    short vector, U1 for regions 1, 3, 5 and U2 for regions 2, 4, 6,
//  - only the three corner vectors of the region are used,
//  - the volt-seconds of the sequence equal t1*U1 + t2*U2 (exact integer
//    arithmetic, within 2 clocks for rounding at region borders).
module tb_switch_timing;
  import svpwm_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sector_t         sector = 3'd1;
  region_t         region = 3'd1;
  logic [TIME_W:0] t1 = '0, t2 = '0;
  time_t           th = '0;
  logic            out_valid;
  sector_t         sector_o;
  time_t           th_o;
  sw_state_t [3:0] seq;
  time_t [2:0]     thr;
  int              checks = 0, failures = 0;
  int              seen[7];

  always #5 clk = ~clk;

  switch_timing dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic int lv(level_t l);
    return int'(l) - 1;
  endfunction
  // vector of a state in (2*Re, Im*2/sqrt(3)) units of Ud/3: integers
  function automatic int vx(sw_state_t s);
    return 2 * lv(s.a) - lv(s.b) - lv(s.c);
  endfunction
  function automatic int vy(sw_state_t s);
    return lv(s.b) - lv(s.c);
  endfunction
  // corner vectors U0..U5 of sector I in the same units, as vx*8+vy codes
  function automatic int code(int x, int y);
    return x * 8 + y;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m1, m2;
    int  r, d[4], sx, sy, steps_ok, dl, ch, used_ok, vset[3];
    int  U0, U1, U2, U3, U4, U5, c;
    U0 = code(0, 0); U1 = code(2, 0); U2 = code(1, 1);
    U3 = code(4, 0); U4 = code(3, 1); U5 = code(2, 2);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 3000; i++) begin
      m1 = real'($urandom_range(0, 20000)) / 10000.0;
      m2 = real'($urandom_range(0, 20000)) / 10000.0;
      if (m1 + m2 > 2.0) continue;
      if (m1 + m2 < 1.0)       r = (m1 >= m2) ? 1 : 2;
      else if (m1 > 1.0)       r = 5;
      else if (m2 > 1.0)       r = 6;
      else                     r = (m1 >= m2) ? 3 : 4;
      th     = time_t'($urandom_range(100, 20000));
      t1     = (TIME_W+1)'($rtoi(m1 * real'(th) + 0.5));
      t2     = (TIME_W+1)'($rtoi(m2 * real'(th) + 0.5));
      region = region_t'(r);
      sector = sector_t'($urandom_range(1, 6));
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      check(out_valid && sector_o == sector && th_o == th, "valid, sector and th after one clock");
      d[0] = int'(thr[0]);
      d[1] = int'(thr[1]) - int'(thr[0]);
      d[2] = int'(thr[2]) - int'(thr[1]);
      d[3] = int'(th) - int'(thr[2]);
      check(d[0] >= 0 && d[1] >= 0 && d[2] >= 0 && d[3] >= 0,
            $sformatf("region %0d: dwell times %0d %0d %0d %0d", r, d[0], d[1], d[2], d[3]));
      steps_ok = 1;
      for (int j = 1; j < 4; j++) begin
        ch = 0;
        dl = lv(seq[j].a) - lv(seq[j-1].a);
        if (dl == 1) ch++; else if (dl != 0) steps_ok = 0;
        dl = lv(seq[j].b) - lv(seq[j-1].b);
        if (dl == 1) ch++; else if (dl != 0) steps_ok = 0;
        dl = lv(seq[j].c) - lv(seq[j-1].c);
        if (dl == 1) ch++; else if (dl != 0) steps_ok = 0;
        if (ch != 1) steps_ok = 0;
      end
      check(steps_ok == 1, $sformatf("region %0d: one leg, one level per step", r));
      c = code(vx(seq[0]), vy(seq[0]));
      check(c == code(vx(seq[3]), vy(seq[3])) && c == ((r % 2 == 1) ? U1 : U2),
            $sformatf("region %0d: first/last state is the dominant short vector", r));
      case (r)
        1, 2:    vset = '{U0, U1, U2};
        3, 4:    vset = '{U1, U2, U4};
        5:       vset = '{U1, U3, U4};
        default: vset = '{U2, U4, U5};
      endcase
      used_ok = 1;
      for (int j = 0; j < 4; j++) begin
        c = code(vx(seq[j]), vy(seq[j]));
        if (c != vset[0] && c != vset[1] && c != vset[2]) used_ok = 0;
      end
      check(used_ok == 1, $sformatf("region %0d: only the region's corner vectors", r));
      sx = 0; sy = 0;
      for (int j = 0; j < 4; j++) begin
        sx += d[j] * vx(seq[j]);
        sy += d[j] * vy(seq[j]);
      end
      // target: t1*U1 + t2*U2 = (2*t1 + t2, t2) in these units
      check(sx - (2 * int'(t1) + int'(t2)) <= 4 && (2 * int'(t1) + int'(t2)) - sx <= 4 &&
            sy - int'(t2) <= 2 && int'(t2) - sy <= 2,
            $sformatf("region %0d: volt-seconds %0d,%0d expected %0d,%0d", r, sx, sy,
                      2 * int'(t1) + int'(t2), int'(t2)));
      seen[r]++;
    end
    for (int k = 1; k <= 6; k++) check(seen[k] > 0, $sformatf("region %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
