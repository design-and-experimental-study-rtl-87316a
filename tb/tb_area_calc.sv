// tb_area_calc: random vectors inside sector I of the hexagon; the expected
// region is found geometrically in real arithmetic: the triangle that holds
// the point (barycentric test against the triangles U0-U1-U2, U1-U4-U2,
// U1-U3-U4, U2-U4-U5) and the side of the 30-degree line. Points within
// 0.002 of a border are skipped. Every region must be hit.
module tb_area_calc;
  import svpwm_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ref_t    ur_a = '0, ur_b = '0;
  logic    out_valid;
  region_t region;
  int      checks = 0, failures = 0;
  int      seen[7];

  always #5 clk = ~clk;

  area_calc dut (.*);

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // signed area test: point p strictly inside triangle (a, b, c) with margin
  function automatic int in_tri(real px, real py, real ax, real ay, real bx,
                                real by, real cx, real cy, real m);
    real d1, d2, d3, s;
    d1 = (bx - ax) * (py - ay) - (by - ay) * (px - ax);
    d2 = (cx - bx) * (py - by) - (cy - by) * (px - bx);
    d3 = (ax - cx) * (py - cy) - (ay - cy) * (px - cx);
    s  = (d1 > 0.0) ? 1.0 : -1.0;
    if (d1 * s > m && d2 * s > m && d3 * s > m) return 1;
    if (d1 * s < -m || d2 * s < -m || d3 * s < -m) return 0;
    return -1;   // on a border
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s3, x, y, m, u1x, u2x, u2y, u3x, u4x, u4y, u5x, u5y;
    int  exp_r, a, c, b5, d6, near;
    s3  = $sqrt(3.0);
    u1x = 1.0; u2x = 0.5; u2y = s3 / 2.0; u3x = 2.0;
    u4x = 1.5; u4y = s3 / 2.0; u5x = 1.0; u5y = s3;
    m   = 0.002;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 4000; i++) begin
      ur_a = ref_t'($urandom_range(0, 2 * UNIT));
      ur_b = ref_t'($urandom_range(0, UNIT * 7 / 4));
      x = real'(ur_a) / real'(UNIT);
      y = real'(ur_b) / real'(UNIT);
      a  = in_tri(x, y, 0.0, 0.0, u1x, 0.0, u2x, u2y, m);
      c  = in_tri(x, y, u1x, 0.0, u4x, u4y, u2x, u2y, m);
      b5 = in_tri(x, y, u1x, 0.0, u3x, 0.0, u4x, u4y, m);
      d6 = in_tri(x, y, u2x, u2y, u4x, u4y, u5x, u5y, m);
      near = (rabs(y - x / s3) < m) ? 1 : 0;
      exp_r = 0;
      if (a == 1)       exp_r = (y < x / s3) ? 1 : 2;
      else if (c == 1)  exp_r = (y < x / s3) ? 3 : 4;
      else if (b5 == 1) exp_r = 5;
      else if (d6 == 1) exp_r = 6;
      if (exp_r == 0 || (near == 1 && exp_r <= 4)) continue;
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      check(out_valid, "valid after one clock");
      check(int'(region) == exp_r,
            $sformatf("x=%f y=%f region=%0d exp=%0d", x, y, region, exp_r));
      seen[exp_r]++;
    end
    for (int k = 1; k <= 6; k++) check(seen[k] > 0, $sformatf("region %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
