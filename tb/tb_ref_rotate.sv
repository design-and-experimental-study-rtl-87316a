// tb_ref_rotate: drives vectors of known angle and sector and compares the
// rotated vector with r*cos(theta - (k-1)*60deg), r*sin(...) computed in
// real arithmetic (tolerance 2 LSB), plus the one-clock latency. A second
// pass draws inputs from the whole 16-bit square and checks that rotated
// values beyond the 16-bit range saturate at +32767.
module tb_ref_rotate;
  import svpwm_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sector_t sector = 3'd1;
  ref_t    ua = '0, ub = '0;
  logic    out_valid;
  sector_t sector_o;
  ref_t    ur_a, ur_b;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  ref_rotate dut (.*);

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

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, th, phi, r, ex, ey;
    int  k;
    pi = 3.141592653589793;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 3000; i++) begin
      k   = $urandom_range(1, 6);
      phi = real'($urandom_range(0, 5999)) / 6000.0 * pi / 3.0;   // angle inside sector
      th  = real'(k - 1) * pi / 3.0 + phi;
      r   = real'($urandom_range(0, 2 * UNIT));
      ua  = ref_t'($rtoi(r * $cos(th)));
      ub  = ref_t'($rtoi(r * $sin(th)));
      th  = real'(k - 1) * pi / 3.0;
      ex  = real'(ua) * $cos(th) + real'(ub) * $sin(th);
      ey  = -real'(ua) * $sin(th) + real'(ub) * $cos(th);
      if (ey < 0.0) ey = 0.0;
      sector   = sector_t'(k);
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      check(out_valid && sector_o == sector_t'(k), "valid and sector after one clock");
      check(rabs(real'(ur_a) - ex) <= 2.0 && rabs(real'(ur_b) - ey) <= 2.0,
            $sformatf("k=%0d ua=%0d ub=%0d -> %0d %0d exp %f %f", k, ua, ub, ur_a, ur_b, ex, ey));
    end
    // whole 16-bit input square: rotated vectors longer than full scale
    // must saturate at +32767 instead of wrapping
    for (int i = 0; i < 3000; i++) begin
      ua = ref_t'($urandom);
      ub = ref_t'($urandom);
      th = $atan2(real'(ub), real'(ua));
      if (th < 0.0) th = th + 2.0 * pi;
      k  = int'($floor(th / (pi / 3.0))) + 1;
      if (k > 6) k = 6;
      th = real'(k - 1) * pi / 3.0;
      ex = real'(ua) * $cos(th) + real'(ub) * $sin(th);
      ey = -real'(ua) * $sin(th) + real'(ub) * $cos(th);
      if (ex < 0.0) ex = 0.0;
      if (ey < 0.0) ey = 0.0;
      if (ex > 32767.0) ex = 32767.0;
      if (ey > 32767.0) ey = 32767.0;
      sector   = sector_t'(k);
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      check(rabs(real'(ur_a) - ex) <= 2.0 && rabs(real'(ur_b) - ey) <= 2.0,
            $sformatf("full range k=%0d ua=%0d ub=%0d -> %0d %0d exp %f %f",
                      k, ua, ub, ur_a, ur_b, ex, ey));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
