// tb_vector_time: random rotated references and half periods; the expected
// times are m1*th and m2*th with m1 = x - y/sqrt(3), m2 = 2y/sqrt(3)
// computed in real arithmetic (tolerance 2 clocks: the Q14 constants are exact to 3e-5), clamped to [0, 2*th].
module tb_vector_time;
  import svpwm_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sector_t         sector = 3'd1;
  ref_t            ur_a = '0, ur_b = '0;
  time_t           th = '0;
  logic            out_valid;
  sector_t         sector_o;
  logic [TIME_W:0] t1, t2;
  time_t           th_o;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_time dut (.*);

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
    real x, y, e1, e2;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 3000; i++) begin
      ur_a   = ref_t'($urandom_range(0, 2 * UNIT));
      ur_b   = ref_t'($urandom_range(0, 2 * UNIT));
      th     = time_t'($urandom_range(2, 30000));
      sector = sector_t'($urandom_range(1, 6));
      x  = real'(ur_a) / real'(UNIT);
      y  = real'(ur_b) / real'(UNIT);
      e1 = (x - y / $sqrt(3.0)) * real'(th);
      e2 = (2.0 * y / $sqrt(3.0)) * real'(th);
      if (e1 < 0.0) e1 = 0.0;
      if (e2 < 0.0) e2 = 0.0;
      if (e1 > 2.0 * real'(th)) e1 = 2.0 * real'(th);
      if (e2 > 2.0 * real'(th)) e2 = 2.0 * real'(th);
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      check(out_valid && sector_o == sector && th_o == th, "valid, sector, th after one clock");
      check(rabs(real'(t1) - e1) <= 2.0 && rabs(real'(t2) - e2) <= 2.0,
            $sformatf("x=%f y=%f th=%0d t1=%0d t2=%0d exp %f %f", x, y, th, t1, t2, e1, e2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
