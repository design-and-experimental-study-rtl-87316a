// tb_tri_counter: follows the counter clock by clock against a reference
// sequence 0..th-1 (up), th-1..0 (down); checks the 2*th-clock period, the
// `load` pulse on the last clock of each period, and that a new th only
// takes effect at a period boundary.
module tb_tri_counter;
  import svpwm_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  time_t th = time_t'(7);
  time_t cnt, th_q;
  logic  up, load;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  tri_counter dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cnt, exp_up, cur_th, periods, clk_in_prd, loads;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    check(cnt == 0 && !load, "idle while disabled");
    en = 1'b1;
    #1;
    check(load, "load at the end of the (empty) first period");
    @(posedge clk);
    #1;
    exp_cnt = 0; exp_up = 1; cur_th = 7; clk_in_prd = 0; loads = 0; periods = 0;
    for (int i = 0; i < 20000; i++) begin
      check(int'(cnt) == exp_cnt && up == exp_up[0],
            $sformatf("clock %0d: cnt=%0d up=%0d expected %0d %0d", i, cnt, up, exp_cnt, exp_up));
      check(load == (exp_up == 0 && exp_cnt == 0), "load only on the last clock of a period");
      check(int'(th_q) == cur_th, "th taken over at period boundary only");
      // change th at random points; it must wait for the boundary
      if ($urandom_range(0, 99) == 0) th = time_t'($urandom_range(2, 40));
      clk_in_prd++;
      if (load) begin
        check(clk_in_prd == 2 * cur_th, $sformatf("period %0d clocks, expected %0d", clk_in_prd, 2 * cur_th));
        clk_in_prd = 0;
        periods++;
      end
      // reference model of the next value
      if (exp_up == 1) begin
        if (exp_cnt >= cur_th - 1) exp_up = 0;
        else exp_cnt++;
      end else begin
        if (exp_cnt == 0) begin
          exp_up = 1;
          cur_th = int'(th);
        end else exp_cnt--;
      end
      @(posedge clk);
      #1;
    end
    check(periods > 100, "many periods ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
