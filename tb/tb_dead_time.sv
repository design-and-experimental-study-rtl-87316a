// tb_dead_time: random request patterns and dead times. Checks that the two
// outputs are never on together, that after every change the newly enabled
// output comes on exactly `dead` clocks after the other went off (one clock
// after the request with dead = 0), and that each output follows the
// request once it has been stable long enough.
module tb_dead_time;
  logic       clk = 1'b0, rst_n = 1'b0, in = 1'b0;
  logic [9:0] dead = 10'd0;
  logic       hi, lo;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  dead_time #(.DEAD_W(10)) dut (.*);

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
    int hold, since;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int blk = 0; blk < 40; blk++) begin
      dead = 10'($urandom_range(0, 12));
      for (int n = 0; n < 30; n++) begin
        in   = ~in;
        hold = $urandom_range(1, 25);
        since = 0;
        for (int c = 0; c < hold; c++) begin
          @(posedge clk);
          #1;
          since++;     // clocks since the edge that registered the change
          check(!(hi && lo), "never both on");
          if (since < int'(dead) + 1) check(!hi && !lo, $sformatf("both off in the dead band (dead=%0d, %0d)", dead, since));
          else check(hi == in && lo == !in, $sformatf("output follows request (dead=%0d, %0d)", dead, since));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
