// tb_protect_unit: driver faults (single lines, random), neutral-point
// faults, and clear requests. Checks the latency of blocking (three clocks
// for a driver line through the synchronizer, one for np_fault), the cause
// bits, that clear has no effect while a fault persists, and that clear
// releases the latch once the faults are gone.
module tb_protect_unit;
  logic        clk = 1'b0, rst_n = 1'b0, np_fault = 1'b0, clr = 1'b0;
  logic [11:0] drv_fault_n = '1;
  logic        block;
  logic [1:0]  cause;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  protect_unit #(.NUM_DRV(12)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic step(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int line;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    step(1);
    check(!block && cause == 2'b00, "released after reset");
    for (int i = 0; i < 200; i++) begin
      if (i % 2 == 0) begin
        // driver fault on one line
        line = $urandom_range(0, 11);
        drv_fault_n[line] = 1'b0;
        step(2);
        check(!block, "driver fault not yet through the synchronizer");
        step(1);
        check(block && cause == 2'b01, $sformatf("driver fault on line %0d blocks after 3 clocks", line));
        clr = 1'b1;
        step(3);
        check(block, "clear ignored while the fault persists");
        drv_fault_n = '1;
        clr = 1'b0;
        step(4);
        check(block && cause == 2'b01, "latched after the fault is gone");
      end else begin
        np_fault = 1'b1;
        step(1);
        check(block && cause == 2'b10, "neutral-point fault blocks after 1 clock");
        np_fault = 1'b0;
        step(5);
        check(block, "still latched");
      end
      clr = 1'b1;
      step(1);
      clr = 1'b0;
      check(!block && cause == 2'b00, "clear releases");
      step($urandom_range(1, 5));
      check(!block, "stays released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
