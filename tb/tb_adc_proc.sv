// tb_adc_proc: random frames of 18 words in random order; checks that every
// word lands at its index, and that np_fault after each frame equals
// |word[0] - word[1]| > np_limit computed in the testbench (signed words).
module tb_adc_proc;
  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  smp_valid = 1'b0, frame_done = 1'b0;
  logic [4:0]            smp_idx = '0;
  logic [15:0]           smp_data = '0, np_limit = 16'd500;
  logic [17:0][15:0]     samples;
  logic                  np_fault, frame_valid;
  int                    checks = 0, failures = 0;

  always #5 clk = ~clk;

  adc_proc #(.NWORDS(18), .DATA_W(16), .VC1_IDX(0), .VC2_IDX(1)) dut (.*);

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
    logic [15:0] w[18];
    int order[18], diff, faults, ok;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    faults = 0;
    for (int f = 0; f < 300; f++) begin
      for (int i = 0; i < 18; i++) begin
        w[i] = 16'($urandom);
        order[i] = i;
      end
      // channels 0/1 close together most of the time
      w[1] = 16'(int'($signed(w[0])) + $urandom_range(0, 1200) - 600);
      if (int'($signed(w[0])) > 30000 || int'($signed(w[0])) < -30000) w[0] = 16'd0;
      order.shuffle();
      for (int i = 0; i < 18; i++) begin
        smp_valid = 1'b1;
        smp_idx   = 5'(order[i]);
        smp_data  = w[order[i]];
        @(posedge clk);
        #1;
        smp_valid = 1'b0;
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1;
      end
      np_limit   = 16'($urandom_range(100, 600));
      frame_done = 1'b1;
      @(posedge clk);
      #1;
      frame_done = 1'b0;
      check(frame_valid, "frame_valid one clock after frame_done");
      ok = 1;
      for (int i = 0; i < 18; i++) if (samples[i] != w[i]) ok = 0;
      check(ok == 1, "all words stored at their index");
      diff = int'($signed(w[0])) - int'($signed(w[1]));
      if (diff < 0) diff = -diff;
      check(np_fault == (diff > int'(np_limit)),
            $sformatf("np_fault=%0d for |%0d| vs limit %0d", np_fault, diff, np_limit));
      if (np_fault) faults++;
    end
    check(faults > 10 && faults < 290, "both balanced and unbalanced frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
