// tb_ad7656_ctrl: three converter models on a shared data bus. Runs frames
// with random channel values and checks: START lasts 10 clocks with CONVST
// high, JUDGE waits for BUSY, 18 words arrive with the right indices and
// values, each RD pulse is 4 clocks low and each converter gets 6 of them
// under its own chip select, the read phase lasts cnt_v = 0..129 (130
// clocks), STOP lasts 4 clocks and ends in ST0 with frame_done. Also checks
// that soft_rst_n low aborts START and JUDGE and holds ST0.
module tb_ad7656_ctrl;
  logic        clk = 1'b0, rst_n = 1'b0, soft_rst_n = 1'b1, start = 1'b0;
  logic        convst, rd_n;
  logic [2:0]  cs_n, busy;
  logic [15:0] db;
  logic        smp_valid, frame_done;
  logic [4:0]  smp_idx;
  logic [15:0] smp_data;
  logic [2:0]  state_o;
  logic [5:0][15:0] vin[3];
  logic [15:0] dout[3];
  int          conv[3], rds[3], bad[3];
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  ad7656_ctrl dut (.*);

  for (genvar i = 0; i < 3; i++) begin : g_adc
    ad7656_model #(.CONV_NS(3000)) u_adc (
      .convst(convst), .cs_n(cs_n[i]), .rd_n(rd_n), .vin(vin[i]),
      .busy(busy[i]), .dout(dout[i]), .conversions(conv[i]),
      .reads(rds[i]), .bad_reads(bad[i]));
  end

  always_comb begin
    db = '0;
    for (int i = 0; i < 3; i++) if (!cs_n[i]) db = dout[i];
  end

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

  // clock-by-clock monitor of one frame
  int n_start, n_judge, n_rdphase, n_stop, n_words, rd_low, rd_per_cs[3];
  logic [2:0] prev_state;
  logic       prev_rd;
  logic [15:0] got[18];
  int          got_idx_ok;

  task automatic run_frame(input bit abort_in_start, input bit abort_in_judge);
    n_start = 0; n_judge = 0; n_rdphase = 0; n_stop = 0; n_words = 0;
    rd_low = 0; rd_per_cs = '{0, 0, 0}; got_idx_ok = 1;
    prev_rd = 1'b1;
    for (int c = 0; c < 3; c++)
      for (int ch = 0; ch < 6; ch++) vin[c][ch] = 16'($urandom);
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    forever begin
      case (state_o)
        3'd1: begin n_start++; check(convst, "CONVST high in START"); end
        3'd2: n_judge++;
        3'd3, 3'd4: n_rdphase++;
        3'd5: begin n_stop++; check(!convst, "CONVST low in STOP"); end
        default: ;
      endcase
      if (!rd_n) begin
        rd_low++;
        check($countones(~cs_n) == 1, "exactly one chip selected during RD");
        if (prev_rd) for (int i = 0; i < 3; i++) if (!cs_n[i]) rd_per_cs[i]++;
      end else if (!prev_rd) begin
        check(rd_low == 4, $sformatf("RD low for %0d clocks", rd_low));
        rd_low = 0;
      end
      prev_rd = rd_n;
      if (smp_valid) begin
        if (int'(smp_idx) != n_words) got_idx_ok = 0;
        if (n_words < 18) got[n_words] = smp_data;
        n_words++;
      end
      if (abort_in_start && state_o == 3'd1 && n_start == 5) soft_rst_n = 1'b0;
      if (abort_in_judge && state_o == 3'd2 && n_judge == 20) soft_rst_n = 1'b0;
      if (frame_done || (state_o == 3'd0 && !soft_rst_n)) break;
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    int frames;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    frames = 0;
    for (int f = 0; f < 20; f++) begin
      run_frame(1'b0, 1'b0);
      frames++;
      check(n_start == 10, $sformatf("START lasted %0d clocks", n_start));
      check(n_judge >= 140, $sformatf("JUDGE waited %0d clocks for BUSY", n_judge));
      check(n_rdphase == 130, $sformatf("read phase lasted %0d clocks", n_rdphase));
      check(n_stop == 4, $sformatf("STOP lasted %0d clocks", n_stop));
      check(n_words == 18 && got_idx_ok == 1, $sformatf("%0d words, indices in order", n_words));
      check(rd_per_cs[0] == 6 && rd_per_cs[1] == 6 && rd_per_cs[2] == 6, "six reads per converter");
      for (int i = 0; i < 18; i++)
        check(got[i] == vin[i / 6][i % 6], $sformatf("word %0d = %h expected %h", i, got[i], vin[i / 6][i % 6]));
      repeat ($urandom_range(1, 20)) @(posedge clk);
      #1;
    end
    // aborts
    run_frame(1'b1, 1'b0);
    check(state_o == 3'd0 && n_judge == 0, "soft reset aborts START");
    @(posedge clk);
    #1;
    start = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(state_o == 3'd0, "soft reset holds ST0");
    start = 1'b0;
    soft_rst_n = 1'b1;
    repeat (400) @(posedge clk);   // let the aborted conversion finish
    #1;
    run_frame(1'b0, 1'b1);
    check(state_o == 3'd0 && n_rdphase == 0, "soft reset aborts JUDGE");
    soft_rst_n = 1'b1;
    repeat (400) @(posedge clk);
    #1;
    run_frame(1'b0, 1'b0);
    check(n_words == 18, "normal frame after aborts");
    for (int i = 0; i < 3; i++) check(bad[i] == 0, "no RD while converting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
