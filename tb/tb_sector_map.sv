// tb_sector_map: feeds valid sector-I sequences (the six region sequences)
// with random switching instants and a random sector k. The per-leg
// thresholds are converted back into average leg voltages, and the
// resulting space vector must equal the sector-I vector of the input turned
// by (k-1)*60 degrees (real arithmetic). Each leg must also leave N no later
// than it reaches P.
module tb_sector_map;
  import svpwm_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sector_t          sector = 3'd1;
  time_t            th = '0;
  sw_state_t [3:0]  seq;
  time_t [2:0]      thr = '0;
  logic             out_valid;
  phase_cmp_t [2:0] cmp;
  time_t            th_o;
  int               checks = 0, failures = 0;

  localparam sw_state_t ONN = '{a: LV_O, b: LV_N, c: LV_N};
  localparam sw_state_t OON = '{a: LV_O, b: LV_O, c: LV_N};
  localparam sw_state_t OOO = '{a: LV_O, b: LV_O, c: LV_O};
  localparam sw_state_t POO = '{a: LV_P, b: LV_O, c: LV_O};
  localparam sw_state_t PPO = '{a: LV_P, b: LV_P, c: LV_O};
  localparam sw_state_t PON = '{a: LV_P, b: LV_O, c: LV_N};
  localparam sw_state_t PNN = '{a: LV_P, b: LV_N, c: LV_N};
  localparam sw_state_t PPN = '{a: LV_P, b: LV_P, c: LV_N};

  always #5 clk = ~clk;

  sector_map dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int lv(level_t l);
    return int'(l) - 1;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, s3, vre, vim, ere, eim, rot, avg[3], tmp;
    int  r, k, t[3], d[4], no, op;
    pi = 3.141592653589793;
    s3 = $sqrt(3.0);
    seq = '{OOO, OOO, OOO, OOO};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 3000; i++) begin
      r = $urandom_range(1, 6);
      case (r)                       // index 0 is the first state
        1: seq = '{POO, OOO, OON, ONN};
        2: seq = '{PPO, POO, OOO, OON};
        3: seq = '{POO, PON, OON, ONN};
        4: seq = '{PPO, POO, PON, OON};
        5: seq = '{POO, PON, PNN, ONN};
        default: seq = '{PPO, PPN, PON, OON};
      endcase
      th = time_t'($urandom_range(10, 20000));
      for (int j = 0; j < 3; j++) t[j] = $urandom_range(0, int'(th));
      // sort the three instants
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2 - a; b++)
          if (t[b] > t[b+1]) begin
            int x;
            x = t[b]; t[b] = t[b+1]; t[b+1] = x;
          end
      thr = '{time_t'(t[2]), time_t'(t[1]), time_t'(t[0])};
      k = $urandom_range(1, 6);
      sector = sector_t'(k);
      d[0] = t[0]; d[1] = t[1] - t[0]; d[2] = t[2] - t[1]; d[3] = int'(th) - t[2];
      vre = 0.0; vim = 0.0;
      for (int j = 0; j < 4; j++) begin
        vre += real'(d[j]) * (real'(lv(seq[j].a)) - 0.5 * real'(lv(seq[j].b) + lv(seq[j].c)));
        vim += real'(d[j]) * (s3 / 2.0) * real'(lv(seq[j].b) - lv(seq[j].c));
      end
      rot = real'(k - 1) * pi / 3.0;
      tmp = vre * $cos(rot) - vim * $sin(rot);
      vim = vre * $sin(rot) + vim * $cos(rot);
      vre = tmp;
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      in_valid = 1'b0;
      check(out_valid && th_o == th, "valid and th after one clock");
      for (int p = 0; p < 3; p++) begin
        no = (int'(cmp[p].no) > int'(th)) ? int'(th) : int'(cmp[p].no);
        op = (int'(cmp[p].op) > int'(th)) ? int'(th) : int'(cmp[p].op);
        check(no <= op, $sformatf("leg %0d leaves N before reaching P", p));
        avg[p] = real'((int'(th) - no) + (int'(th) - op) - int'(th));
      end
      ere = avg[0] - 0.5 * (avg[1] + avg[2]);
      eim = (s3 / 2.0) * (avg[1] - avg[2]);
      check(rabs(ere - vre) < 0.01 && rabs(eim - vim) < 0.01,
            $sformatf("region %0d sector %0d: vector %f,%f expected %f,%f", r, k, ere, eim, vre, vim));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
