// switch_timing: switching sequence and switching instants of sector I.
//
// In each small region the reference is built from its three nearest
// vectors. One of them is a short vector with two redundant states (one
// with the leg at P, one with the leg at N); its time is split in half
// between the two, and the four states are ordered so that each step moves
// exactly one leg by one level and every leg only rises. Over a carrier
// period the sequence is played forward while the carrier counts up and
// backward while it counts down (seven segments, centre-aligned).
//
//   region  states S0..S3        dwell d0..d3 (sum = th)
//   1       ONN OON OOO POO      tA/2 , t2   , th-t1-t2 , tA-tA/2   tA=t1
//   2       OON OOO POO PPO      t2/2 , th-t1-t2 , t1  , t2-t2/2
//   3       ONN OON PON POO      tA/2 , tB   , tC      , tA-tA/2
//   4       OON PON POO PPO      tB/2 , tC   , tA      , tB-tB/2
//            tA = th-t2 (U1), tB = th-t1 (U2), tC = t1+t2-th (U4)
//   5       ONN PNN PON POO      tS/2 , t1-th, t2      , tS-tS/2
//   6       OON PON PPN PPO      tS/2 , t1   , t2-th   , tS-tS/2
//            tS = 2th-t1-t2
// t1, t2 are the projections of the reference on U1 and U2 scaled by the
// half period th (vector_time). Regions 1 and 3 (closer to U1) start from
// the U1 pair, regions 2 and 4 from the U2 pair. The vectors of each region
// and the state names follow the document's sector diagram; the ordering,
// the halving of the redundant vector and the formulas are this design's.
//
// Outputs: the four states and the cumulative instants thr[j] = d0+..+dj
// (j = 0..2), saturated at th; a negative dwell (reference slightly outside
// its region through rounding, or overmodulation) counts as zero.
// Timing: one register stage; sector and th are carried along.
module switch_timing
  import svpwm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  sector_t               sector,
  input  region_t               region,
  input  logic [TIME_W:0]       t1,
  input  logic [TIME_W:0]       t2,
  input  time_t                 th,
  output logic                  out_valid,
  output sector_t               sector_o,
  output time_t                 th_o,
  output sw_state_t [3:0]       seq,
  output time_t [2:0]           thr
);

  localparam int SW = TIME_W + 3;
  typedef logic signed [SW-1:0] st_t;

  localparam sw_state_t ONN = '{a: LV_O, b: LV_N, c: LV_N};
  localparam sw_state_t OON = '{a: LV_O, b: LV_O, c: LV_N};
  localparam sw_state_t OOO = '{a: LV_O, b: LV_O, c: LV_O};
  localparam sw_state_t POO = '{a: LV_P, b: LV_O, c: LV_O};
  localparam sw_state_t PPO = '{a: LV_P, b: LV_P, c: LV_O};
  localparam sw_state_t PON = '{a: LV_P, b: LV_O, c: LV_N};
  localparam sw_state_t PNN = '{a: LV_P, b: LV_N, c: LV_N};
  localparam sw_state_t PPN = '{a: LV_P, b: LV_P, c: LV_N};

  function automatic st_t pos(st_t v);
    return (v < 0) ? '0 : v;
  endfunction

  st_t              s1, s2, sth, ta, tb, tc, ts, split;
  st_t [3:0]        d;
  st_t              acc;
  sw_state_t [3:0]  seq_c;
  time_t [2:0]      thr_c;

  always_comb begin
    s1  = st_t'({2'b00, t1});
    s2  = st_t'({2'b00, t2});
    sth = st_t'({3'b000, th});
    ta  = pos(sth - s2);
    tb  = pos(sth - s1);
    tc  = pos(s1 + s2 - sth);
    ts  = pos((sth <<< 1) - s1 - s2);
    split = '0;
    d     = '0;
    seq_c = '{OON, OON, OON, OON};
    unique case (region)
      3'd2: begin
        seq_c = '{PPO, POO, OOO, OON};          // seq_c[0] is S0
        split = s2;
        d[1]  = pos(sth - s1 - s2);
        d[2]  = s1;
      end
      3'd3: begin
        seq_c = '{POO, PON, OON, ONN};
        split = ta;
        d[1]  = tb;
        d[2]  = tc;
      end
      3'd4: begin
        seq_c = '{PPO, POO, PON, OON};
        split = tb;
        d[1]  = tc;
        d[2]  = ta;
      end
      3'd5: begin
        seq_c = '{POO, PON, PNN, ONN};
        split = ts;
        d[1]  = pos(s1 - sth);
        d[2]  = s2;
      end
      3'd6: begin
        seq_c = '{PPO, PPN, PON, OON};
        split = ts;
        d[1]  = s1;
        d[2]  = pos(s2 - sth);
      end
      default: begin                            // region 1
        seq_c = '{POO, OOO, OON, ONN};
        split = s1;
        d[1]  = s2;
        d[2]  = pos(sth - s1 - s2);
      end
    endcase
    d[0] = split >>> 1;
    d[3] = split - d[0];
    acc  = '0;
    for (int j = 0; j < 3; j++) begin
      acc      = acc + d[j];
      thr_c[j] = (acc > sth) ? th : time_t'(acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sector_o  <= 3'd1;
      th_o      <= '0;
      seq       <= '{OOO, OOO, OOO, OOO};
      thr       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sector_o <= sector;
        th_o     <= th;
        seq      <= seq_c;
        thr      <= thr_c;
      end
    end
  end

endmodule
