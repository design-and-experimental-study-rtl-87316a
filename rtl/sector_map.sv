// sector_map: maps the sector-I switching sequence to the actual sector and
// turns it into comparator thresholds for the three phase legs.
//
// Turning a switching state (Sa, Sb, Sc), Sx in {-1, 0, +1}, by +60 degrees
// gives (-Sb, -Sc, -Sa); n turns give
//   n = 0: ( a,  b,  c)   n = 1: (-b, -c, -a)   n = 2: ( c,  a,  b)
//   n = 3: (-a, -b, -c)   n = 4: ( b,  c,  a)   n = 5: (-c, -a, -b)
// For sector k every state of the sequence is turned by n = k-1. An odd n
// negates the levels, which makes every leg fall along the sequence; the
// sequence is then played in reverse order (first dwell <-> last dwell) so
// that every leg still only rises while the carrier counts up. Each step
// still changes one leg by one level.
//
// From the mapped sequence each leg gets two thresholds: `no`, the instant
// (carrier count) at which it leaves N, and `op`, the instant at which it
// reaches P. A leg already at O (or P) in the first state gets 0; a leg that
// never gets there gets all ones, above any carrier count. The document
// gives the block's purpose (mapping the sector-I switching sequence to the
// other sectors); the rotation rule follows from its vector formula and the
// threshold form is this design's.
//
// Timing: one register stage. cmp[0], cmp[1], cmp[2] are phases a, b, c;
// th is carried along so that the carrier can adopt the same half period.
module sector_map
  import svpwm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  sector_t               sector,
  input  time_t                 th,
  input  sw_state_t [3:0]       seq,
  input  time_t [2:0]           thr,
  output logic                  out_valid,
  output phase_cmp_t [2:0]      cmp,
  output time_t                 th_o       // half period the thresholds are for
);

  localparam time_t NEVER = '1;

  function automatic sw_state_t rot(sw_state_t s, int n);
    sw_state_t r;
    unique case (n)
      1: r = '{a: lv_neg(s.b), b: lv_neg(s.c), c: lv_neg(s.a)};
      2: r = '{a: s.c, b: s.a, c: s.b};
      3: r = '{a: lv_neg(s.a), b: lv_neg(s.b), c: lv_neg(s.c)};
      4: r = '{a: s.b, b: s.c, c: s.a};
      5: r = '{a: lv_neg(s.c), b: lv_neg(s.a), c: lv_neg(s.b)};
      default: r = s;
    endcase
    return r;
  endfunction

  int                n;
  sw_state_t [3:0]   mseq;      // mapped states, S0 first
  time_t [3:0]       inst;      // instant at which mapped state j begins
  level_t [2:0][3:0] lv;        // lv[phase][j]
  phase_cmp_t [2:0]  cmp_c;

  always_comb begin
    n = int'(sector) - 1;
    if (n < 0 || n > 5) n = 0;
    inst[0] = '0;
    for (int j = 0; j < 4; j++) begin
      if (n % 2 == 1) mseq[j] = rot(seq[3-j], n);
      else            mseq[j] = rot(seq[j], n);
    end
    for (int j = 1; j < 4; j++) begin
      if (n % 2 == 1) inst[j] = th - thr[3-j];
      else            inst[j] = thr[j-1];
    end
    for (int j = 0; j < 4; j++) begin
      lv[0][j] = mseq[j].a;
      lv[1][j] = mseq[j].b;
      lv[2][j] = mseq[j].c;
    end
    for (int p = 0; p < 3; p++) begin
      cmp_c[p].no = NEVER;
      cmp_c[p].op = NEVER;
      // scan backwards so that the earliest state wins
      for (int j = 3; j >= 0; j--) begin
        if (lv[p][j] != LV_N) cmp_c[p].no = inst[j];
        if (lv[p][j] == LV_P) cmp_c[p].op = inst[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      // all legs at O until the first result
      for (int p = 0; p < 3; p++) cmp[p] <= '{no: '0, op: NEVER};
      th_o <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cmp  <= cmp_c;
        th_o <= th;
      end
    end
  end

endmodule
