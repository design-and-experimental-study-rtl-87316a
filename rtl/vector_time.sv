// vector_time: fixed-vector on-time calculation.
//
// The rotated reference (x, y) is projected on the two fixed short-vector
// directions of sector I, U1 at 0 degrees and U2 at 60 degrees:
//   m1 = x - y/sqrt(3),  m2 = 2y/sqrt(3)      (units of Ud/3)
// and each projection is scaled by the half carrier period th (the cycle
// register, in clocks):
//   t1 = m1 * th,  t2 = m2 * th,   each clamped to [0, 2*th].
// Every dwell time of every region is a sum or difference of t1, t2 and th
// (switch_timing), so these two products are the only multiplications by
// the period. The document names this block; its formulas are standard
// three-level space-vector geometry chosen for this design.
//
// Timing: one register stage; the sector is carried along.
module vector_time
  import svpwm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  sector_t           sector,
  input  ref_t              ur_a,
  input  ref_t              ur_b,
  input  time_t             th,
  output logic              out_valid,
  output sector_t           sector_o,
  output logic [TIME_W:0]   t1,
  output logic [TIME_W:0]   t2,
  output time_t             th_o
);

  localparam int PW = REF_W + Q14 + 3;
  localparam int MW = PW + TIME_W + 2;
  localparam int SH = Q14 + UNIT_SHIFT;

  logic signed [PW-1:0] m1s, m2s;
  logic signed [MW-1:0] p1, p2, lim;
  logic [TIME_W:0]      t1_c, t2_c;

  function automatic logic [TIME_W:0] clamp(logic signed [MW-1:0] v,
                                            logic signed [MW-1:0] hi);
    if (v < 0)       return '0;
    else if (v > hi) return (TIME_W+1)'(hi);
    else             return (TIME_W+1)'(v);
  endfunction

  always_comb begin
    m1s = (PW'(ur_a) <<< Q14) - PW'(ur_b) * PW'(K_INV_SQRT3_Q14);
    m2s = PW'(ur_b) * PW'(K_2_SQRT3_Q14);
    // round to nearest clock
    p1  = (MW'(m1s) * MW'(signed'({1'b0, th})) + (MW'(1) <<< (SH - 1))) >>> SH;
    p2  = (MW'(m2s) * MW'(signed'({1'b0, th})) + (MW'(1) <<< (SH - 1))) >>> SH;
    lim = MW'(signed'({1'b0, th})) <<< 1;
    t1_c = clamp(p1, lim);
    t2_c = clamp(p2, lim);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sector_o  <= 3'd1;
      t1        <= '0;
      t2        <= '0;
      th_o      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sector_o <= sector;
        t1       <= t1_c;
        t2       <= t2_c;
        th_o     <= th;
      end
    end
  end

endmodule
