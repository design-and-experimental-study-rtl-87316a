// pwm_gen: twelve-channel PWM generator of the three-level NPC bridge.
//
// A triangular carrier counter (tri_counter) runs with half period `th`
// (the cycle register). Per phase leg two comparators test the carrier
// against the leg's thresholds: the leg is at O or above while cnt >= no
// and at P while cnt >= op. The thresholds come from sector_map and are
// copied into shadow registers on the last clock of each carrier period, so
// a period always runs with one consistent set.
//
// Each leg has four IGBTs, numbered from the positive rail: S1 (outer),
// S2 (inner), S3 (inner), S4 (outer). Level P turns on S1 S2, O turns on
// S2 S3, N turns on S3 S4, so two switches are always on. S1/S3 and S2/S4
// are complementary pairs; each pair passes through a dead_time generator
// (`dead` clocks, the dead register) so that a switch is only turned on
// after its partner has been off for the dead time.
//
// `block` (from the protection unit) forces all twelve gate signals off
// from the next clock on. The twelve outputs are registered:
//   pwm[4*p + 0] = S1, pwm[4*p + 1] = S2, pwm[4*p + 2] = S3,
//   pwm[4*p + 3] = S4,  p = 0, 1, 2 for phases a, b, c.
// Latency from the carrier count to the gate outputs is three clocks
// (comparator register, dead-time register, output register) for every
// channel alike. The document gives the parts (triangular counter,
// comparators, dead-time generator, cycle and dead registers, PWM
// blocking); the switch numbering and pipelining are this design's.
module pwm_gen
  import svpwm_pkg::*;
#(
  parameter int DEAD_W = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  time_t                th,
  input  logic [DEAD_W-1:0]    dead,
  input  phase_cmp_t [2:0]     cmp_in,
  input  logic                 block,
  output logic [NUM_PWM-1:0]   pwm,
  output level_t [2:0]         level,     // leg levels before dead time
  output time_t                cnt,
  output logic                 up,
  output logic                 prd_load,  // last clock of a carrier period
  output time_t                th_act     // half period of the running period
);

  phase_cmp_t [2:0]    cmp_q;
  logic [2:0]          ge_o, ge_p;        // comparator results per leg
  logic [NUM_PWM-1:0]  gate;

  tri_counter u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .th   (th),
    .cnt  (cnt),
    .up   (up),
    .load (prd_load),
    .th_q (th_act)
  );

  // shadow registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 3; p++) cmp_q[p] <= '{no: '0, op: '1};
    end else if (prd_load) begin
      cmp_q <= cmp_in;
    end
  end

  // comparators
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ge_o <= '0;
      ge_p <= '0;
    end else begin
      for (int p = 0; p < 3; p++) begin
        ge_o[p] <= cnt >= cmp_q[p].no;
        ge_p[p] <= cnt >= cmp_q[p].op;
      end
    end
  end

  for (genvar p = 0; p < 3; p++) begin : g_leg
    assign level[p] = ge_p[p] ? LV_P : (ge_o[p] ? LV_O : LV_N);

    // pair S1/S3: S1 on at P
    dead_time #(.DEAD_W(DEAD_W)) u_dt_outer (
      .clk  (clk),
      .rst_n(rst_n),
      .in   (ge_p[p]),
      .dead (dead),
      .hi   (gate[4*p+0]),
      .lo   (gate[4*p+2])
    );
    // pair S2/S4: S2 on at O or P
    dead_time #(.DEAD_W(DEAD_W)) u_dt_inner (
      .clk  (clk),
      .rst_n(rst_n),
      .in   (ge_o[p]),
      .dead (dead),
      .hi   (gate[4*p+1]),
      .lo   (gate[4*p+3])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm <= '0;
    else        pwm <= block ? '0 : gate;
  end

  // never both switches of a complementary pair, never S1 and S4 together
  for (genvar p = 0; p < 3; p++) begin : g_chk
    a_pair13: assert property (@(posedge clk) disable iff (!rst_n)
                               !(pwm[4*p+0] && pwm[4*p+2]));
    a_pair24: assert property (@(posedge clk) disable iff (!rst_n)
                               !(pwm[4*p+1] && pwm[4*p+3]));
  end

endmodule
