// area_calc: finds which of the six small regions (1..6) of sector I holds
// the rotated reference vector.
//
// Sector I is the triangle between the zero vector U0, the long vectors
// U3 (PNN, 0 deg) and U5 (PPN, 60 deg). Its short vectors U1 (POO/ONN) and
// U2 (PPO/OON) and its middle vector U4 (PON) cut it into four triangles,
// and the 30-degree line from U0 through U4 halves the two inner ones:
//   1, 2 : triangle U0-U1-U2, below / above the 30-degree line
//   3, 4 : triangle U1-U4-U2, below / above the 30-degree line
//   5    : triangle U1-U3-U4
//   6    : triangle U2-U4-U5
// This numbering is the document's improved division of the sector.
// Writing the reference as m1*U1 + m2*U2 (m1 = x - y/sqrt(3),
// m2 = 2y/sqrt(3), in units of Ud/3) turns every border into a comparison:
//   m1 + m2 <= 1 -> 1 or 2;  m1 >= 1 -> 5;  m2 >= 1 -> 6;  else 3 or 4,
// where 1/3 is chosen over 2/4 when m1 >= m2 (at or below 30 degrees).
// The comparisons are evaluated in Q14 without division. Beyond the
// hexagon (overmodulation) region 5 takes precedence over 6.
//
// Timing: one register stage.
module area_calc
  import svpwm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ref_t    ur_a,
  input  ref_t    ur_b,
  output logic    out_valid,
  output region_t region
);

  localparam int PW = REF_W + Q14 + 3;

  logic signed [PW-1:0] xs, m1s, m2s, ones;
  logic                 le_one, m1_ge, m2_ge, below30;
  region_t              reg_c;

  always_comb begin
    xs   = PW'(ur_a) <<< Q14;
    m1s  = xs - PW'(ur_b) * PW'(K_INV_SQRT3_Q14);   // m1 * 2^Q14
    m2s  = PW'(ur_b) * PW'(K_2_SQRT3_Q14);          // m2 * 2^Q14
    ones = PW'(UNIT) <<< Q14;
    le_one  = (m1s + m2s) <= ones;
    m1_ge   = m1s >= ones;
    m2_ge   = m2s >= ones;
    below30 = m1s >= m2s;
    if (le_one)      reg_c = below30 ? 3'd1 : 3'd2;
    else if (m1_ge)  reg_c = 3'd5;
    else if (m2_ge)  reg_c = 3'd6;
    else             reg_c = below30 ? 3'd3 : 3'd4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      region    <= 3'd1;
    end else begin
      out_valid <= in_valid;
      if (in_valid) region <= reg_c;
    end
  end

endmodule
