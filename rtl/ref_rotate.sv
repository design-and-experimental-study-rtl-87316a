// ref_rotate: rotates the reference vector into sector I.
//
// For sector k the vector is turned by -(k-1)*60 degrees:
//   x' =  x*cos(phi) + y*sin(phi)
//   y' = -x*sin(phi) + y*cos(phi),   phi = (k-1)*60 degrees,
// with cos and sin taken from {0, +-1/2, +-sqrt(3)/2, +-1} as Q14 constants,
// so the whole rotation is two constant multiplications per output. The
// result lies in sector I, 0 <= y' <= sqrt(3)*x'; rounding can push y' one
// or two LSB below zero, so it is clamped at zero. A reference far outside
// the hexagon (beyond the 16-bit range once rotated) saturates at +32767.
// Everything the later stages compute for sector I is mapped back to
// sector k by sector_map.
// The document names this block ("reference vector rotation calculation");
// the rotation formula and the fixed-point format are this design's.
//
// Timing: one register stage, the sector is carried along with the result.
module ref_rotate
  import svpwm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sector_t sector,
  input  ref_t    ua,
  input  ref_t    ub,
  output logic    out_valid,
  output sector_t sector_o,
  output ref_t    ur_a,     // U-alpha' in sector I
  output ref_t    ur_b      // U-beta'  in sector I
);

  localparam int PW      = REF_W + Q14 + 2;
  localparam int REF_MAX = (1 << (REF_W - 1)) - 1;

  logic signed [PW-1:0] c, s, xr, yr;
  ref_t                 xo, yo;

  always_comb begin
    unique case (sector)
      3'd2:    begin c =  PW'(K_HALF_Q14);  s =  PW'(K_SQRT3_2_Q14); end
      3'd3:    begin c = -PW'(K_HALF_Q14);  s =  PW'(K_SQRT3_2_Q14); end
      3'd4:    begin c = -PW'(1 << Q14);    s =  '0;                 end
      3'd5:    begin c = -PW'(K_HALF_Q14);  s = -PW'(K_SQRT3_2_Q14); end
      3'd6:    begin c =  PW'(K_HALF_Q14);  s = -PW'(K_SQRT3_2_Q14); end
      default: begin c =  PW'(1 << Q14);    s =  '0;                 end
    endcase
    // add half an LSB before the arithmetic shift to round to nearest
    xr = (PW'(ua) * c + PW'(ub) * s + PW'(1 << (Q14 - 1))) >>> Q14;
    yr = (PW'(ub) * c - PW'(ua) * s + PW'(1 << (Q14 - 1))) >>> Q14;
    // a reference far outside the hexagon can rotate past the 16-bit range
    // (up to sqrt(2) * full scale); saturate instead of wrapping
    xo = (xr > PW'(REF_MAX)) ? ref_t'(REF_MAX) :
         (xr < 0)            ? '0 : ref_t'(xr);
    yo = (yr > PW'(REF_MAX)) ? ref_t'(REF_MAX) :
         (yr < 0)            ? '0 : ref_t'(yr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sector_o  <= 3'd1;
      ur_a      <= '0;
      ur_b      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sector_o <= sector;
        ur_a     <= xo;
        ur_b     <= yo;
      end
    end
  end

endmodule
