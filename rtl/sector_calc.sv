// sector_calc: finds the 60-degree sector (I..VI, coded 1..6) of the
// reference voltage vector (U-alpha, U-beta).
//
// Sector k spans the angles [(k-1)*60, k*60) degrees, sector I starting on
// the alpha axis as in the document's vector diagram. The angle is never
// computed: with p = sqrt(3)*U-alpha and q = U-beta the sector follows from
// three sign tests,
//   q >= 0 : q < p -> I,  q < -p -> III, otherwise II
//   q <  0 : q > p -> IV, q > -p -> VI,  otherwise V
// A vector lying exactly on a sector border may be given either neighbour;
// both lead to the same switching states. The comparison method is a choice
// of this design; the document names the block and its purpose only.
//
// Timing: one register stage. When in_valid is high the sector and a copy of
// the reference are registered; out_valid follows one clock later.
module sector_calc
  import svpwm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ref_t    ua,
  input  ref_t    ub,
  output logic    out_valid,
  output sector_t sector,
  output ref_t    ua_o,
  output ref_t    ub_o
);

  localparam int PW = REF_W + Q14 + 2;

  logic signed [PW-1:0] p, q;
  sector_t              sec_c;

  always_comb begin
    p = PW'(ua) * PW'(signed'(K_SQRT3_Q14));
    q = PW'(ub) <<< Q14;
    if (q >= 0) begin
      if (q < p)       sec_c = 3'd1;
      else if (q < -p) sec_c = 3'd3;
      else             sec_c = 3'd2;
    end else begin
      if (q > p)       sec_c = 3'd4;
      else if (q > -p) sec_c = 3'd6;
      else             sec_c = 3'd5;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sector    <= 3'd1;
      ua_o      <= '0;
      ub_o      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sector <= sec_c;
        ua_o   <= ua;
        ub_o   <= ub;
      end
    end
  end

endmodule
