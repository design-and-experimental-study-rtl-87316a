// dead_time: dead-time (break-before-make) generator for one complementary
// pair of switches.
//
// `in` requests the upper switch of the pair (the lower one gets its
// complement). Any change of the request switches the active output off at
// once and lets the other one on only after `dead` further clocks, during
// which both are off. The request is registered first, so with dead = 0
// both outputs follow `in` one clock later with no gap, and with dead = D
// the switched-off output leads the switched-on one by exactly D clocks.
// The document requires dead-zone protection and BBM control of the twelve
// switches; the counter implementation is this design's.
module dead_time #(
  parameter int DEAD_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in,
  input  logic [DEAD_W-1:0] dead,
  output logic              hi,
  output logic              lo
);

  logic              in_q;
  logic [DEAD_W-1:0] cnt;     // clocks since the last change, saturating
  logic              ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q <= 1'b0;
      cnt  <= '0;
    end else if (in != in_q) begin
      in_q <= in;
      cnt  <= '0;
    end else if (cnt != '1) begin
      cnt <= cnt + 1'b1;
    end
  end

  assign ok = cnt >= dead;
  assign hi = in_q && ok;
  assign lo = !in_q && ok;

endmodule
