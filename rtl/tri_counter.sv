// tri_counter: triangular carrier counter of the pulse generator.
//
// Counts 0, 1, .., th-1 with `up` high and then th-1, .., 1, 0 with `up`
// low, so one carrier period is exactly 2*th clocks and every count value
// is seen once on each slope. A comparator threshold c therefore yields a
// pulse of exactly 2*(th-c) clocks centred on the peak. The half period th
// is the cycle register; it is taken over only at the end of a period, so a
// change never distorts a running period. `load` is high during the last
// clock of every period (down slope, count 0): registers that take new
// compare values on that edge apply them from the first clock of the next
// period. The document names a triangular-wave counter; its counting scheme
// is this design's. th below 2 is treated as 2.
module tri_counter
  import svpwm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  time_t th,
  output time_t cnt,
  output logic  up,
  output logic  load,
  output time_t th_q
);

  time_t th_c;
  assign th_c = (th < time_t'(2)) ? time_t'(2) : th;

  assign load = en && !up && cnt == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      up   <= 1'b0;
      th_q <= time_t'(2);
    end else if (!en) begin
      cnt  <= '0;
      up   <= 1'b0;
      th_q <= th_c;
    end else if (up) begin
      if (cnt >= th_q - 1'b1) up  <= 1'b0;
      else                    cnt <= cnt + 1'b1;
    end else begin
      if (cnt == '0) begin
        up   <= 1'b1;
        th_q <= th_c;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
