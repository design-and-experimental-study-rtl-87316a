// protect_unit: PWM blocking protection.
//
// The IGBT gate drivers report a fault on active-low lines (`drv_fault_n`,
// one per driver); the sample processing reports neutral-point potential
// unbalance (`np_fault`). Either condition sets the `block` latch, which
// switches off all twelve PWM outputs. The driver lines come from outside
// the chip and are first passed through a two-flip-flop synchronizer, so
// `block` rises three clocks after a driver fault and one clock after
// np_fault. The latch is released only by `clr` while no fault is present.
// `cause` records which source set it: bit 0 driver, bit 1 neutral point.
// The document names both blocking causes; the latching, the synchronizer
// and the release rule are this design's.
module protect_unit #(
  parameter int NUM_DRV = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_DRV-1:0] drv_fault_n,
  input  logic               np_fault,
  input  logic               clr,
  output logic               block,
  output logic [1:0]         cause
);

  logic [NUM_DRV-1:0] sync1, sync2;
  logic               drv_fault;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '1;
      sync2 <= '1;
    end else begin
      sync1 <= drv_fault_n;
      sync2 <= sync1;
    end
  end

  assign drv_fault = (sync2 != '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      block <= 1'b0;
      cause <= '0;
    end else if (drv_fault || np_fault) begin
      block <= 1'b1;
      cause <= cause | {np_fault, drv_fault};
    end else if (clr) begin
      block <= 1'b0;
      cause <= '0;
    end
  end

endmodule
