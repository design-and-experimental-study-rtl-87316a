// adc_proc: storage and checking of the sampled converter words.
//
// Every word delivered by the AD7656 controller is written into a sample
// register file at its index. When a frame has been read completely
// (`frame_done`) the two DC-link capacitor voltages, the words at VC1_IDX
// and VC2_IDX, are compared: if |Vc1 - Vc2| exceeds `np_limit` the
// neutral-point potential is unbalanced and `np_fault` is raised until a
// later frame is balanced again. `frame_valid` pulses once the check of a
// frame is done, one clock after frame_done. Words are two's complement,
// as the converter delivers them.
// The document says the sampled DC voltages and output currents are
// processed in the FPGA and that neutral-point unbalance blocks the PWM; the
// channel assignment and the threshold test are this design's.
module adc_proc #(
  parameter int NWORDS  = 18,
  parameter int DATA_W  = 16,
  parameter int VC1_IDX = 0,
  parameter int VC2_IDX = 1,
  localparam int IDX_W  = $clog2(NWORDS)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               smp_valid,
  input  logic [IDX_W-1:0]                   smp_idx,
  input  logic [DATA_W-1:0]                  smp_data,
  input  logic                               frame_done,
  input  logic [DATA_W-1:0]                  np_limit,
  output logic [NWORDS-1:0][DATA_W-1:0]      samples,
  output logic                               np_fault,
  output logic                               frame_valid
);

  logic signed [DATA_W:0] diff;
  logic        [DATA_W:0] mag;

  always_comb begin
    diff = (DATA_W+1)'(signed'(samples[VC1_IDX])) -
           (DATA_W+1)'(signed'(samples[VC2_IDX]));
    mag  = diff[DATA_W] ? (DATA_W+1)'(-diff) : (DATA_W+1)'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samples     <= '0;
      np_fault    <= 1'b0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= frame_done;
      if (smp_valid && int'(smp_idx) < NWORDS) samples[smp_idx] <= smp_data;
      if (frame_done) np_fault <= mag > {1'b0, np_limit};
    end
  end

endmodule
