// ad7656_model: behavioural model of one AD7656 six-channel converter in
// parallel-interface mode, for simulation only (not synthesizable).
// A rising CONVST edge samples the six inputs `vin` and raises BUSY after
// 20 ns; BUSY falls CONV_NS later. Each falling RD edge while CS is low puts
// the next channel (V1 first) on `dout`; the read pointer restarts with
// every conversion. Out-of-order reads (RD without CS) are counted in
// `bad_reads`. The conversion time default, 3 us, is the order of the real
// device's.
module ad7656_model #(
  parameter int CONV_NS = 3000
) (
  input  logic             convst,
  input  logic             cs_n,
  input  logic             rd_n,
  input  logic [5:0][15:0] vin,
  output logic             busy,
  output logic [15:0]      dout,
  output int               conversions,
  output int               reads,
  output int               bad_reads
);
  logic [5:0][15:0] held;
  int               ptr;

  initial begin
    busy = 1'b0;
    dout = '0;
    held = '0;
    ptr = 0;
    conversions = 0;
    reads = 0;
    bad_reads = 0;
  end

  always @(posedge convst) begin
    held = vin;
    #20 busy = 1'b1;
    #(CONV_NS) busy = 1'b0;
    ptr = 0;
    conversions++;
  end

  always @(negedge rd_n) begin
    if (!cs_n && !busy) begin
      #10 dout = held[ptr % 6];
      ptr++;
      reads++;
    end else if (!cs_n) begin
      bad_reads++;
    end
  end
endmodule
