// ad7656_ctrl: conversion and parallel read-out controller for AD7656 ADCs.
//
// A six-state machine (ST0, START, JUDGE, WAITING, READ, STOP) runs one
// sampling frame per request:
//   ST0     idle, CONVST low. A `start` request moves to START.
//   START   CONVST is driven high (rising edge starts the conversion in all
//           converters) and held for START_CLKS clocks, then JUDGE.
//   JUDGE   waits until every converter has dropped BUSY, then WAITING.
//   WAITING RD high between reads. After RD_HIGH clocks, if words remain,
//           RD is pulled low and the machine enters READ.
//   READ    RD low for RD_LOW clocks; the data bus is captured on the last
//           one and RD returns high (back to WAITING).
//   STOP    entered from WAITING once the read-phase clock counter cnt_v has
//           reached CNT_V_END; CONVST drops, STOP_CLKS clocks later ST0.
// The read phase reads CH_PER_ADC words from each of NUM_ADC converters in
// turn, the converter being selected by its active-low chip select cs_n[i].
// `soft_rst_n` low sends ST0, START and JUDGE back to ST0 (abort of a frame
// that has not begun reading); rst_n is the asynchronous power-on reset.
//
// The state names and the transition conditions (START_CLKS = 10 clocks,
// BUSY low, RD low / high, cnt_v >= 8'b10000001 = 129, STOP_CLKS = 4) follow
// the documented state diagram. The number of converters (three chip
// selects) follows the documented read-out timing. Holding CONVST high until
// STOP, the RD pulse lengths, the word order and the capture instant are
// choices of this design.
//
// Outputs: one `smp_valid` pulse per word with its index
// (converter * CH_PER_ADC + channel) and value, and a `frame_done` pulse on
// the return to ST0.
module ad7656_ctrl #(
  parameter int NUM_ADC    = 3,
  parameter int CH_PER_ADC = 6,
  parameter int DATA_W     = 16,
  parameter int START_CLKS = 10,
  parameter int STOP_CLKS  = 4,
  parameter int RD_LOW     = 4,
  parameter int RD_HIGH    = 3,
  parameter int CNT_V_W    = 8,
  parameter int CNT_V_END  = 129,
  localparam int NWORDS    = NUM_ADC * CH_PER_ADC,
  localparam int IDX_W     = $clog2(NWORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     soft_rst_n,
  input  logic                     start,
  // converter interface
  output logic                     convst,
  output logic [NUM_ADC-1:0]       cs_n,
  output logic                     rd_n,
  input  logic [NUM_ADC-1:0]       busy,
  input  logic [DATA_W-1:0]        db,
  // captured samples
  output logic                     smp_valid,
  output logic [IDX_W-1:0]         smp_idx,
  output logic [DATA_W-1:0]        smp_data,
  output logic                     frame_done,
  output logic [2:0]               state_o
);

  typedef enum logic [2:0] {
    ST0     = 3'd0,
    START   = 3'd1,
    JUDGE   = 3'd2,
    WAITING = 3'd3,
    READ    = 3'd4,
    STOP    = 3'd5
  } state_t;

  if (CNT_V_END < NWORDS * (RD_LOW + RD_HIGH)) begin : g_chk_reads
    $error("ad7656_ctrl: CNT_V_END too small for all reads");
  end
  if (CNT_V_END >= (1 << CNT_V_W)) begin : g_chk_cntv
    $error("ad7656_ctrl: CNT_V_END does not fit in cnt_v");
  end

  state_t               state;
  logic [7:0]           tmr;        // clocks spent in the current state/phase
  logic [CNT_V_W-1:0]   cnt_v;      // clocks since the read phase began
  logic [IDX_W:0]       nread;      // words read so far in this frame

  int unsigned          chip;
  assign chip = int'(nread) / CH_PER_ADC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST0;
      tmr        <= '0;
      cnt_v      <= '0;
      nread      <= '0;
      convst     <= 1'b0;
      rd_n       <= 1'b1;
      smp_valid  <= 1'b0;
      smp_idx    <= '0;
      smp_data   <= '0;
      frame_done <= 1'b0;
    end else begin
      smp_valid  <= 1'b0;
      frame_done <= 1'b0;
      tmr        <= tmr + 8'd1;
      unique case (state)
        ST0: begin
          convst <= 1'b0;
          rd_n   <= 1'b1;
          if (soft_rst_n && start) begin
            state  <= START;
            convst <= 1'b1;
            tmr    <= '0;
          end
        end
        START: begin
          if (!soft_rst_n) begin
            state  <= ST0;
            convst <= 1'b0;
          end else if (tmr >= 8'(START_CLKS - 1)) begin
            state <= JUDGE;
            tmr   <= '0;
          end
        end
        JUDGE: begin
          if (!soft_rst_n) begin
            state  <= ST0;
            convst <= 1'b0;
          end else if (busy == '0) begin
            state <= WAITING;
            tmr   <= '0;
            cnt_v <= '0;
            nread <= '0;
          end
        end
        WAITING: begin
          cnt_v <= cnt_v + 1'b1;
          if (cnt_v >= CNT_V_W'(CNT_V_END)) begin
            state  <= STOP;
            convst <= 1'b0;
            tmr    <= '0;
          end else if (tmr >= 8'(RD_HIGH - 1) && nread < (IDX_W+1)'(NWORDS)) begin
            state <= READ;
            rd_n  <= 1'b0;
            tmr   <= '0;
          end
        end
        READ: begin
          cnt_v <= cnt_v + 1'b1;
          if (tmr >= 8'(RD_LOW - 1)) begin
            state     <= WAITING;
            rd_n      <= 1'b1;
            tmr       <= '0;
            smp_valid <= 1'b1;
            smp_idx   <= IDX_W'(nread);
            smp_data  <= db;
            nread     <= nread + 1'b1;
          end
        end
        STOP: begin
          if (tmr >= 8'(STOP_CLKS - 1)) begin
            state      <= ST0;
            frame_done <= 1'b1;
            tmr        <= '0;
          end
        end
        default: state <= ST0;
      endcase
    end
  end

  // chip select: the converter being read is selected from the first RD of
  // its words to the last one
  always_comb begin
    for (int i = 0; i < NUM_ADC; i++)
      cs_n[i] = !((state == WAITING || state == READ) &&
                  nread < (IDX_W+1)'(NWORDS) && chip == i);
  end

  assign state_o = state;

  // RD only pulses while a converter is selected
  a_rd_cs: assert property (@(posedge clk) disable iff (!rst_n) !rd_n |-> cs_n != '1);

endmodule
