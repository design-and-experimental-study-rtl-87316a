// svpwm_top: FPGA controller of a diode-clamped (NPC) three-level inverter.
//
// The design turns a reference voltage vector (U-alpha, U-beta) into the
// twelve IGBT gate signals of a three-level bridge by space-vector PWM,
// reads the inverter's voltages and currents through AD7656 converters, and
// blocks the PWM on a gate-driver fault or neutral-point unbalance.
//
// Data path of the SVPWM signal generator, one register per block:
//   U-alpha/U-beta registers -> sector_calc -> ref_rotate -> area_calc and
//   vector_time (in parallel) -> switch_timing -> sector_map -> pwm_gen
// The chain computes a new set of comparator thresholds six clocks after it
// is started; it is started one clock after the reference registers are
// written (`uref_we`) and once per carrier period at the carrier peak.
// pwm_gen takes the latest thresholds at the end of each carrier period,
// so a new reference acts from the next carrier period that begins at
// least six clocks after it was written. The cycle register is read when
// the chain starts and travels with the thresholds; the carrier adopts it
// together with them, so thresholds and period always belong together and
// a new cycle register value acts from the period after the next peak.
//
// Sampling: at the end of every carrier period ad7656_ctrl runs one
// conversion and read-out frame of NUM_ADC x 6 words; adc_proc keeps the
// words (`samples`) and flags neutral-point unbalance, which sets the
// protection latch together with the gate-driver fault lines.
//
// Registers written from outside: the reference (ua_in, ub_in, uref_we),
// the cycle register (`cycle_reg`, half the carrier period in clocks) and
// the dead register (`dead_reg`, dead time in clocks). How the reference is
// produced (the outer control loop, keyboard and display) is outside this
// design. The block structure follows the document's block diagram of the
// signal generator; the reference scaling (Ud/3 = 8192), the sampling
// instant and the trigger points are this design's choices.
module svpwm_top
  import svpwm_pkg::*;
#(
  parameter int NUM_ADC    = 3,
  parameter int CH_PER_ADC = 6,
  parameter int ADC_W      = 16,
  parameter int DEAD_W     = 10,
  parameter int VC1_IDX    = 0,
  parameter int VC2_IDX    = 1,
  localparam int NWORDS    = NUM_ADC * CH_PER_ADC
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            en,           // run the carrier
  // reference vector registers
  input  ref_t                            ua_in,
  input  ref_t                            ub_in,
  input  logic                            uref_we,
  // cycle and dead registers
  input  time_t                           cycle_reg,
  input  logic [DEAD_W-1:0]               dead_reg,
  // AD7656 interface
  output logic                            adc_convst,
  output logic [NUM_ADC-1:0]              adc_cs_n,
  output logic                            adc_rd_n,
  input  logic [NUM_ADC-1:0]              adc_busy,
  input  logic [ADC_W-1:0]                adc_db,
  input  logic                            adc_soft_rst_n,
  output logic [NWORDS-1:0][ADC_W-1:0]    samples,
  // protection
  input  logic [ADC_W-1:0]                np_limit,
  input  logic [NUM_PWM-1:0]              drv_fault_n,
  input  logic                            block_clr,
  output logic                            blocked,
  output logic [1:0]                      block_cause,
  // gate signals and status
  output logic [NUM_PWM-1:0]              pwm,
  output level_t [2:0]                    leg_level,
  output sector_t                         sector,
  output region_t                         region,
  output logic                            prd_load,
  output time_t                           carrier_th,
  output logic                            calc_done,    // new thresholds ready
  output logic                            adc_frame_valid,
  output logic [2:0]                      adc_state
);

  // ---------------- reference registers ----------------
  ref_t ua_q, ub_q;
  logic we_d, peak, calc_start;
  time_t cnt;
  logic  up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ua_q <= '0;
      ub_q <= '0;
      we_d <= 1'b0;
    end else begin
      we_d <= uref_we;
      if (uref_we) begin
        ua_q <= ua_in;
        ub_q <= ub_in;
      end
    end
  end

  assign peak       = en && up && (cnt >= carrier_th - 1'b1);
  assign calc_start = we_d || peak;

  // ---------------- SVPWM signal generator chain ----------------
  logic             v1, v2, v3a, v3b, v4;
  sector_t          sec1, sec2, sec3, sec4;
  ref_t             ua1, ub1, ura, urb;
  logic [TIME_W:0]  t1, t2;
  time_t            th3, th4;
  sw_state_t [3:0]  seq;
  time_t [2:0]      thr;
  phase_cmp_t [2:0] cmp;
  time_t            th5;

  sector_calc u_sector (
    .clk(clk), .rst_n(rst_n), .in_valid(calc_start), .ua(ua_q), .ub(ub_q),
    .out_valid(v1), .sector(sec1), .ua_o(ua1), .ub_o(ub1));

  ref_rotate u_rotate (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .sector(sec1), .ua(ua1),
    .ub(ub1), .out_valid(v2), .sector_o(sec2), .ur_a(ura), .ur_b(urb));

  area_calc u_area (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .ur_a(ura), .ur_b(urb),
    .out_valid(v3a), .region(region));

  vector_time u_vtime (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .sector(sec2), .ur_a(ura),
    .ur_b(urb), .th(cycle_reg), .out_valid(v3b), .sector_o(sec3),
    .t1(t1), .t2(t2), .th_o(th3));

  switch_timing u_timing (
    .clk(clk), .rst_n(rst_n), .in_valid(v3a && v3b), .sector(sec3),
    .region(region), .t1(t1), .t2(t2), .th(th3), .out_valid(v4),
    .sector_o(sec4), .th_o(th4), .seq(seq), .thr(thr));

  sector_map u_map (
    .clk(clk), .rst_n(rst_n), .in_valid(v4), .sector(sec4), .th(th4),
    .seq(seq), .thr(thr), .out_valid(calc_done), .cmp(cmp), .th_o(th5));

  assign sector = sec4;

  // ---------------- PWM generation and protection ----------------
  logic np_fault;

  pwm_gen #(.DEAD_W(DEAD_W)) u_pwm (
    .clk(clk), .rst_n(rst_n), .en(en), .th(th5), .dead(dead_reg),
    .cmp_in(cmp), .block(blocked), .pwm(pwm), .level(leg_level),
    .cnt(cnt), .up(up), .prd_load(prd_load), .th_act(carrier_th));

  protect_unit #(.NUM_DRV(NUM_PWM)) u_prot (
    .clk(clk), .rst_n(rst_n), .drv_fault_n(drv_fault_n),
    .np_fault(np_fault), .clr(block_clr), .block(blocked),
    .cause(block_cause));

  // ---------------- sampling ----------------
  localparam int IDX_W = $clog2(NWORDS);
  logic             smp_valid, frame_done;
  logic [IDX_W-1:0] smp_idx;
  logic [ADC_W-1:0] smp_data;

  ad7656_ctrl #(.NUM_ADC(NUM_ADC), .CH_PER_ADC(CH_PER_ADC), .DATA_W(ADC_W))
  u_adc (
    .clk(clk), .rst_n(rst_n), .soft_rst_n(adc_soft_rst_n), .start(prd_load),
    .convst(adc_convst), .cs_n(adc_cs_n), .rd_n(adc_rd_n), .busy(adc_busy),
    .db(adc_db), .smp_valid(smp_valid), .smp_idx(smp_idx),
    .smp_data(smp_data), .frame_done(frame_done), .state_o(adc_state));

  adc_proc #(.NWORDS(NWORDS), .DATA_W(ADC_W), .VC1_IDX(VC1_IDX),
             .VC2_IDX(VC2_IDX)) u_proc (
    .clk(clk), .rst_n(rst_n), .smp_valid(smp_valid), .smp_idx(smp_idx),
    .smp_data(smp_data), .frame_done(frame_done), .np_limit(np_limit),
    .samples(samples), .np_fault(np_fault), .frame_valid(adc_frame_valid));

  // the chain stages run in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) v3a == v3b);

endmodule
