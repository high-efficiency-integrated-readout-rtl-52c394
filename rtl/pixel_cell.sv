`timescale 1ns/1ps
// pixel_cell: the routing circuit placed under every SPAD.
//
// It combines the priority generator, the state-register FSM, the delay line
// (ring oscillator plus control) and the output gates. A photon edge arms the
// delay line at once, so its timing is kept with picosecond precision while
// the digital part decides where it goes:
//   IDLE     the delay line is free;
//   PENDING  a photon was seen (delay line busy, sensed through a two-stage
//            synchronizer on Clock_HF); wait for the end of the laser period;
//   SELECT   from the period's last edge (`tick`) the pixel competes on the
//            set of lines `cur_set` assigned to that period: its reversed
//            count is loaded into the shift register, its state register is
//            set to all ones, and one priority bit is compared per step;
//   ROUTED   after the last step the state register names at most one
//            channel; the delayed photon is gated onto that channel's shared
//            output line (`chan_out`) when it leaves the delay line. The
//            pixel returns to IDLE when the delay line frees itself.
// A second photon while the delay line is busy is ignored, and the state
// register is never restarted before the pixel's own selection and output are
// over. For the photon to be routed, the delay (DELAY_CYCLES ring periods)
// must exceed one period, plus PRIO_BITS steps, plus the synchronizer.
//
// The functions of the parts and their connection follow the published circuit's
// per-pixel schematic and its pipelined variant. The synchronizer, the
// four-state controller and the rule that a busy pixel ignores photons are
// this design's reading of how the pixel keeps its state during a selection.
module pixel_cell
  import router_pkg::*;
#(
  parameter int unsigned PRIO_BITS      = 10,
  parameter int unsigned NUM_SETS       = 2,
  parameter int unsigned DELAY_CYCLES   = 4,
  parameter int unsigned RING_STAGES    = 9,
  parameter real         STAGE_DELAY_NS = 28.0 / 36.0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          tick,
  input  logic [(NUM_SETS > 1 ? $clog2(NUM_SETS) : 1)-1:0] cur_set,
  input  logic [NUM_SETS-1:0]           step_en,
  input  logic [NUM_SETS-1:0]           last,
  input  logic                          en_in,
  output logic                          en_out,
  input  logic                          photon,
  input  level_t                        level [NUM_SETS][NUM_CH],
  output chmask_t                       req   [NUM_SETS],
  output chmask_t                       chan_out
);

  localparam int unsigned CSW = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1;

  typedef enum logic [1:0] {IDLE, PENDING, SELECT, ROUTED} pix_state_t;
  pix_state_t state;

  logic [CSW-1:0] set_id;
  logic           busy_a, busy_m, busy_s;
  logic           ring_en, osc, dl_out;
  logic           do_step, do_start, prio_bit, fsm_done;
  chmask_t        fsm_req, fsm_state, fsm_route, route;
  level_t         my_level [NUM_CH];
  logic [PRIO_BITS-1:0] count;

  // ---- delay line -------------------------------------------------------
  ring_oscillator #(.STAGES(RING_STAGES), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_ring (
    .en(ring_en), .osc(osc));

  delay_line_ctrl #(.DELAY_CYCLES(DELAY_CYCLES)) u_dl (
    .rst(~rst_n), .photon(photon), .osc(osc),
    .ring_en(ring_en), .out(dl_out), .busy(busy_a));

  always_ff @(posedge clk) begin
    if (!rst_n) {busy_s, busy_m} <= '0;
    else        {busy_s, busy_m} <= {busy_m, busy_a};
  end

  // ---- controller -------------------------------------------------------
  assign do_start = (state == PENDING) && tick;
  assign do_step  = (state == SELECT) && step_en[set_id];
  assign fsm_done = do_step && last[set_id];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      set_id <= '0;
    end else begin
      unique case (state)
        IDLE:    if (busy_s) state <= PENDING;
        PENDING: if (tick) begin
                   state  <= SELECT;
                   set_id <= cur_set;
                 end
        SELECT:  if (fsm_done) state <= ROUTED;
        ROUTED:  if (!busy_s) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // ---- priority and state register -------------------------------------
  priority_generator #(.PRIO_BITS(PRIO_BITS)) u_prio (
    .clk, .rst_n, .tick, .en_in, .en_out,
    .capture(state == PENDING), .shift(do_step),
    .prio_bit, .count);

  always_comb
    for (int k = 0; k < NUM_CH; k++) my_level[k] = level[set_id][k];

  routing_fsm u_fsm (
    .clk, .rst_n, .start(do_start), .step(do_step), .prio_bit,
    .level(my_level), .req(fsm_req), .state(fsm_state), .route(fsm_route));

  always_comb
    for (int s = 0; s < NUM_SETS; s++)
      req[s] = (set_id == CSW'(s)) ? fsm_req : '0;

  // ---- output gates onto the shared channel lines ------------------------
  assign route    = (state == ROUTED) ? fsm_route : '0;
  assign chan_out = route & {NUM_CH{dl_out}};

endmodule
