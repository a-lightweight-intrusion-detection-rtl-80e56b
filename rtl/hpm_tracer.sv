// hpm_tracer: per-packet tracing controller of the HIDS.
//
// The network processor firmware drives three one-cycle strobes around the
// parsing of each received packet: hpm_reset_i (zero the programmable
// counters), hpm_enable_i (open the monitoring window) and hpm_stop_i (end
// of parsing). While the window is open the tracer holds cnt_count_en_o
// high so the selected hardware events accumulate. On stop it closes the
// window, reads the LD_STALL and BRANCH_TAKEN counters one at a time over
// the counter read port, hands both values to the detector and waits for
// its decision. It then pulses result_valid_o and, when the packet is
// classed as an attack, raises alert_o, the exception request to the core.
//
// States: IDLE -> MONITOR (enable) -> READ_LD (stop) -> READ_BT ->
// DETECT -> WAIT_DET -> IDLE. hpm_reset_i is honoured in IDLE and MONITOR
// and also clears alert_o; enable and stop are ignored outside IDLE and
// MONITOR respectively. busy_o is high from stop until the result.
//
// Timing: counting stops after the cycle in which hpm_stop_i is sampled
// (that cycle's events still count). result_valid_o rises five edges after
// the edge that samples hpm_stop_i: two counter reads, the start cycle and
// the detector's two cycles. The three firmware controls, the one-at-a-time
// read, the detector hand-off and the alert follow the document; the state
// encoding, the sticky alert and its clearing by hpm_reset_i are this
// design's choices. Assertions check that the firmware raises at most one
// control per cycle and that the detector only answers when awaited.
module hpm_tracer
  import hids_pkg::pkt_class_e, hids_pkg::CLS_LEGITIMATE;
#(
  parameter int unsigned CNT_W            = 64,
  parameter logic [4:0]  LD_STALL_CNT     = 5'd3,  // counter holding LD_STALL
  parameter logic [4:0]  BRANCH_TAKEN_CNT = 5'd4   // counter holding BRANCH_TAKEN
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // Firmware controls.
  input  logic             hpm_reset_i,
  input  logic             hpm_enable_i,
  input  logic             hpm_stop_i,
  // Counter port.
  output logic             cnt_clear_o,
  output logic             cnt_count_en_o,
  output logic [4:0]       cnt_rd_idx_o,
  input  logic [CNT_W-1:0] cnt_rd_data_i,
  // Detector port.
  output logic             det_start_o,
  output logic [CNT_W-1:0] det_ld_stall_o,
  output logic [CNT_W-1:0] det_branch_taken_o,
  input  logic             det_done_i,
  input  pkt_class_e       det_class_i,
  input  logic             det_attack_i,
  // Status towards the core.
  output logic             busy_o,
  output logic             result_valid_o,
  output pkt_class_e       class_o,
  output logic             alert_o
);

  typedef enum logic [2:0] {
    ST_IDLE, ST_MONITOR, ST_READ_LD, ST_READ_BT, ST_DETECT, ST_WAIT_DET
  } state_e;

  state_e     state_q, state_d;
  logic [CNT_W-1:0] ld_q, bt_q;
  logic       valid_q, alert_q;
  pkt_class_e class_q;

  logic ctl_reset;
  assign ctl_reset = hpm_reset_i && (state_q inside {ST_IDLE, ST_MONITOR});

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:     if (hpm_enable_i && !hpm_reset_i) state_d = ST_MONITOR;
      ST_MONITOR:  if (hpm_reset_i)     state_d = ST_IDLE;
                   else if (hpm_stop_i) state_d = ST_READ_LD;
      ST_READ_LD:  state_d = ST_READ_BT;
      ST_READ_BT:  state_d = ST_DETECT;
      ST_DETECT:   state_d = ST_WAIT_DET;
      ST_WAIT_DET: if (det_done_i) state_d = ST_IDLE;
      default:     state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= ST_IDLE;
      ld_q    <= '0;
      bt_q    <= '0;
      valid_q <= 1'b0;
      alert_q <= 1'b0;
      class_q <= CLS_LEGITIMATE;
    end else begin
      state_q <= state_d;
      valid_q <= 1'b0;
      if (state_q == ST_READ_LD) ld_q <= cnt_rd_data_i;
      if (state_q == ST_READ_BT) bt_q <= cnt_rd_data_i;
      if (state_q == ST_WAIT_DET && det_done_i) begin
        valid_q <= 1'b1;
        class_q <= det_class_i;
        if (det_attack_i) alert_q <= 1'b1;
      end
      if (ctl_reset) alert_q <= 1'b0;
    end
  end

  // Handshake rules: the firmware raises at most one control per cycle, and
  // the detector answers only a start this tracer issued.
  a_one_control: assert property (@(posedge clk_i) disable iff (!rst_ni)
    $onehot0({hpm_reset_i, hpm_enable_i, hpm_stop_i}));
  a_done_awaited: assert property (@(posedge clk_i) disable iff (!rst_ni)
    det_done_i |-> state_q == ST_WAIT_DET);

  assign cnt_clear_o        = ctl_reset;
  assign cnt_count_en_o     = (state_q == ST_MONITOR);
  assign cnt_rd_idx_o       = (state_q == ST_READ_BT) ? BRANCH_TAKEN_CNT : LD_STALL_CNT;
  assign det_start_o        = (state_q == ST_DETECT);
  assign det_ld_stall_o     = ld_q;
  assign det_branch_taken_o = bt_q;
  assign busy_o             = !(state_q inside {ST_IDLE, ST_MONITOR});
  assign result_valid_o     = valid_q;
  assign class_o            = class_q;
  assign alert_o            = alert_q;

endmodule
