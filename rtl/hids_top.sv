// hids_top: host-based intrusion detection system attached to a RISC-V
// network processor.
//
// While the processor parses a received radio packet, its performance
// counters accumulate hardware events; at the end of parsing the tracer
// reads the LD_STALL and BRANCH_TAKEN counts and the decision-tree detector
// classes the packet as legitimate, heap overflow or stack overflow. An
// attack raises alert_o, which the core takes as an exception.
//
// The processor core itself is outside this module. Its side is brought out
// as ports: the per-cycle event strobes, a CSR port for the counter
// registers (mcountinhibit, mhpmevent*, mcycle, minstret, mhpmcounter*)
// and the three firmware tracer controls. The latched counter values are
// also brought out (trace_*) for a debug logger.
//
// Contents: hpm_counters (2 programmable 64-bit counters by default),
// hpm_tracer and dt_detector; timing is that of hpm_tracer: result five
// edges after the edge that samples hpm_stop_i.
module hids_top
  import hids_pkg::*;
#(
  parameter int unsigned NUM_MHPMCOUNTERS = 2,
  parameter int unsigned CNT_W            = 64
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  event_vec_t        events_i,
  input  logic              csr_we_i,
  input  logic [11:0]       csr_addr_i,
  input  logic [31:0]       csr_wdata_i,
  output logic [31:0]       csr_rdata_o,
  output logic              csr_hit_o,
  input  logic              hpm_reset_i,
  input  logic              hpm_enable_i,
  input  logic              hpm_stop_i,
  output logic              busy_o,
  output logic              result_valid_o,
  output pkt_class_e        class_o,
  output logic              alert_o,
  output logic [CNT_W-1:0]  trace_ld_stall_o,
  output logic [CNT_W-1:0]  trace_branch_taken_o
);

  // The tracer uses the first two programmable counters.
  if (NUM_MHPMCOUNTERS < 2) begin : g_param_check
    $error("hids_top needs NUM_MHPMCOUNTERS >= 2");
  end

  logic             cnt_clear, cnt_count_en;
  logic [4:0]       cnt_rd_idx;
  logic [CNT_W-1:0] cnt_rd_data;
  logic             det_start, det_done, det_attack;
  logic [CNT_W-1:0] det_ld, det_bt;
  pkt_class_e       det_class;

  hpm_counters #(
    .NUM_MHPMCOUNTERS (NUM_MHPMCOUNTERS),
    .CNT_W            (CNT_W)
  ) u_counters (
    .clk_i, .rst_ni, .events_i,
    .csr_we_i, .csr_addr_i, .csr_wdata_i, .csr_rdata_o, .csr_hit_o,
    .trc_clear_i    (cnt_clear),
    .trc_count_en_i (cnt_count_en),
    .trc_rd_idx_i   (cnt_rd_idx),
    .trc_rd_data_o  (cnt_rd_data)
  );

  hpm_tracer #(
    .CNT_W            (CNT_W),
    .LD_STALL_CNT     (5'(FIRST_HPM)),
    .BRANCH_TAKEN_CNT (5'(FIRST_HPM + 1))
  ) u_tracer (
    .clk_i, .rst_ni,
    .hpm_reset_i, .hpm_enable_i, .hpm_stop_i,
    .cnt_clear_o        (cnt_clear),
    .cnt_count_en_o     (cnt_count_en),
    .cnt_rd_idx_o       (cnt_rd_idx),
    .cnt_rd_data_i      (cnt_rd_data),
    .det_start_o        (det_start),
    .det_ld_stall_o     (det_ld),
    .det_branch_taken_o (det_bt),
    .det_done_i         (det_done),
    .det_class_i        (det_class),
    .det_attack_i       (det_attack),
    .busy_o, .result_valid_o, .class_o, .alert_o
  );

  dt_detector #(
    .CNT_W (CNT_W)
  ) u_detector (
    .clk_i, .rst_ni,
    .start_i        (det_start),
    .ld_stall_i     (det_ld),
    .branch_taken_i (det_bt),
    .done_o         (det_done),
    .class_o        (det_class),
    .attack_o       (det_attack)
  );

  assign trace_ld_stall_o     = det_ld;
  assign trace_branch_taken_o = det_bt;

endmodule
