// dt_detector: decision-tree packet classifier of the HIDS.
//
// Takes the two cumulative counter values gathered while one packet was
// parsed and decides whether the parse was legitimate, a heap overflow or
// a stack overflow:
//
//   LD_STALL     < K1  -> legitimate
//   else BRANCH_TAKEN < K2 -> heap overflow
//   else                   -> stack overflow
//
// The tree shape, the two features and the thresholds (K1 = 14,
// K2 = 65.5) come from the trained model of the document. Because K2 has a
// fractional part, the thresholds are held in half-counts (K1_HALF = 28,
// K2_HALF = 131) and each count is doubled before the comparison, which
// keeps the trained numbers exact for integer counts.
//
// Timing: two clock cycles, as the document states. start_i is sampled at
// a rising edge together with the inputs; the first stage registers the
// two comparisons, the second the decision. done_o is high for one cycle,
// two edges after the start edge, with class_o and attack_o valid in that
// cycle and held until the next decision. The pipelining into exactly
// these two stages is this design's choice.
module dt_detector
  import hids_pkg::pkt_class_e, hids_pkg::CLS_LEGITIMATE, hids_pkg::CLS_HEAP_OVERFLOW,
         hids_pkg::CLS_STACK_OVERFLOW;
#(
  parameter int unsigned CNT_W   = 64,
  parameter int unsigned K1_HALF = 28,   // LD_STALL threshold x2 (14)
  parameter int unsigned K2_HALF = 131   // BRANCH_TAKEN threshold x2 (65.5)
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             start_i,
  input  logic [CNT_W-1:0] ld_stall_i,
  input  logic [CNT_W-1:0] branch_taken_i,
  output logic             done_o,
  output pkt_class_e       class_o,
  output logic             attack_o
);

  localparam int unsigned CW = CNT_W + 1;

  logic s1_valid_q, s1_ld_lt_q, s1_bt_lt_q;
  logic done_q;
  pkt_class_e class_q;

  // Stage 1: threshold comparisons in half-counts.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s1_valid_q <= 1'b0;
      s1_ld_lt_q <= 1'b0;
      s1_bt_lt_q <= 1'b0;
    end else begin
      s1_valid_q <= start_i;
      if (start_i) begin
        s1_ld_lt_q <= {ld_stall_i, 1'b0}     < CW'(K1_HALF);
        s1_bt_lt_q <= {branch_taken_i, 1'b0} < CW'(K2_HALF);
      end
    end
  end

  // Stage 2: walk the tree.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      done_q  <= 1'b0;
      class_q <= CLS_LEGITIMATE;
    end else begin
      done_q <= s1_valid_q;
      if (s1_valid_q) begin
        if (s1_ld_lt_q)      class_q <= CLS_LEGITIMATE;
        else if (s1_bt_lt_q) class_q <= CLS_HEAP_OVERFLOW;
        else                 class_q <= CLS_STACK_OVERFLOW;
      end
    end
  end

  assign done_o   = done_q;
  assign class_o  = class_q;
  assign attack_o = (class_q != CLS_LEGITIMATE);

endmodule
