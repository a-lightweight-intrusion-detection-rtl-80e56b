// hpm_counters: hardware performance counters of the network processor.
//
// Holds the 64-bit cycle counter (counter 0, mcycle), the retired
// instruction counter (counter 2, minstret) and NUM_MHPMCOUNTERS
// programmable event counters (counters 3, 4, ..., mhpmcounterN). Each
// programmable counter has an event selector, mhpmeventN: in a cycle where
// any event line whose selector bit is set is high, the counter adds one.
// Bit k of mcountinhibit stops counter k. Event lines are per-cycle
// strobes; IMISS is high in every cycle spent waiting for a fetch.
//
// Two access paths:
//  * CSR port (firmware): csr_addr_i / csr_wdata_i / csr_we_i write in the
//    clock edge, csr_rdata_o reads combinationally. The addresses and the
//    low/high 32-bit halves are those of the RISC-V privileged spec.
//    Unimplemented counters read as zero and ignore writes.
//  * Tracer port: trc_clear_i zeroes all programmable counters in one
//    cycle; trc_count_en_i opens the monitoring window (programmable
//    counters only count while it is high and their inhibit bit is clear);
//    trc_rd_idx_i selects one counter by number and trc_rd_data_o returns
//    its full 64-bit value combinationally.
//
// Priority in one cycle: tracer clear, then CSR write, then increment.
// Counter widths, counter numbering, the event list and the default of two
// programmable counters follow the document. The tracer gate, the reset
// values (all counters zero, mcountinhibit zero, selectors preset to
// LD_STALL and BRANCH_TAKEN) and the priority order are this design's
// choices.
module hpm_counters
  import hids_pkg::*;
#(
  parameter int unsigned NUM_MHPMCOUNTERS = 2,
  parameter int unsigned CNT_W            = 64
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // Event strobes from the core, one bit per event in hpm_event_e order.
  input  event_vec_t        events_i,
  // Firmware CSR port.
  input  logic              csr_we_i,
  input  logic [11:0]       csr_addr_i,
  input  logic [31:0]       csr_wdata_i,
  output logic [31:0]       csr_rdata_o,
  output logic              csr_hit_o,
  // Tracer port.
  input  logic              trc_clear_i,
  input  logic              trc_count_en_i,
  input  logic [4:0]        trc_rd_idx_i,
  output logic [CNT_W-1:0]  trc_rd_data_o
);

  localparam int unsigned NSLOT = NUM_MHPMCOUNTERS + 2;

  // Storage slot of counter number n: mcycle -> 0, minstret -> 1,
  // mhpmcounter(3+j) -> 2+j. Returns NSLOT for a number with no counter.
  function automatic int unsigned slot_of(logic [4:0] n);
    if (n == 5'd0) return 0;
    if (n == 5'd2) return 1;
    if (int'(n) >= FIRST_HPM && int'(n) < FIRST_HPM + NUM_MHPMCOUNTERS)
      return int'(n) - FIRST_HPM + 2;
    return NSLOT;
  endfunction

  logic [NSLOT-1:0][CNT_W-1:0]            cnt_q, cnt_d;
  logic [NUM_MHPMCOUNTERS-1:0][NUM_EVENTS-1:0] sel_q;
  logic [31:0]                            inhibit_q;

  // Counter number of each slot.
  function automatic int unsigned num_of(int unsigned s);
    if (s == 0) return 0;
    if (s == 1) return 2;
    return s - 2 + FIRST_HPM;
  endfunction

  // Increment condition of each slot.
  logic [NSLOT-1:0] inc;
  always_comb begin
    inc[0] = ~inhibit_q[0];
    inc[1] = ~inhibit_q[2] & events_i[EV_INSTR];
    for (int unsigned j = 0; j < NUM_MHPMCOUNTERS; j++)
      inc[j+2] = ~inhibit_q[FIRST_HPM+j] & trc_count_en_i & |(events_i & sel_q[j]);
  end

  // CSR decode.
  logic [4:0] csr_num;
  logic       csr_is_lo, csr_is_hi, csr_is_evt, csr_is_inh;
  always_comb begin
    csr_num    = csr_addr_i[4:0];
    csr_is_lo  = (csr_addr_i[11:5] == CSR_MCOUNTER_BASE[11:5]);   // 0xB00-0xB1F
    csr_is_hi  = (csr_addr_i[11:5] == CSR_MCOUNTERH_BASE[11:5]);  // 0xB80-0xB9F
    csr_is_inh = (csr_addr_i == CSR_MCOUNTINHIBIT);
    csr_is_evt = (csr_addr_i[11:5] == CSR_MHPMEVENT_BASE[11:5]) && !csr_is_inh; // 0x321-0x33F
  end

  always_comb begin
    int unsigned s;
    s     = NSLOT;
    cnt_d = cnt_q;
    for (int unsigned k = 0; k < NSLOT; k++)
      if (inc[k]) cnt_d[k] = cnt_q[k] + CNT_W'(1);
    if (csr_we_i && (csr_is_lo || csr_is_hi)) begin
      s = slot_of(csr_num);
      if (s < NSLOT) begin
        if (csr_is_lo) cnt_d[s][31:0]       = csr_wdata_i;
        else           cnt_d[s][CNT_W-1:32] = csr_wdata_i[CNT_W-33:0];
      end
    end
    if (trc_clear_i)
      for (int unsigned j = 0; j < NUM_MHPMCOUNTERS; j++) cnt_d[j+2] = '0;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q     <= '0;
      inhibit_q <= '0;
      for (int unsigned j = 0; j < NUM_MHPMCOUNTERS; j++) sel_q[j] <= default_event_sel(j);
    end else begin
      cnt_q <= cnt_d;
      if (csr_we_i && csr_is_inh) begin
        // Only bits of implemented counters are writable.
        for (int unsigned k = 0; k < NSLOT; k++)
          inhibit_q[num_of(k)] <= csr_wdata_i[num_of(k)];
      end
      if (csr_we_i && csr_is_evt)
        for (int unsigned j = 0; j < NUM_MHPMCOUNTERS; j++)
          if (csr_num == 5'(FIRST_HPM + j)) sel_q[j] <= csr_wdata_i[NUM_EVENTS-1:0];
    end
  end

  // CSR read.
  always_comb begin
    int unsigned s;
    csr_rdata_o = '0;
    csr_hit_o   = 1'b0;
    s = slot_of(csr_num);
    if (csr_is_inh) begin
      csr_hit_o   = 1'b1;
      csr_rdata_o = inhibit_q;
    end else if (csr_is_evt) begin
      csr_hit_o = 1'b1;
      for (int unsigned j = 0; j < NUM_MHPMCOUNTERS; j++)
        if (csr_num == 5'(FIRST_HPM + j)) csr_rdata_o = 32'(sel_q[j]);
    end else if (csr_is_lo || csr_is_hi) begin
      csr_hit_o = 1'b1;
      if (s < NSLOT)
        csr_rdata_o = csr_is_lo ? cnt_q[s][31:0] : 32'(cnt_q[s][CNT_W-1:32]);
    end
  end

  // Tracer read.
  always_comb begin
    int unsigned s;
    s = slot_of(trc_rd_idx_i);
    trc_rd_data_o = (s < NSLOT) ? cnt_q[s] : '0;
  end

endmodule
