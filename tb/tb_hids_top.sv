// tb_hids_top: end-to-end testbench of the intrusion detection system at
// its default parameters.
//
// The testbench plays the network processor. For each packet its firmware
// model pulses hpm_reset, then hpm_enable, "parses" the packet for a number
// of cycles during which the core's event lines fire (LD_STALL and
// BRANCH_TAKEN a chosen number of times, the other events at random), and
// pulses hpm_stop. Packet profiles follow the measured counter ranges of
// the three classes: legitimate LD_STALL 8..13 / BRANCH_TAKEN 37..42, heap
// overflow 16..26 / 58..65, stack overflow 16..26 / 66..76, plus packets on
// the thresholds. Events also fire between packets, where they must not be
// counted.
//
// Checked per packet against values computed here: the class and alert,
// the traced counter values, the counters read back over the CSR port and
// the result latency (five edges after the stop edge). Also exercised and
// counted: each class, alert set and cleared, a counter stopped through
// mcountinhibit, event selectors swapped through mhpmevent, mcycle
// reads, and a packet abandoned by hpm_reset while monitoring.
module tb_hids_top;
  import hids_pkg::*;

  localparam int NPKT = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  event_vec_t ev;
  logic csr_we;
  logic [11:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata;
  logic csr_hit;
  logic hpm_reset, hpm_enable, hpm_stop;
  logic busy, valid, alert;
  pkt_class_e cls;
  logic [63:0] tr_ld, tr_bt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hids_top dut (
    .clk_i(clk), .rst_ni(rst_n), .events_i(ev),
    .csr_we_i(csr_we), .csr_addr_i(csr_addr), .csr_wdata_i(csr_wdata),
    .csr_rdata_o(csr_rdata), .csr_hit_o(csr_hit),
    .hpm_reset_i(hpm_reset), .hpm_enable_i(hpm_enable), .hpm_stop_i(hpm_stop),
    .busy_o(busy), .result_valid_o(valid), .class_o(cls), .alert_o(alert),
    .trace_ld_stall_o(tr_ld), .trace_branch_taken_o(tr_bt)
  );

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // Trained tree with integer counts: LD_STALL < 14, BRANCH_TAKEN < 65.5.
  function automatic pkt_class_e ref_class(int ld, int bt);
    if (ld < 14) return CLS_LEGITIMATE;
    if (bt <= 65) return CLS_HEAP_OVERFLOW;
    return CLS_STACK_OVERFLOW;
  endfunction

  // CSR access by the firmware model, one cycle each.
  task automatic csr_write(logic [11:0] a, logic [31:0] d);
    csr_addr = a; csr_wdata = d; csr_we = 1'b1;
    @(negedge clk);
    csr_we = 1'b0;
  endtask

  task automatic csr_read(logic [11:0] a, output logic [31:0] d);
    csr_addr = a; csr_we = 1'b0;
    #1 d = csr_rdata;
  endtask

  task automatic pulse(ref logic sig);
    sig = 1'b1;
    @(negedge clk);
    sig = 1'b0;
  endtask

  // Random activity on the events that are not under test.
  function automatic event_vec_t noise();
    event_vec_t v;
    v = event_vec_t'($urandom);
    v[EV_LD_STALL] = 1'b0;
    v[EV_BRANCH_TAKEN] = 1'b0;
    return v;
  endfunction

  int n_cls[3] = '{0, 0, 0};
  int n_alert_set = 0, n_alert_clr = 0, n_inhibit = 0, n_swap = 0;
  int n_mcycle = 0, n_abandon = 0, n_outside = 0;

  // One packet: ld/bt events in the window; inhibit3 stops counter 3;
  // swapped means the selectors of counters 3 and 4 are exchanged.
  task automatic packet(int ld, int bt, bit inhibit3, bit swapped);
    int len, rem_ld, rem_bt, stop_cyc, c3, c4;
    logic [31:0] lo, hi;
    pkt_class_e exp;
    bit was_alert;
    was_alert = alert;
    // Events between packets must not reach the programmable counters.
    for (int i = 0; i < 3; i++) begin
      ev = event_vec_t'($urandom);
      if (ev[EV_LD_STALL] || ev[EV_BRANCH_TAKEN]) n_outside++;
      @(negedge clk);
    end
    ev = '0;
    pulse(hpm_reset);
    check(!alert, "alert cleared by hpm_reset");
    if (was_alert) n_alert_clr++;
    pulse(hpm_enable);
    // Parsing: spread the events over the window.
    len = ld + bt + 5 + ($urandom % 20);
    rem_ld = ld; rem_bt = bt;
    for (int i = 0; i < len; i++) begin
      ev = noise();
      if (rem_ld > 0 && ($urandom % 2 == 0 || len - i <= rem_ld + rem_bt)) begin
        ev[EV_LD_STALL] = 1'b1; rem_ld--;
      end
      if (rem_bt > 0 && ($urandom % 2 == 0 || len - i <= rem_bt)) begin
        ev[EV_BRANCH_TAKEN] = 1'b1; rem_bt--;
      end
      if (i == len - 1) hpm_stop = 1'b1;   // end of parsing, last busy cycle
      @(negedge clk);
    end
    stop_cyc = cyc;
    hpm_stop = 1'b0;
    check(rem_ld == 0 && rem_bt == 0, "test placed all events");
    // Events after the stop must not count either.
    ev = event_vec_t'('1);
    // Expected counter contents.
    c3 = swapped ? bt : ld;
    c4 = swapped ? ld : bt;
    if (inhibit3) c3 = 0;
    exp = ref_class(c3, c4);
    while (!valid) @(negedge clk);
    ev = '0;
    check(cyc - stop_cyc == 5, $sformatf("latency %0d edges, expected 5", cyc - stop_cyc));
    check(cls == exp, $sformatf("class %s expected %s (ld=%0d bt=%0d)", cls.name(), exp.name(), c3, c4));
    check(alert == (exp != CLS_LEGITIMATE), "alert matches class");
    check(tr_ld == 64'(c3) && tr_bt == 64'(c4), "traced values");
    csr_read(12'hB03, lo); csr_read(12'hB83, hi);
    check({hi, lo} == 64'(c3), "mhpmcounter3 via CSR");
    csr_read(12'hB04, lo); csr_read(12'hB84, hi);
    check({hi, lo} == 64'(c4), "mhpmcounter4 via CSR");
    n_cls[int'(exp)]++;
    if (alert) n_alert_set++;
    @(negedge clk);
  endtask

  task automatic legit_pkt(bit inh, bit sw);
    packet(8 + $urandom % 6, 37 + $urandom % 6, inh, sw);
  endtask

  initial begin
    logic [31:0] m0, m1;
    int unsigned kind;
    ev = '0; csr_we = 1'b0; csr_addr = '0; csr_wdata = '0;
    hpm_reset = 1'b0; hpm_enable = 1'b0; hpm_stop = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Threshold corners first.
    packet(13, 70, 0, 0);
    packet(14, 65, 0, 0);
    packet(14, 66, 0, 0);
    packet(0, 0, 0, 0);
    for (int p = 0; p < NPKT; p++) begin
      kind = $urandom % 3;
      case (kind)
        0: legit_pkt(0, 0);
        1: packet(16 + $urandom % 11, 58 + $urandom % 8, 0, 0);
        default: packet(16 + $urandom % 11, 66 + $urandom % 11, 0, 0);
      endcase
      // mcycle keeps running.
      if (p % 500 == 0) begin
        csr_read(12'hB00, m0);
        @(negedge clk);
        csr_read(12'hB00, m1);
        check(m1 - m0 == 1, "mcycle advances one per cycle");
        n_mcycle++;
      end
    end
    // Counter 3 stopped through mcountinhibit: LD_STALL reads zero.
    csr_write(12'h320, 32'h0000_0008);
    packet(20, 70, 1, 0);
    n_inhibit++;
    csr_write(12'h320, 32'h0);
    // Selectors exchanged: counter 3 now counts taken branches.
    csr_write(12'h323, 32'(1 << EV_BRANCH_TAKEN));
    csr_write(12'h324, 32'(1 << EV_LD_STALL));
    packet(10, 40, 0, 1);
    packet(20, 60, 0, 1);
    n_swap++;
    csr_write(12'h323, 32'(1 << EV_LD_STALL));
    csr_write(12'h324, 32'(1 << EV_BRANCH_TAKEN));
    // A packet abandoned by hpm_reset while monitoring gives no result.
    pulse(hpm_enable);
    ev = '1;
    repeat (4) @(negedge clk);
    ev = '0;
    pulse(hpm_reset);
    repeat (8) begin
      check(!valid && !busy, "abandoned packet gives no result");
      @(negedge clk);
    end
    n_abandon++;
    packet(20, 70, 0, 0);
    // Every mechanism must have happened.
    check(n_cls[0] > 0, "legitimate packets seen");
    check(n_cls[1] > 0, "heap overflows seen");
    check(n_cls[2] > 0, "stack overflows seen");
    check(n_alert_set > 0 && n_alert_clr > 0, "alert raised and cleared");
    check(n_inhibit > 0 && n_swap > 0 && n_mcycle > 0 && n_abandon > 0 && n_outside > 0,
          "inhibit, selector swap, mcycle, abandon and idle events exercised");
    $display("legit=%0d heap=%0d stack=%0d alerts=%0d", n_cls[0], n_cls[1], n_cls[2], n_alert_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
