// tb_hpm_tracer: self-checking testbench of the tracing controller.
//
// The counter read port and the detector are modelled here: the counters
// return a fixed random value per counter number, and the detector answers
// a start with done two edges later and a class chosen by the test. For a
// series of packets the test checks: hpm_reset clears the counters, the
// counting window covers exactly the cycles from the enable edge to the
// stop edge, the two counters are read one at a time with the right
// numbers, the detector gets the values read, the result arrives five
// edges after the stop edge, and alert_o follows the class and stays set
// until the next hpm_reset. Enables during a busy phase and stops while
// idle must be ignored.
module tb_hpm_tracer;
  import hids_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hpm_reset, hpm_enable, hpm_stop;
  logic cnt_clear, cnt_en;
  logic [4:0] rd_idx;
  logic [63:0] rd_data, det_ld, det_bt;
  logic det_start, det_done, det_attack;
  pkt_class_e det_class, cls;
  logic busy, valid, alert;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hpm_tracer dut (
    .clk_i(clk), .rst_ni(rst_n),
    .hpm_reset_i(hpm_reset), .hpm_enable_i(hpm_enable), .hpm_stop_i(hpm_stop),
    .cnt_clear_o(cnt_clear), .cnt_count_en_o(cnt_en), .cnt_rd_idx_o(rd_idx),
    .cnt_rd_data_i(rd_data),
    .det_start_o(det_start), .det_ld_stall_o(det_ld), .det_branch_taken_o(det_bt),
    .det_done_i(det_done), .det_class_i(det_class), .det_attack_i(det_attack),
    .busy_o(busy), .result_valid_o(valid), .class_o(cls), .alert_o(alert)
  );

  // Counter model: one value per counter number.
  logic [63:0] cval [32];
  assign rd_data = cval[rd_idx];

  // Detector model: done two edges after start.
  pkt_class_e next_class;
  logic [1:0] dpipe;
  logic [63:0] seen_ld, seen_bt;
  int n_start;
  always_ff @(posedge clk) begin
    dpipe <= {dpipe[0], det_start};
    if (det_start) begin
      seen_ld <= det_ld;
      seen_bt <= det_bt;
      n_start <= n_start + 1;
    end
  end
  assign det_done   = dpipe[1];
  assign det_class  = next_class;
  assign det_attack = (next_class != CLS_LEGITIMATE);

  // Monitors counted at each rising edge.
  int cyc = 0, en_cycles = 0, clears = 0, valids = 0;
  int reads3 = 0, reads4 = 0;
  always @(posedge clk) begin
    cyc++;
    if (cnt_en) en_cycles++;
    if (cnt_clear) clears++;
    if (valid) valids++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic pulse(ref logic sig);
    sig = 1'b1;
    @(negedge clk);
    sig = 1'b0;
  endtask

  int n_legit = 0, n_attack = 0, n_ign_en = 0, n_ign_stop = 0;

  task automatic packet(int len, pkt_class_e c);
    int c0, e0, v0, stop_cyc, s0;
    for (int k = 0; k < 32; k++) cval[k] = {$urandom, $urandom};
    next_class = c;
    // Reset: clears counters and the alert.
    c0 = clears;
    pulse(hpm_reset);
    check(clears == c0 + 1, "hpm_reset gives one clear");
    check(!alert, "alert cleared by hpm_reset");
    // A stop while idle is ignored.
    if (($urandom % 4) == 0) begin
      pulse(hpm_stop);
      check(!busy && !cnt_en, "stop ignored while idle");
      n_ign_stop++;
    end
    e0 = en_cycles;
    pulse(hpm_enable);
    repeat (len) @(negedge clk);
    check(cnt_en, "window open while parsing");
    hpm_stop = 1'b1;
    @(negedge clk);
    stop_cyc = cyc;   // number of the edge that sampled the stop
    hpm_stop = 1'b0;
    check(en_cycles - e0 == len + 1, "window length equals enable-to-stop edges");
    check(busy && !cnt_en, "busy and window closed after stop");
    check(rd_idx == 5'd3, "first read is counter 3");
    if (rd_idx == 5'd3) reads3++;
    @(negedge clk);
    check(rd_idx == 5'd4, "second read is counter 4");
    if (rd_idx == 5'd4) reads4++;
    // An enable while busy is ignored.
    pulse(hpm_enable);
    n_ign_en++;
    s0 = n_start;
    v0 = valids;
    while (!valid) @(negedge clk);
    // cyc is the number of the edge that raised valid_o.
    check(cyc - stop_cyc == 5, $sformatf("result five edges after stop, got %0d", cyc - stop_cyc));
    check(seen_ld == cval[3] && seen_bt == cval[4], "detector got the values read");
    check(det_ld == cval[3] && det_bt == cval[4], "values held for the trace port");
    check(cls == c, "class forwarded");
    check(alert == (c != CLS_LEGITIMATE), "alert follows class");
    @(negedge clk);
    check(!valid && !busy && !cnt_en, "back to idle");
    check(valids == v0 + 1, "one result per packet");
    check(alert == (c != CLS_LEGITIMATE), "alert held");
    if (c == CLS_LEGITIMATE) n_legit++; else n_attack++;
  endtask

  initial begin
    hpm_reset = 1'b0; hpm_enable = 1'b0; hpm_stop = 1'b0;
    next_class = CLS_LEGITIMATE; dpipe = '0; n_start = 0;
    for (int k = 0; k < 32; k++) cval[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 300; i++)
      packet(1 + $urandom % 40, pkt_class_e'($urandom % 3));
    // hpm_reset during monitoring abandons the packet.
    pulse(hpm_enable);
    repeat (3) @(negedge clk);
    pulse(hpm_reset);
    check(!cnt_en && !busy, "reset during monitoring returns to idle");
    check(n_legit > 0 && n_attack > 0 && n_ign_en > 0 && n_ign_stop > 0 &&
          reads3 > 0 && reads4 > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
