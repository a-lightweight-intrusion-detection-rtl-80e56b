// tb_dt_detector: self-checking testbench of the decision-tree detector.
//
// Sweeps LD_STALL 0..40 against BRANCH_TAKEN 0..100, which covers both
// thresholds from each side, then random 64-bit values. Each decision is
// compared with a reference written from the tree (LD_STALL <= 13 is
// legitimate; otherwise BRANCH_TAKEN <= 65 is heap overflow; otherwise
// stack overflow) and done_o must rise exactly two edges after the start
// edge. Starts are issued back to back as well as spaced out.
module tb_dt_detector;
  import hids_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [63:0] ld, bt;
  logic done, attack;
  pkt_class_e cls;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dt_detector dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start),
    .ld_stall_i(ld), .branch_taken_i(bt),
    .done_o(done), .class_o(cls), .attack_o(attack)
  );

  function automatic pkt_class_e ref_class(logic [63:0] l, logic [63:0] b);
    if (l <= 64'd13) return CLS_LEGITIMATE;
    if (b <= 64'd65) return CLS_HEAP_OVERFLOW;
    return CLS_STACK_OVERFLOW;
  endfunction

  // Queue of expected results, checked as done_o pulses.
  pkt_class_e exp_q[$];
  int         due_q[$];
  int         cyc = 0;

  // Edge counter and checker in one block: a start sampled at edge n must
  // give done_o in the cycle after edge n+2.
  always @(posedge clk) begin
    cyc++;
    if (done && rst_n) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: done without start at cycle %0d", cyc);
      end else begin
        pkt_class_e e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (cls !== e || attack !== (e != CLS_LEGITIMATE) || cyc != d) begin
          failures++;
          $display("FAIL: cycle %0d (due %0d) class %s expected %s", cyc, d, cls.name(), e.name());
        end
      end
    end
    if (start && rst_n) begin
      exp_q.push_back(ref_class(ld, bt));
      due_q.push_back(cyc + 2);
    end
  end

  task automatic issue(logic [63:0] l, logic [63:0] b, int gap);
    // Inputs change at the falling edge, away from the sampling edge.
    start = 1'b1; ld = l; bt = b;
    @(negedge clk);
    start = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    start = 1'b0; ld = '0; bt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int l = 0; l <= 40; l++)
      for (int b = 0; b <= 100; b++)
        issue(64'(l), 64'(b), (b % 3 == 0) ? 2 : 0);
    for (int i = 0; i < 2000; i++)
      issue({$urandom, $urandom} >> ($urandom % 64), {$urandom, $urandom} >> ($urandom % 64), $urandom % 3);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d decisions never arrived", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
