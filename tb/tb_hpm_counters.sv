// tb_hpm_counters: self-checking testbench of the performance counters.
//
// Drives random event strobes, a random tracer window and tracer clears,
// and random CSR writes (counters low and high halves, event selectors,
// mcountinhibit), while a reference model kept in the testbench tracks
// every counter. Each cycle the tracer read port is checked for a random
// counter number and a random CSR is read back and compared.
module tb_hpm_counters;
  import hids_pkg::*;

  localparam int unsigned N = 2;   // the module's default counter count

  logic clk = 1'b0, rst_n = 1'b0;
  event_vec_t ev;
  logic csr_we;
  logic [11:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata;
  logic csr_hit;
  logic trc_clear, trc_en;
  logic [4:0] trc_idx;
  logic [63:0] trc_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hpm_counters dut (
    .clk_i(clk), .rst_ni(rst_n), .events_i(ev),
    .csr_we_i(csr_we), .csr_addr_i(csr_addr), .csr_wdata_i(csr_wdata),
    .csr_rdata_o(csr_rdata), .csr_hit_o(csr_hit),
    .trc_clear_i(trc_clear), .trc_count_en_i(trc_en),
    .trc_rd_idx_i(trc_idx), .trc_rd_data_o(trc_data)
  );

  // Reference model, indexed by counter number.
  logic [63:0] m_cnt [32];
  logic [10:0] m_sel [32];
  logic [31:0] m_inh;

  function automatic bit implemented(int n);
    return n == 0 || n == 2 || (n >= 3 && n < 3 + N);
  endfunction

  function automatic logic [31:0] ref_csr(logic [11:0] a);
    int n;
    n = int'(a[4:0]);
    if (a == 12'h320) return m_inh;
    if (a[11:5] == 7'h19) return (n >= 3 && n < 3 + N) ? 32'(m_sel[n]) : 32'd0;
    if (a[11:5] == 7'h58) return implemented(n) ? m_cnt[n][31:0] : 32'd0;
    if (a[11:5] == 7'h5C) return implemented(n) ? m_cnt[n][63:32] : 32'd0;
    return 32'd0;
  endfunction

  // Model update at each rising edge, from the inputs applied before it.
  task automatic model_step();
    logic [63:0] nxt [32];
    int n;
    for (int k = 0; k < 32; k++) nxt[k] = m_cnt[k];
    if (!m_inh[0]) nxt[0] = m_cnt[0] + 1;
    if (!m_inh[2] && ev[EV_INSTR]) nxt[2] = m_cnt[2] + 1;
    for (int k = 3; k < 3 + N; k++)
      if (!m_inh[k] && trc_en && |(ev & m_sel[k])) nxt[k] = m_cnt[k] + 1;
    n = int'(csr_addr[4:0]);
    if (csr_we && implemented(n)) begin
      if (csr_addr[11:5] == 7'h58) nxt[n][31:0]  = csr_wdata;
      if (csr_addr[11:5] == 7'h5C) nxt[n][63:32] = csr_wdata;
    end
    if (trc_clear) for (int k = 3; k < 3 + N; k++) nxt[k] = '0;
    if (csr_we && csr_addr == 12'h320)
      for (int k = 0; k < 32; k++) if (implemented(k)) m_inh[k] = csr_wdata[k];
    if (csr_we && csr_addr[11:5] == 7'h19 && n >= 3 && n < 3 + N) m_sel[n] = csr_wdata[10:0];
    for (int k = 0; k < 32; k++) m_cnt[k] = nxt[k];
  endtask

  function automatic logic [11:0] rand_addr();
    case ($urandom % 5)
      0: return 12'h320;
      1: return 12'h320 + 12'($urandom % 8);
      2: return 12'hB00 + 12'($urandom % 8);
      3: return 12'hB80 + 12'($urandom % 8);
      default: return 12'($urandom);
    endcase
  endfunction

  int n_clear = 0, n_gate = 0, n_inh = 0, n_sel = 0, n_hiwr = 0;

  initial begin
    for (int k = 0; k < 32; k++) begin m_cnt[k] = '0; m_sel[k] = '0; end
    m_sel[3] = 11'(1 << EV_LD_STALL);
    m_sel[4] = 11'(1 << EV_BRANCH_TAKEN);
    m_inh = '0;
    ev = '0; csr_we = 1'b0; csr_addr = '0; csr_wdata = '0;
    trc_clear = 1'b0; trc_en = 1'b0; trc_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      // Apply inputs away from the rising edge.
      ev        = event_vec_t'($urandom);
      if (i % 500 == 0) trc_en = ~trc_en;
      trc_clear = ($urandom % 64) == 0;
      csr_we    = ($urandom % 16) == 0;
      csr_addr  = rand_addr();
      csr_wdata = (($urandom % 4) == 0) ? $urandom : ($urandom % 4 == 0 ? 32'hFFFF_FFFE : $urandom % 16);
      // Keep the inhibit mask mostly clear so counting is exercised.
      if (csr_addr == 12'h320 && csr_we) begin
        csr_wdata = ($urandom % 2) ? '0 : $urandom;
        n_inh++;
      end
      if (csr_we && csr_addr[11:5] == 7'h19 && csr_addr != 12'h320) n_sel++;
      if (csr_we && csr_addr[11:5] == 7'h5C) n_hiwr++;
      if (trc_clear) n_clear++;
      trc_idx = 5'($urandom % 8);
      #1;
      checks++;
      if (trc_data !== (implemented(int'(trc_idx)) ? m_cnt[trc_idx] : 64'd0)) begin
        failures++;
        $display("FAIL: tracer read of counter %0d = %0d, expected %0d", trc_idx, trc_data, m_cnt[trc_idx]);
      end
      checks++;
      if (csr_rdata !== ref_csr(csr_addr)) begin
        failures++;
        $display("FAIL: CSR %h read %h, expected %h", csr_addr, csr_rdata, ref_csr(csr_addr));
      end
      @(posedge clk);
      model_step();
      if (!trc_en && |(ev & m_sel[3])) n_gate++;
      @(negedge clk);
    end
    // Every mechanism must have been exercised.
    checks++;
    if (n_clear == 0 || n_gate == 0 || n_inh == 0 || n_sel == 0 || n_hiwr == 0) begin
      failures++;
      $display("FAIL: coverage clear=%0d gate=%0d inh=%0d sel=%0d hiwr=%0d", n_clear, n_gate, n_inh, n_sel, n_hiwr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
