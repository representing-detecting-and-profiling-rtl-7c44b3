// Testbench for phase_detector at 8 accumulators of 12 bits with 4-bit
// signatures. A path stream alternates between two program phases that use
// different path sets; a reference model predicts each interval's
// signature distance and phase decision, and the timing of interval_end
// (one cycle after the closing path) and of the result (one more cycle).
// The stream must produce both phase changes and stable intervals.
module tb_phase_detector;
  import pp_pkg::*;
  localparam int N = 8, AW = 12, SW = 4, DROP = AW - SW, IW = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  path_desc_t in_desc;
  logic [EVT_W-1:0] in_count;
  logic [31:0] interval_len, threshold;
  logic interval_end, result_valid, phase_change;
  logic [31:0] distance;
  int checks = 0, failures = 0;

  phase_detector #(.N_ACC(N), .ACC_W(AW), .SIG_W(SW)) dut (.clk, .rst_n, .in_valid,
    .in_desc, .in_count, .in_ready, .interval_len, .threshold, .interval_end,
    .result_valid, .phase_change, .distance);
  always #5 clk = ~clk;

  function automatic int ref_idx(path_desc_t x);
    logic [IW-1:0] r = '0;
    for (int k = 2; k < ADDR_W; k++) r[(k-2) % IW] ^= x.start[k];
    for (int k = 0; k < MAX_LEN; k++) r[k % IW] ^= x.dir[k];
    for (int k = 0; k < LEN_W; k++)   r[k % IW] ^= x.len[k];
    return int'(r);
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int m_acc [N];
  int m_sig [N];
  int m_prev [N];
  bit m_have_prev = 0;
  int m_total = 0;
  int exp_dist [$];
  bit exp_change [$];
  int exp_end_cycle [$];
  int cycle = 0;
  int n_change = 0, n_same = 0, n_results = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (interval_end) begin
      checks++;
      if (exp_end_cycle.size() == 0 || exp_end_cycle[0] != cycle) begin
        failures++; $display("FAIL interval_end at %0d", cycle);
      end
    end
    if (result_valid) begin
      int ec;
      ec = exp_end_cycle.pop_front();
      checks++;
      if (ec + 1 != cycle || exp_dist.size() == 0) begin
        failures++; $display("FAIL result timing %0d vs %0d", cycle, ec + 1);
      end else begin
        int d;
        bit ch;
        d = exp_dist.pop_front();
        ch = exp_change.pop_front();
        checks++;
        if (distance != 32'(d) || phase_change != ch) begin
          failures++;
          $display("FAIL distance %0d/%b expected %0d/%b", distance, phase_change, d, ch);
        end
        n_results++;
        if (ch) n_change++; else if (n_results > 1) n_same++;
      end
    end
  end

  // reference update for one accepted path in the current cycle
  task automatic model(path_desc_t d, int cnt);
    int i;
    i = ref_idx(d);
    m_acc[i] = (m_acc[i] + cnt > (1 << AW) - 1) ? (1 << AW) - 1 : m_acc[i] + cnt;
    m_total += cnt;
    if (m_total >= interval_len) begin
      int mdist;
      mdist = 0;
      for (int k = 0; k < N; k++) begin
        m_sig[k] = m_acc[k] >> DROP;
        mdist += (m_sig[k] > m_prev[k]) ? m_sig[k] - m_prev[k] : m_prev[k] - m_sig[k];
        m_acc[k] = 0;
      end
      mdist = mdist << DROP;
      exp_dist.push_back(mdist);
      exp_change.push_back(m_have_prev && mdist >= threshold);
      exp_end_cycle.push_back(cycle + 1);
      m_have_prev = 1;
      for (int k = 0; k < N; k++) m_prev[k] = m_sig[k];
      m_total = 0;
    end
  endtask

  path_desc_t pa [4], pb [4];

  initial begin
    interval_len = 2000;
    threshold = 1200;
    in_desc = '0; in_count = '0;
    for (int i = 0; i < 4; i++) begin
      pa[i] = '0; pa[i].start = 32'h1000 + 32'(4 * i); pa[i].len = 3; pa[i].dir = 32'(i);
      pb[i] = '0; pb[i].start = 32'h1000 + 32'(4 * i); pb[i].len = 5; pb[i].dir = 32'(i + 9);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 12000; n++) begin
      bit phase_b;
      path_desc_t d;
      int cnt;
      phase_b = ((n / 1500) % 2) == 1;
      d = phase_b ? pb[$urandom_range(3, 0)] : pa[$urandom_range(3, 0)];
      cnt = $urandom_range(40, 1);
      in_desc = d; in_count = 8'(cnt);
      in_valid = ($urandom_range(4, 0) != 0);
      #1;
      check(in_ready, "always ready");
      if (in_valid) model(d, cnt);
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (4) @(posedge clk);
    check(n_results >= 10 && n_change >= 2 && n_same >= 2,
          $sformatf("results %0d changes %0d stable %0d", n_results, n_change, n_same));
    check(exp_dist.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
