// Workload testbench for the path-based phase detector at its operating
// point: default sizes (32 accumulators of 24 bits, 8-bit signatures),
// 10,000,000-instruction intervals and a 6,000,000-instruction Manhattan
// distance threshold.
//
// A synthetic program runs through 14 intervals (about 140 million
// instructions) in five phases. Each phase executes its own set of eight
// paths, and each path carries 1 to 255 instructions:
//   A x3, B x3, A' x2, A x1, C x3, B x2
// Sets A, B and C are chosen so that their paths hash to disjoint groups of
// accumulators. A' is phase A with a fifth of its paths drawn from B: a
// small shift in behaviour that must stay below the threshold.
//
// Checks:
//  * every signature distance and phase decision against a reference model
//    of the accumulators, the signatures and the distance;
//  * timing: interval_end one cycle after the closing path, and the result
//    one cycle after that;
//  * at the workload level, phase changes are reported exactly at the
//    A->B, B->A', A->C and C->B boundaries, and nowhere else: in particular
//    not at A'->A, where a fifth of the instructions move between path sets.
// A watchdog ends the run.
module tb_phase_workload;
  import pp_pkg::*;
  localparam int N = 32, AW = 24, SW = 8, DROP = AW - SW, IW = 5;
  localparam int INTERVAL = 10_000_000, THRESH = 6_000_000;
  localparam int N_INT = 14;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  path_desc_t in_desc;
  logic [EVT_W-1:0] in_count;
  logic [31:0] interval_len, threshold;
  logic interval_end, result_valid, phase_change;
  logic [31:0] distance;
  int checks = 0, failures = 0;

  phase_detector dut (.clk, .rst_n, .in_valid, .in_desc, .in_count, .in_ready,
    .interval_len, .threshold, .interval_end, .result_valid, .phase_change, .distance);
  always #5 clk = ~clk;

  // Index of a descriptor, written from the definition of the fold: address
  // bits from bit 2 upward, then the direction bits, then the length bits,
  // each XORed into index bit (position mod IW).
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

  // phase of each interval: 0 = A, 1 = B, 2 = C, 3 = A'
  int schedule [N_INT] = '{0, 0, 0, 1, 1, 1, 3, 3, 0, 2, 2, 2, 1, 1};

  // reference model
  int m_acc [N];
  int m_prev [N];
  bit m_have_prev = 0;
  int m_total = 0;
  int m_interval = 0;
  int exp_dist [$];
  bit exp_change [$];
  int exp_end_cycle [$];
  int cycle = 0;
  bit got_change [N_INT];
  int n_results = 0;

  task automatic model(path_desc_t d, int cnt);
    m_acc[ref_idx(d)] += cnt;
    m_total += cnt;
    if (m_total >= INTERVAL) begin
      int dd = 0;
      for (int i = 0; i < N; i++) begin
        int s = m_acc[i] >> DROP;
        dd += (s > m_prev[i]) ? s - m_prev[i] : m_prev[i] - s;
        m_prev[i] = s;
        m_acc[i] = 0;
      end
      dd = dd << DROP;
      exp_dist.push_back(dd);
      exp_change.push_back(m_have_prev && dd >= THRESH);
      exp_end_cycle.push_back(cycle + 1);
      m_have_prev = 1;
      m_total = 0;
      m_interval++;
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (interval_end) begin
      checks++;
      if (exp_end_cycle.size() == 0 || exp_end_cycle[0] != cycle) begin
        failures++; $display("FAIL interval_end at %0d", cycle);
      end
    end
    if (result_valid) begin
      int ec, d;
      bit ch;
      checks++;
      if (exp_end_cycle.size() == 0 || exp_dist.size() == 0) begin
        failures++; $display("FAIL unexpected result at %0d", cycle);
      end else begin
        ec = exp_end_cycle.pop_front();
        d = exp_dist.pop_front();
        ch = exp_change.pop_front();
        if (ec + 1 != cycle) begin
          failures++; $display("FAIL result timing %0d vs %0d", cycle, ec + 1);
        end
        checks++;
        if (distance != 32'(d) || phase_change != ch) begin
          failures++;
          $display("FAIL interval %0d distance %0d/%b expected %0d/%b",
                   n_results, distance, phase_change, d, ch);
        end
        $display("interval %0d phase %0d distance %0d change %b", n_results,
                 schedule[n_results], distance, phase_change);
        if (n_results < N_INT) got_change[n_results] = phase_change;
        n_results++;
      end
    end
  end

  path_desc_t sets [3][8];

  // Build the three path sets from candidate descriptors: set s takes paths
  // whose index lies in accumulators 8*s .. 8*s+7, so the sets never share
  // an accumulator.
  task automatic build_sets();
    int fill [3] = '{0, 0, 0};
    for (int k = 0; k < 4096 && (fill[0] < 8 || fill[1] < 8 || fill[2] < 8); k++) begin
      path_desc_t d;
      int g;
      d = '0;
      d.start = 32'h0040_0000 + 32'(k * 20);
      d.len = LEN_W'(1 + (k % 12));
      d.dir = 32'(k * 37) & ((32'd1 << d.len) - 1);
      g = ref_idx(d) / 8;
      if (g < 3 && fill[g] < 8) begin
        sets[g][fill[g]] = d;
        fill[g]++;
      end
    end
    check(fill[0] == 8 && fill[1] == 8 && fill[2] == 8, "path sets built");
  endtask

  initial begin
    bit expect_change [N_INT];
    for (int i = 0; i < N; i++) begin m_acc[i] = 0; m_prev[i] = 0; end
    interval_len = INTERVAL;
    threshold = THRESH;
    in_desc = '0; in_count = '0;
    build_sets();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (m_interval < N_INT) begin
      path_desc_t d;
      int cnt, ph;
      ph = schedule[m_interval];
      if (ph == 3) d = ($urandom_range(4, 0) == 0) ? sets[1][$urandom_range(7, 0)]
                                                 : sets[0][$urandom_range(7, 0)];
      else d = sets[ph][$urandom_range(7, 0)];
      cnt = $urandom_range(255, 1);
      in_desc = d; in_count = 8'(cnt);
      in_valid = ($urandom_range(9, 0) != 0);
      #1;
      if (!in_ready) begin failures++; $display("FAIL not ready"); end
      if (in_valid) model(d, cnt);
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (4) @(posedge clk);
    check(n_results == N_INT, $sformatf("%0d intervals reported", n_results));
    // workload-level expectation: a change exactly where the path set changes
    for (int i = 0; i < N_INT; i++) begin
      int a, b;
      a = (i == 0) ? -1 : schedule[i-1];
      b = schedule[i];
      // A' (3) counts as the same phase as A (0)
      if (a == 3) a = 0;
      if (b == 3) b = 0;
      expect_change[i] = (i > 0) && (a != b);
      check(got_change[i] == expect_change[i],
            $sformatf("interval %0d phase change %b, expected %b", i, got_change[i],
                      expect_change[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
