// Testbench for hot_path_table, at 16 entries x 4 ways so that sets fill
// and entries get replaced. A skewed random stream of paths from a pool
// is applied; a reference table with the same index rule and least
// frequently used replacement (empty ways first, lowest way on a tie)
// predicts hit or miss, the latency (1 cycle for a hit, 1 + log2(4) = 3
// for a miss) and, at the end, every entry read back through the read port.
// A clear must empty the table.
module tb_hot_path_table;
  import pp_pkg::*;
  localparam int ENTRIES = 16, WAYS = 4, SETS = ENTRIES / WAYS, IW = 2;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready;
  path_desc_t in_desc;
  logic [EVT_W-1:0] in_count;
  logic [IW-1:0] rd_set;
  logic [1:0] rd_way;
  logic rd_valid;
  path_desc_t rd_desc;
  logic [31:0] rd_acc;
  logic ev_hit, ev_miss, ev_evict;
  int checks = 0, failures = 0;

  hot_path_table #(.ENTRIES(ENTRIES), .WAYS(WAYS), .CNT_W(32)) dut (.clk, .rst_n, .clear,
    .in_valid, .in_desc, .in_count, .in_ready, .rd_set, .rd_way, .rd_valid, .rd_desc,
    .rd_acc, .ev_hit, .ev_miss, .ev_evict);
  always #5 clk = ~clk;

  // reference
  bit         m_valid [SETS][WAYS];
  path_desc_t m_desc  [SETS][WAYS];
  longint     m_acc   [SETS][WAYS];
  int n_hit = 0, n_miss = 0, n_evict = 0;

  function automatic int ref_set(path_desc_t x);
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

  path_desc_t pool [40];

  task automatic apply(path_desc_t d, int cnt);
    int s, hw, lat;
    logic acc;
    s = ref_set(d);
    hw = -1;
    for (int w = 0; w < WAYS; w++) if (m_valid[s][w] && m_desc[s][w] == d) hw = w;
    in_desc = d; in_count = 8'(cnt); in_valid = 1; lat = 0;
    forever begin
      #1 acc = in_ready;
      @(posedge clk); #1;
      lat++;
      if (acc) break;
      if (lat > 10) break;
    end
    in_valid = 0;
    if (hw >= 0) begin
      m_acc[s][hw] += cnt;
      n_hit++;
      check(lat == 1, $sformatf("hit latency %0d", lat));
    end else begin
      int v;
      longint best;
      v = 0; best = -1;
      for (int w = 0; w < WAYS; w++) begin
        longint key;
        key = m_valid[s][w] ? m_acc[s][w] + 1 : 0;
        if (best < 0 || key < best) begin best = key; v = w; end
      end
      if (m_valid[s][v]) n_evict++;
      m_valid[s][v] = 1; m_desc[s][v] = d; m_acc[s][v] = cnt;
      n_miss++;
      check(lat == 3, $sformatf("miss latency %0d", lat));
    end
  endtask

  task automatic compare_all(string tag);
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        rd_set = IW'(s); rd_way = 2'(w); #1;
        check(rd_valid == m_valid[s][w], $sformatf("%s valid %0d/%0d", tag, s, w));
        if (m_valid[s][w])
          check(rd_desc == m_desc[s][w] && rd_acc == 32'(m_acc[s][w]),
                $sformatf("%s entry %0d/%0d acc %0d expected %0d", tag, s, w, rd_acc, m_acc[s][w]));
      end
  endtask

  int dut_hit = 0, dut_miss = 0, dut_evict = 0;
  always @(posedge clk) begin
    if (ev_hit) dut_hit++;
    if (ev_miss) dut_miss++;
    if (ev_evict) dut_evict++;
  end

  initial begin
    in_desc = '0; in_count = '0; rd_set = '0; rd_way = '0;
    for (int i = 0; i < 40; i++) begin
      pool[i].start = 32'h4000 + 32'(i * 52);
      pool[i].len   = LEN_W'($urandom_range(12, 1));
      pool[i].dir   = 32'($urandom) & ((32'd1 << pool[i].len) - 1);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare_all("empty");
    for (int n = 0; n < 3000; n++) begin
      int k;
      // skewed: a few hot paths, a long cold tail
      k = ($urandom_range(3, 0) != 0) ? $urandom_range(5, 0) : $urandom_range(39, 0);
      apply(pool[k], $urandom_range(255, 1));
      if ($urandom_range(7, 0) == 0) begin @(posedge clk); #1; end
    end
    compare_all("run");
    check(n_hit > 100 && n_miss > 100 && n_evict > 50,
          $sformatf("mix hit %0d miss %0d evict %0d", n_hit, n_miss, n_evict));
    check(dut_hit == n_hit && dut_miss == n_miss && dut_evict == n_evict,
          $sformatf("event pulses %0d/%0d/%0d", dut_hit, dut_miss, dut_evict));
    clear = 1; @(posedge clk); #1 clear = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) m_valid[s][w] = 0;
    compare_all("clear");
    apply(pool[0], 7);
    apply(pool[0], 9);
    compare_all("after clear");
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
