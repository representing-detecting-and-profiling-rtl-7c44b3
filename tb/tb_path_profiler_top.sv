// End-to-end testbench for path_profiler_top at its default parameters
// (512-entry 4-way hot path table, 16-entry path stack, 4-entry branch
// queue, 32 x 24-bit phase accumulators).
//
// The testbench plays the commit stage of a processor running a small
// synthetic program and checks what the profiler reports:
//  1. Ball-Larus paths of a loop procedure (blocks B1..B6 and an exit
//     block) called N times with iterations A A A C C X: the hot path table
//     must hold {B1,3,101} N times, {B2,3,101} 2N, {B2,3,111} 2N and
//     {B2,4,1001} N. Per-branch profiler latencies are measured: forward 1,
//     call 2, backward 3 on a table hit and 5 on a miss.
//  2. The same with the table accumulating architectural events (one event
//     per instruction, two instructions per branch): 6N, 12N, 12N, 10N.
//  3. A procedure with 12 random forward branches per iteration, which
//     floods the table and forces least-frequently-used replacement.
//  4. Recursion 20 deep: path stack overflow, later underflow with
//     incomplete paths that are dropped. The OS repair pop is exercised.
//  5. 40 forward branches in one path: split at 32 branches.
//  6. Loop extension switched on in the PPCR: {B1,6,101101} appears.
//  7. Whole Program Path mapping with the software port switched on and a
//     slow software consumer: it must receive exactly the emitted paths.
//  8. Alternating program phases with long basic blocks, for the phase
//     detector (1M-instruction intervals, 600K-instruction threshold):
//     both phase changes and stable intervals must be reported.
// Every mechanism (commit stall, full branch queue, hit, miss, eviction,
// overflow, underflow, dropped incomplete path, split, extension, repair,
// PPCR mode switch, interval end, phase change, software delivery) is
// counted and must occur at least once.
module tb_path_profiler_top;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] commit_valid;
  logic [3:0][EVT_W-1:0] commit_evt;
  logic commit_br_valid, commit_stall;
  branch_rec_t commit_br;
  logic ppcr_we;
  ppcr_t ppcr_wdata, ppcr_cfg;
  logic repair_pop, repair_ack;
  logic hpt_en, pd_en, sw_en, sw_valid, sw_ready;
  path_out_t sw_path;
  logic hpt_clear;
  logic [6:0] hpt_rd_set;
  logic [1:0] hpt_rd_way;
  logic hpt_rd_valid;
  path_desc_t hpt_rd_desc;
  logic [31:0] hpt_rd_acc;
  logic [31:0] pd_interval_len, pd_threshold, pd_distance;
  logic pd_interval_end, pd_result_valid, pd_phase_change;
  logic [3:0] dc_access;
  logic [7:0] dc_access_cost;
  logic [3:0][7:0] dc_inc;
  logic [2:0] bq_occupancy;
  logic [4:0] stack_depth;
  logic ev_path, ev_overflow, ev_split, ev_extend, ev_underflow, ev_drop_incomplete;
  logic ev_hpt_hit, ev_hpt_miss, ev_hpt_evict;

  path_profiler_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_bq_full = 0, n_hit = 0, n_miss = 0, n_evict = 0, n_over = 0,
      n_under = 0, n_drop = 0, n_split = 0, n_ext = 0, n_repair = 0, n_mode = 0,
      n_interval = 0, n_change = 0, n_same = 0, n_sw = 0, n_path = 0, n_dc = 0;
  always @(posedge clk) if (rst_n) begin
    if (commit_stall) n_stall++;
    if (bq_occupancy == 3'd4) n_bq_full++;
    if (ev_hpt_hit) n_hit++;
    if (ev_hpt_miss) n_miss++;
    if (ev_hpt_evict) n_evict++;
    if (ev_overflow) n_over++;
    if (ev_underflow) n_under++;
    if (ev_drop_incomplete) n_drop++;
    if (ev_split) n_split++;
    if (ev_extend) n_ext++;
    if (repair_ack) n_repair++;
    if (ppcr_we) n_mode++;
    if (pd_interval_end) n_interval++;
    if (pd_result_valid && pd_phase_change) n_change++;
    if (pd_result_valid && !pd_phase_change && n_interval > 1) n_same++;
    if (sw_valid && sw_ready) n_sw++;
    if (ev_path) n_path++;
  end

  // ---------------- per-branch latency, Ball-Larus section ----------------
  // latency of a dequeued branch = cycles until the next dequeue, counted
  // only when the next branch was already waiting in the queue
  bit measure = 0;
  int last_deq = -1, cyc = 0;
  br_type_e last_type;
  logic last_miss;
  int lat_fwd [$], lat_call [$], lat_back_hit [$], lat_back_miss [$];
  logic waiting_since_last;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_pl.br_ready) begin
      if (measure && last_deq >= 0 && waiting_since_last) begin
        int l;
        l = cyc - last_deq;
        case (last_type)
          BR_FORWARD:  lat_fwd.push_back(l);
          BR_CALL:     lat_call.push_back(l);
          BR_BACKWARD: if (last_miss) lat_back_miss.push_back(l); else lat_back_hit.push_back(l);
          default: ;
        endcase
      end
      last_deq <= cyc;
      last_type <= dut.u_pl.fresh_type;
      last_miss <= 1'b0;
      waiting_since_last <= 1'b1;
    end else begin
      if (!dut.u_bq.out_valid) waiting_since_last <= 1'b0;
      if (ev_hpt_miss) last_miss <= 1'b1;
    end
  end

  // ---------------- commit-stage driver ----------------
  bit evt_one = 1;   // per-instruction event count = 1
  task automatic commit(int n, bit is_br, branch_rec_t r);
    logic st;
    commit_valid = 4'((1 << n) - 1);
    for (int i = 0; i < 4; i++) commit_evt[i] = evt_one ? 8'd1 : 8'd0;
    commit_br_valid = is_br;
    commit_br = r;
    forever begin
      #1 st = commit_stall;
      @(posedge clk); #1;
      if (!st) break;
    end
    commit_valid = '0;
    commit_br_valid = 0;
  endtask

  typedef enum {K_COND, K_CALL, K_RET} kind_e;
  int group = 2;      // instructions per branch commit group
  int block_len = 0;  // extra 4-instruction groups before each branch
  task automatic br(int pc, int tgt, bit tk, kind_e k = K_COND);
    branch_rec_t r;
    r = '0;
    r.pc = 32'(pc); r.target = 32'(tgt); r.taken = tk;
    r.is_call = (k == K_CALL); r.is_return = (k == K_RET);
    repeat (block_len) commit(4, 0, '0);
    commit(group, 1, r);
  endtask

  task automatic idle(int n);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  task automatic drain();
    idle(2);
    while (bq_occupancy != 0 || dut.u_pl.busy_q) idle(1);
    idle(4);
  endtask

  task automatic write_ppcr(ppcr_t c);
    ppcr_wdata = c; ppcr_we = 1;
    @(posedge clk); #1 ppcr_we = 0;
  endtask

  task automatic hpt_find(int start, int len, logic [31:0] dir, output longint acc);
    acc = -1;
    for (int s = 0; s < 128; s++)
      for (int w = 0; w < 4; w++) begin
        hpt_rd_set = 7'(s); hpt_rd_way = 2'(w); #0.01;
        if (hpt_rd_valid && hpt_rd_desc.start == 32'(start) &&
            hpt_rd_desc.len == LEN_W'(len) && hpt_rd_desc.dir == dir)
          acc = hpt_rd_acc;
      end
  endtask

  task automatic hpt_clear_all();
    hpt_clear = 1; @(posedge clk); #1 hpt_clear = 0;
  endtask

  // ---------------- the program ----------------
  localparam int B1 = 'h100, B2 = 'h110, B3 = 'h120, B4 = 'h130, B5 = 'h140,
                 B6 = 'h150, BX = 'h160, MAIN = 'h1000, RP = 'h2000;

  // loop procedure: iterations given as a string of 'A' / 'C', then exit
  task automatic call_loop(int site, string iters);
    br(site, B1, 1, K_CALL);
    foreach (iters[i]) begin
      br(B2 + 'hC, B3, 1);
      if (iters[i] == "A") br(B3 + 'hC, B4, 0); else br(B3 + 'hC, B5, 1);
      br(B5 + 'hC, B2, 1);
    end
    br(B2 + 'hC, B3, 1);
    br(B3 + 'hC, B4, 0);
    br(B5 + 'hC, B6, 0);
    br(B6 + 'hC, BX, 1);
    br(BX + 4, site + 4, 1, K_RET);
  endtask

  // random procedure: each iteration 12 random forward branches, back-edge
  task automatic call_random(int site, int iters);
    br(site, RP, 1, K_CALL);
    for (int it = 0; it < iters; it++) begin
      for (int b = 0; b < 12; b++) begin
        bit tk;
        tk = 1'($urandom);
        br(RP + 'h10 * b + 'hC, RP + 'h10 * (b + 1), tk);
      end
      br(RP + 'hCC, RP, 1);
    end
    br(RP + 'hD0, site + 4, 1, K_RET);
  endtask

  task automatic recurse(int depth, int lvl);
    int base;
    base = 'h4000 + 'h100 * lvl;
    br(base + 'h4, base + 'h10, 1);
    if (lvl < depth) begin
      br(base + 'h14, 'h4000 + 'h100 * (lvl + 1), 1, K_CALL);
      recurse(depth, lvl + 1);
    end
    br(base + 'h20, base + 'h24, 1, K_RET);
  endtask

  initial begin
    longint a1, a2, a3, a4;
    ppcr_t c;
    int sw_before, path_before;
    commit_valid = '0; commit_evt = '0; commit_br_valid = 0; commit_br = '0;
    ppcr_we = 0; ppcr_wdata = PPCR_RESET; repair_pop = 0;
    hpt_en = 1; pd_en = 1; sw_en = 0; sw_ready = 0; hpt_clear = 0;
    hpt_rd_set = '0; hpt_rd_way = '0;
    pd_interval_len = 32'd1_000_000; pd_threshold = 32'd600_000;
    dc_access = '0; dc_access_cost = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    idle(2);

    // ---- 1. Ball-Larus path frequencies ----
    measure = 1;
    for (int n = 0; n < 50; n++) call_loop(MAIN + 'h10 * (n % 4), "AAACC");
    drain();
    measure = 0;
    hpt_find(B1, 3, 'b101, a1);
    hpt_find(B2, 3, 'b101, a2);
    hpt_find(B2, 3, 'b111, a3);
    hpt_find(B2, 4, 'b1001, a4);
    check(a1 == 50 && a2 == 100 && a3 == 100 && a4 == 50,
          $sformatf("BL frequencies %0d %0d %0d %0d", a1, a2, a3, a4));
    check(lat_fwd.size() > 0 && lat_fwd.min()[0] == 1 && lat_fwd.max()[0] == 1, "forward latency 1");
    check(lat_call.size() > 0 && lat_call.min()[0] == 2 && lat_call.max()[0] == 2, "call latency 2");
    check(lat_back_hit.size() > 0 && lat_back_hit.max()[0] == 3 && lat_back_hit.min()[0] == 3,
          "backward latency 3 on a hit");
    check(lat_back_miss.size() > 0 && lat_back_miss.max()[0] == 5 && lat_back_miss.min()[0] == 5,
          "backward latency 5 on a miss");

    // ---- 2. event metric ----
    c = PPCR_RESET; c.count_instr = 0; c.hpt_events = 1;
    write_ppcr(c);
    hpt_clear_all();
    for (int n = 0; n < 20; n++) call_loop(MAIN, "AAACC");
    drain();
    hpt_find(B1, 3, 'b101, a1);
    hpt_find(B2, 3, 'b101, a2);
    hpt_find(B2, 3, 'b111, a3);
    hpt_find(B2, 4, 'b1001, a4);
    check(a1 == 120 && a2 == 240 && a3 == 240 && a4 == 200,
          $sformatf("event sums %0d %0d %0d %0d", a1, a2, a3, a4));
    write_ppcr(PPCR_RESET);

    // ---- 3. table pressure ----
    call_random(MAIN + 'h40, 2500);
    drain();
    check(n_evict > 0, $sformatf("evictions %0d", n_evict));

    // ---- 4. overflow / underflow / repair ----
    recurse(20, 0);
    drain();
    check(n_over >= 4, $sformatf("overflows %0d", n_over));
    check(n_drop > 0 && n_under > 0, $sformatf("underflow %0d drop %0d", n_under, n_drop));
    br(MAIN + 'h80, 'h9000, 1, K_CALL);
    br('h9004, 'h9100, 1, K_CALL);
    drain();
    begin
      int d0;
      d0 = stack_depth;
      repair_pop = 1;
      @(posedge clk); #1 repair_pop = 0;
      idle(1);
      check(stack_depth == 5'(d0 - 1), "repair pop removes one entry");
    end

    // ---- 5. split ----
    br(MAIN + 'h90, 'hA000, 1, K_CALL);
    for (int i = 0; i < 40; i++) br('hA000 + 8 * i, 'hA004 + 8 * i, 1);
    br('hB000, MAIN + 'h94, 1, K_RET);
    drain();
    hpt_find('hA000, 32, 32'hFFFF_FFFF, a1);
    check(n_split == 1 && a1 == 1, $sformatf("split %0d entry %0d", n_split, a1));

    // ---- 6. loop extension ----
    c = PPCR_RESET; c.ext_loop = 1; c.max_ext = 1;
    write_ppcr(c);
    hpt_clear_all();
    for (int n = 0; n < 3; n++) call_loop(MAIN, "AAAAACCC");
    drain();
    hpt_find(B1, 6, 'b101101, a1);
    hpt_find(B2, 6, 'b111111, a2);
    check(a1 == 3 && a2 == 3 && n_ext > 0, $sformatf("extended paths %0d %0d", a1, a2));

    // ---- 7. Whole Program Path to the software port ----
    c = PPCR_RESET; c.map = MAP_WPP;
    write_ppcr(c);
    sw_en = 1;
    sw_before = n_sw; path_before = n_path;
    fork
      begin
        for (int n = 0; n < 10; n++) call_loop(MAIN, "AC");
        drain();
      end
      begin
        repeat (4000) begin
          @(posedge clk); #1 sw_ready = ($urandom_range(2, 0) == 0);
        end
      end
    join_any
    sw_ready = 1;
    drain();
    check(n_sw - sw_before == n_path - path_before && n_sw > sw_before,
          $sformatf("software port got %0d of %0d paths", n_sw - sw_before, n_path - path_before));
    sw_en = 0; sw_ready = 0;
    write_ppcr(PPCR_RESET);

    // ---- 8. phases ----
    // about 2.5M instructions per phase, 16 instructions per branch
    block_len = 3;
    group = 4;
    for (int ph = 0; ph < 4; ph++) begin
      if (ph % 2 == 0)
        for (int n = 0; n < 7800; n++) call_loop(MAIN, "AACAC");
      else
        call_random(MAIN + 'h40, 12000);
    end
    drain();
    check(n_interval >= 8, $sformatf("intervals %0d", n_interval));
    check(n_change >= 1 && n_same >= 1, $sformatf("phase changes %0d stable %0d", n_change, n_same));

    // ---- dcache cost apportioning beside the profiler ----
    dc_access_cost = 8'd10;
    dc_access = 4'b0100; #1 check(dc_inc[2] == 8'd10 && dc_inc[0] == 0, "one dcache access");
    dc_access = 4'b1101; #1 check(dc_inc[0] == 8'd5 && dc_inc[3] == 8'd5 && dc_inc[1] == 0, "three dcache accesses");
    n_dc = 2;

    // ---- every mechanism happened ----
    check(n_stall > 0, "commit stall");
    check(n_bq_full > 0, "branch queue full");
    check(n_hit > 0 && n_miss > 0 && n_evict > 0, "table hit, miss, eviction");
    check(n_over > 0 && n_under > 0 && n_drop > 0, "overflow, underflow, drop");
    check(n_split > 0 && n_ext > 0 && n_repair > 0, "split, extension, repair");
    check(n_mode > 0 && n_interval > 0 && n_change > 0 && n_sw > 0 && n_dc > 0,
          "mode switch, interval, phase change, software port, dcache");
    $display("mechanisms: stall=%0d bqfull=%0d hit=%0d miss=%0d evict=%0d over=%0d under=%0d drop=%0d split=%0d ext=%0d repair=%0d mode=%0d intervals=%0d changes=%0d stable=%0d sw=%0d paths=%0d",
             n_stall, n_bq_full, n_hit, n_miss, n_evict, n_over, n_under, n_drop, n_split,
             n_ext, n_repair, n_mode, n_interval, n_change, n_same, n_sw, n_path);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
