// Workload testbench for the branch queue: how much does profiling slow the
// commit stage down, for a 2-entry and a 4-entry branch queue?
//
// Two copies of path_profiler_top, identical except for BQ_DEPTH (2 and the
// default 4), profile Ball-Larus paths of the same synthetic program. The
// program has eight procedures. Each runs a loop of 4 to 7 conditional forward
// branches per iteration, closed by a backward branch, and sometimes calls
// another procedure from inside the loop. Blocks hold 1 to 7 instructions,
// which commit in groups of 1 to 4 (the branch last), with idle commit
// cycles in between, so that the pipeline commits fewer than four
// instructions per cycle on average.
//
// The ideal run time is the number of commit groups plus idle cycles. Each
// stall cycle the profiler causes (branch queue full) adds one cycle. The
// testbench prints the overhead of each queue size and checks:
//  * both copies commit the whole program and see the same number of paths;
//  * their hot path tables hold exactly the same profile (the queue depth
//    changes timing only, never what is profiled);
//  * the 4-entry queue stalls no more than the 2-entry one;
//  * both queues fill up at some point (the test does stress them).
// A watchdog ends the run.
module tb_bq_workload;
  import pp_pkg::*;
  localparam int NCFG = 2;
  localparam int CFG_BQ [NCFG] = '{2, 4};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- synthetic program, pre-generated ----------------
  int          g_n    [$];   // instructions in the commit group
  bit          g_br   [$];   // group ends with a branch
  branch_rec_t g_rec  [$];
  int          g_idle [$];   // idle commit cycles before the group
  int          ideal_cycles = 0;
  int          n_branches = 0;

  function automatic logic [31:0] base_of(int p);
    return 32'h0001_0000 + 32'(p) * 32'h1000;
  endfunction

  function automatic int nblk(int p);
    return 4 + (p % 4);
  endfunction

  function automatic int ninstr(int p, int b);
    return 1 + ((p * 7 + b * 3) % 7);
  endfunction

  // commit a block of n instructions, the last one being branch r
  task automatic emit_block(int n, branch_rec_t r);
    int left;
    left = n;
    while (left > 0) begin
      int k, idle;
      k = $urandom_range(4, 1);
      if (k > left) k = left;
      idle = ($urandom_range(3, 0) == 0) ? 1 : 0;
      left -= k;
      g_n.push_back(k);
      g_br.push_back(left == 0);
      g_rec.push_back(r);
      g_idle.push_back(idle);
      ideal_cycles += 1 + idle;
    end
    n_branches++;
  endtask

  function automatic branch_rec_t mk(logic [31:0] pc, logic [31:0] tgt, bit taken,
                                     bit call, bit ret);
    branch_rec_t r;
    r = '0;
    r.pc = pc; r.target = tgt; r.taken = taken;
    r.is_call = call; r.is_return = ret;
    return r;
  endfunction

  // one activation of procedure p, called from call site (ret_to)
  task automatic gen_proc(int p, int depth, logic [31:0] ret_to);
    int trips;
    logic [31:0] base;
    base = base_of(p);
    trips = $urandom_range(8, 2);
    for (int it = 0; it < trips; it++) begin
      for (int b = 0; b < nblk(p); b++) begin
        logic [31:0] pc;
        bit t;
        pc = base + 32'(b * 64 + 60);
        if (b == 1 && depth < 4 && $urandom_range(9, 0) < 3) begin
          int q;
          q = (p + 1 + $urandom_range(6, 0)) % 8;
          emit_block(2, mk(pc - 8, base_of(q), 1'b1, 1'b1, 1'b0));
          gen_proc(q, depth + 1, pc - 4);
        end
        // biased forward branch: each block has its own preferred direction
        t = ($urandom_range(9, 0) < ((p + b) % 2 == 0 ? 8 : 2));
        emit_block(ninstr(p, b), mk(pc, t ? pc + 8 : pc + 4, t, 1'b0, 1'b0));
      end
      // loop-closing branch: back to the loop head while iterations remain
      begin
        logic [31:0] pc;
        pc = base + 32'(nblk(p) * 64 + 60);
        if (it < trips - 1) emit_block(2, mk(pc, base, 1'b1, 1'b0, 1'b0));
        else                emit_block(2, mk(pc, pc + 4, 1'b0, 1'b0, 1'b0));
      end
    end
    emit_block(3, mk(base + 32'h0F00, ret_to, 1'b1, 1'b0, 1'b1));
  endtask

  bit go = 0;
  bit done [NCFG];
  int cycles_used [NCFG], stalls [NCFG], n_paths [NCFG], n_full [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int BQ = CFG_BQ[g];
    logic [3:0] commit_valid = '0;
    logic [3:0][EVT_W-1:0] commit_evt = '0;
    logic commit_br_valid = 0, commit_stall;
    branch_rec_t commit_br = '0;
    ppcr_t ppcr_cfg;
    logic repair_ack;
    logic sw_valid;
    path_out_t sw_path;
    logic [6:0] hpt_rd_set = '0;
    logic [1:0] hpt_rd_way = '0;
    logic hpt_rd_valid;
    path_desc_t hpt_rd_desc;
    logic [31:0] hpt_rd_acc;
    logic pd_interval_end, pd_result_valid, pd_phase_change;
    logic [31:0] pd_distance;
    logic [3:0][7:0] dc_inc;
    logic [$clog2(BQ+1)-1:0] bq_occupancy;
    logic [4:0] stack_depth;
    logic ev_path, ev_overflow, ev_split, ev_extend, ev_underflow, ev_drop_incomplete;
    logic ev_hpt_hit, ev_hpt_miss, ev_hpt_evict;

    path_profiler_top #(.BQ_DEPTH(BQ)) dut (.clk, .rst_n, .commit_valid, .commit_evt,
      .commit_br_valid, .commit_br, .commit_stall, .ppcr_we(1'b0), .ppcr_wdata(PPCR_RESET),
      .ppcr_cfg, .repair_pop(1'b0), .repair_ack, .hpt_en(1'b1), .pd_en(1'b0), .sw_en(1'b0),
      .sw_valid, .sw_path, .sw_ready(1'b1), .hpt_clear(1'b0), .hpt_rd_set, .hpt_rd_way,
      .hpt_rd_valid, .hpt_rd_desc, .hpt_rd_acc, .pd_interval_len(32'd10_000_000),
      .pd_threshold(32'd6_000_000), .pd_interval_end, .pd_result_valid, .pd_phase_change,
      .pd_distance, .dc_access(4'b0), .dc_access_cost(8'd0), .dc_inc, .bq_occupancy,
      .stack_depth, .ev_path, .ev_overflow, .ev_split, .ev_extend, .ev_underflow,
      .ev_drop_incomplete, .ev_hpt_hit, .ev_hpt_miss, .ev_hpt_evict);

    bit counting = 0;
    always @(posedge clk) if (rst_n) begin
      if (ev_path) n_paths[g]++;
      if (int'(bq_occupancy) == BQ) n_full[g]++;
      if (counting) begin
        cycles_used[g]++;
        if (commit_stall && commit_valid != '0) stalls[g]++;
      end
    end

    initial begin
      wait (go);
      @(posedge clk); #1;
      counting = 1;
      for (int i = 0; i < g_n.size(); i++) begin
        logic st;
        repeat (g_idle[i]) begin @(posedge clk); #1; end
        commit_valid = 4'((1 << g_n[i]) - 1);
        for (int k = 0; k < 4; k++) commit_evt[k] = 8'd1;
        commit_br_valid = g_br[i];
        commit_br = g_rec[i];
        forever begin
          #1 st = commit_stall;
          @(posedge clk); #1;
          if (!st) break;
        end
        commit_valid = '0;
        commit_br_valid = 0;
      end
      counting = 0;
      // let the profiler drain
      repeat (200) @(posedge clk);
      done[g] = 1;
    end
  end

  initial begin
    for (int g = 0; g < NCFG; g++) begin
      cycles_used[g] = 0; stalls[g] = 0; n_paths[g] = 0; n_full[g] = 0; done[g] = 0;
    end
    for (int rep = 0; rep < 120; rep++)
      gen_proc(rep % 8, 0, 32'h0000_0100 + 32'(4 * (rep % 8)));
    $display("program: %0d branches, %0d commit groups, ideal %0d cycles",
             n_branches, g_n.size(), ideal_cycles);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    go = 1;
    wait (done[0] && done[1]);
    for (int g = 0; g < NCFG; g++) begin
      real ovh;
      ovh = 100.0 * real'(cycles_used[g] - ideal_cycles) / real'(ideal_cycles);
      $display("branch queue %0d: %0d cycles, %0d stall cycles, overhead %0.2f%%, %0d paths",
               CFG_BQ[g], cycles_used[g], stalls[g], ovh, n_paths[g]);
      check(cycles_used[g] == ideal_cycles + stalls[g],
            $sformatf("queue %0d: cycles %0d = ideal %0d + stalls %0d", CFG_BQ[g],
                      cycles_used[g], ideal_cycles, stalls[g]));
      check(n_full[g] > 0, $sformatf("queue %0d filled up", CFG_BQ[g]));
    end
    check(n_paths[0] == n_paths[1] && n_paths[0] > 0,
          $sformatf("same paths: %0d vs %0d", n_paths[0], n_paths[1]));
    check(stalls[1] <= stalls[0], "4-entry queue stalls no more than 2-entry queue");
    // identical profiles
    begin
      int diff, held;
      diff = 0; held = 0;
      for (int s = 0; s < 128; s++)
        for (int w = 0; w < 4; w++) begin
          g_cfg[0].hpt_rd_set = 7'(s); g_cfg[0].hpt_rd_way = 2'(w);
          g_cfg[1].hpt_rd_set = 7'(s); g_cfg[1].hpt_rd_way = 2'(w);
          #1;
          if (g_cfg[0].hpt_rd_valid) held++;
          if (g_cfg[0].hpt_rd_valid != g_cfg[1].hpt_rd_valid ||
              (g_cfg[0].hpt_rd_valid && (g_cfg[0].hpt_rd_desc != g_cfg[1].hpt_rd_desc ||
                                         g_cfg[0].hpt_rd_acc != g_cfg[1].hpt_rd_acc)))
            diff++;
        end
      check(diff == 0 && held > 0,
            $sformatf("profiles identical: %0d entries differ, %0d held", diff, held));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
