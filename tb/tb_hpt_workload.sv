// Workload testbench for the hot path table: the same path stream is
// profiled by three table configurations spanning the range explored for
// the table's size and associativity,
//   128 entries x 2 ways, 512 x 4 (the default), 2048 x 32,
// with path execution counts (count 1 per path).
//
// The stream has 60,000 paths drawn from 3,000 distinct descriptors with a
// skewed, roughly Zipf-like popularity (rank r has probability about
// proportional to 1/(r+1)). Eight paths share each start address and differ
// in length and direction bits, as the paths of one procedure do.
//
// For each configuration the testbench checks:
//  * latency: every path is taken after 1 cycle on a hit and after
//    1 + log2(ways) cycles on a miss;
//  * the read-out profile: each valid entry is a path of the stream, no path
//    appears twice, and no accumulator exceeds the path's true count (an
//    entry can only lose counts to eviction, never gain them);
//  * the eight hottest paths are all in the 512 x 4 and 2048 x 32 profiles;
//  * the overlap percentage with the exact profile, i.e. the sum over paths
//    of min(share in the table profile, share in the exact profile), is
//    printed for each table, is at least 50% for the default table, and is
//    not smaller for the largest table than for the smallest one.
// A watchdog ends the run.
module tb_hpt_workload;
  import pp_pkg::*;
  localparam int NCFG = 3;
  localparam int CFG_E [NCFG] = '{128, 512, 2048};
  localparam int CFG_W [NCFG] = '{2, 4, 32};
  localparam int NP = 3000;     // distinct paths
  localparam int NS = 60000;    // stream length

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  path_desc_t descs [NP];
  int stream [NS];
  int exact [NP];
  int rank_of [path_desc_t];
  bit ready_to_go = 0;
  bit done [NCFG];
  real overlap [NCFG];
  int top_seen [NCFG];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int E = CFG_E[g], W = CFG_W[g], S = E / W;
    localparam int SW = $clog2(S), WW = (W > 1) ? $clog2(W) : 1;
    localparam int MISS_LAT = 1 + $clog2(W);

    logic in_valid = 0, in_ready;
    path_desc_t in_desc = '0;
    logic [EVT_W-1:0] in_count = '0;
    logic [SW-1:0] rd_set = '0;
    logic [WW-1:0] rd_way = '0;
    logic rd_valid;
    path_desc_t rd_desc;
    logic [31:0] rd_acc;
    logic ev_hit, ev_miss, ev_evict;

    hot_path_table #(.ENTRIES(E), .WAYS(W)) dut (.clk, .rst_n, .clear(1'b0), .in_valid,
      .in_desc, .in_count, .in_ready, .rd_set, .rd_way, .rd_valid, .rd_desc, .rd_acc,
      .ev_hit, .ev_miss, .ev_evict);

    initial begin
      int n_hit, n_miss, lat_bad;
      int seen [int];
      real hw_total, ov;
      n_hit = 0; n_miss = 0; lat_bad = 0;
      hw_total = 0.0; ov = 0.0;
      wait (ready_to_go);
      @(posedge clk); #1;
      for (int n = 0; n < NS; n++) begin
        int cyc;
        bit hit_seen, taken;
        cyc = 0; hit_seen = 0; taken = 0;
        in_desc = descs[stream[n]];
        in_count = 1;
        in_valid = 1;
        while (!taken) begin
          #3;
          cyc++;
          hit_seen |= ev_hit;
          taken = in_ready;
          @(posedge clk); #1;
        end
        in_valid = 0;
        if (hit_seen) n_hit++; else n_miss++;
        if (cyc != (hit_seen ? 1 : MISS_LAT)) begin
          lat_bad++;
          if (lat_bad < 5) $display("FAIL %0dx%0d path %0d took %0d cycles (hit %b)",
                                    E, W, n, cyc, hit_seen);
        end
      end
      check(lat_bad == 0, $sformatf("%0dx%0d latency: %0d wrong", E, W, lat_bad));
      // read out the profile
      for (int s = 0; s < S; s++)
        for (int w = 0; w < W; w++) begin
          rd_set = SW'(s); rd_way = WW'(w);
          #1;
          if (rd_valid) hw_total += real'(rd_acc);
        end
      top_seen[g] = 0;
      for (int s = 0; s < S; s++)
        for (int w = 0; w < W; w++) begin
          rd_set = SW'(s); rd_way = WW'(w);
          #1;
          if (rd_valid) begin
            int r;
            checks++;
            if (!rank_of.exists(rd_desc)) begin
              failures++; $display("FAIL %0dx%0d unknown path in set %0d", E, W, s);
            end else begin
              r = rank_of[rd_desc];
              if (seen.exists(r) || int'(rd_acc) > exact[r]) begin
                failures++;
                $display("FAIL %0dx%0d path %0d count %0d of %0d, duplicate %b", E, W, r,
                         rd_acc, exact[r], seen.exists(r));
              end
              seen[r] = 1;
              if (r < 8) top_seen[g]++;
              ov += (real'(rd_acc) / hw_total < real'(exact[r]) / real'(NS))
                    ? real'(rd_acc) / hw_total : real'(exact[r]) / real'(NS);
            end
          end
        end
      overlap[g] = 100.0 * ov;
      $display("table %0d x %0d: hits %0d misses %0d, %0d paths held, overlap %0.1f%%",
               E, W, n_hit, n_miss, seen.size(), overlap[g]);
      done[g] = 1;
    end
  end

  initial begin
    real lnp;
    lnp = $ln(real'(NP));
    for (int r = 0; r < NP; r++) begin
      descs[r] = '0;
      descs[r].start = 32'h0001_0000 + 32'((r / 8) * 256);
      descs[r].len = LEN_W'(2 + (r % 8));
      descs[r].dir = 32'((r * 2654435761) >> 7) & ((32'd1 << descs[r].len) - 1);
      rank_of[descs[r]] = r;
      exact[r] = 0;
    end
    check(rank_of.size() == NP, "distinct descriptors");
    for (int n = 0; n < NS; n++) begin
      real u;
      int r;
      u = real'($urandom) / 4294967296.0;
      r = int'($floor($exp(u * lnp))) - 1;
      if (r < 0) r = 0;
      if (r >= NP) r = NP - 1;
      stream[n] = r;
      exact[r]++;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ready_to_go = 1;
    wait (done[0] && done[1] && done[2]);
    check(top_seen[1] == 8, $sformatf("512x4 holds %0d of the 8 hottest paths", top_seen[1]));
    check(top_seen[2] == 8, $sformatf("2048x32 holds %0d of the 8 hottest paths", top_seen[2]));
    check(overlap[1] >= 50.0, $sformatf("512x4 overlap %0.1f%%", overlap[1]));
    check(overlap[2] >= overlap[0], "largest table at least as accurate as the smallest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
