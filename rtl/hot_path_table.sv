// hot_path_table: set-associative table that keeps the profile of the
// paths that dominate execution.
//
// Each entry holds a path descriptor and a 32-bit accumulator. An incoming
// path selects a set through path_index_hash (start address XOR length XOR
// direction bits). On a hit the accumulator adds the path's count. On a
// miss the least frequently used way of the set is replaced: the new entry
// takes the descriptor and starts at the path's count. Because the
// accumulators already are use counts, LFU needs no extra state; an empty
// way counts as less used than any valid one, and ties go to the lower way.
//
// Timing: the lookup and a hit's update take one cycle. On a miss the LFU
// victim is then found by a tournament of comparators over the set, one
// level per cycle, so a miss costs log2(WAYS) cycles more than a hit
// (1 + 2 cycles for the published 512-entry 4-way table; a direct-mapped
// table replaces in the lookup cycle). in_ready is raised in the cycle the
// table is written: the producer holds in_valid and the path stable until
// then. clear invalidates every entry in one cycle.
//
// Interface: in_* is the path stream (count = event count or 1); rd_* is a
// combinational read port so that software can read out the profile;
// ev_* pulse once per hit, miss and eviction of a valid entry.
// Size and associativity defaults are the published ones; accumulators
// saturate (this implementation's choice).
module hot_path_table
  import pp_pkg::*;
#(
  parameter int ENTRIES = 512,
  parameter int WAYS    = 4,
  parameter int CNT_W   = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  path_desc_t              in_desc,
  input  logic [EVT_W-1:0]        in_count,
  output logic                    in_ready,
  input  logic [$clog2(ENTRIES/WAYS)-1:0] rd_set,
  input  logic [((WAYS > 1) ? $clog2(WAYS) : 1)-1:0] rd_way,
  output logic                    rd_valid,
  output path_desc_t              rd_desc,
  output logic [CNT_W-1:0]        rd_acc,
  output logic                    ev_hit,
  output logic                    ev_miss,
  output logic                    ev_evict
);

  localparam int SETS  = ENTRIES / WAYS;
  localparam int IDX_W = $clog2(SETS);
  localparam int WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int KEY_W = CNT_W + 1;
  localparam int HALF  = (WAYS > 1) ? WAYS / 2 : 1;
  localparam int LVL_W = $clog2(WW + 1);

  logic             valid_q [SETS][WAYS];
  path_desc_t       tag_q   [SETS][WAYS];
  logic [CNT_W-1:0] acc_q   [SETS][WAYS];

  logic [IDX_W-1:0] idx;
  path_index_hash #(.IDX_W(IDX_W)) u_hash (.desc(in_desc), .idx(idx));

  // LFU tournament state
  logic             miss_q;
  logic [LVL_W-1:0] level_q;
  logic [WW-1:0]    cand_way_q [HALF];
  logic [KEY_W-1:0] cand_key_q [HALF];

  logic [WAYS-1:0]  hit_vec;
  logic             hit;
  logic [WW-1:0]    hit_way;
  logic [WW-1:0]    cur_way [WAYS];
  logic [KEY_W-1:0] cur_key [WAYS];
  logic [WW-1:0]    red_way [HALF];
  logic [KEY_W-1:0] red_key [HALF];
  logic             last_level;
  logic [WW-1:0]    victim;
  logic             do_hit, do_fill;
  logic [CNT_W:0]   hit_sum;

  always_comb begin
    hit_vec = '0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = valid_q[idx][w] && (tag_q[idx][w] == in_desc);
      if (hit_vec[w]) hit_way = WW'(w);
    end
    hit = |hit_vec;

    // candidates of this cycle: the whole set, or last level's winners
    for (int w = 0; w < WAYS; w++) begin
      if (level_q == '0) begin
        cur_way[w] = WW'(w);
        cur_key[w] = valid_q[idx][w] ? {1'b1, acc_q[idx][w]} : '0;
      end else if (w < HALF) begin
        cur_way[w] = cand_way_q[w];
        cur_key[w] = cand_key_q[w];
      end else begin
        cur_way[w] = '0;
        cur_key[w] = '0;
      end
    end
    for (int i = 0; i < HALF; i++) begin
      if (WAYS > 1 && cur_key[2*i+1] < cur_key[2*i]) begin
        red_way[i] = cur_way[2*i+1];
        red_key[i] = cur_key[2*i+1];
      end else begin
        red_way[i] = cur_way[2*i];
        red_key[i] = cur_key[2*i];
      end
    end
    // after the lookup cycle (miss_q), candidates = WAYS >> level_q;
    // the last level is reached when two remain
    last_level = (WAYS <= 2) || ((WAYS >> level_q) == 2);
    victim     = (WAYS == 1) ? '0 : red_way[0];

    do_hit   = in_valid && !clear && !miss_q && hit;
    do_fill  = in_valid && !clear && !hit && (WAYS == 1 || (miss_q && last_level));
    in_ready = do_hit || do_fill;
    hit_sum  = {1'b0, acc_q[idx][hit_way]} + (CNT_W+1)'(in_count);

    ev_hit   = do_hit;
    ev_miss  = in_valid && !clear && !miss_q && !hit;
    ev_evict = do_fill && valid_q[idx][victim];

    rd_valid = valid_q[rd_set][rd_way];
    rd_desc  = tag_q[rd_set][rd_way];
    rd_acc   = acc_q[rd_set][rd_way];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_q  <= 1'b0;
      level_q <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          valid_q[s][w] <= 1'b0;
    end else if (clear) begin
      miss_q  <= 1'b0;
      level_q <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          valid_q[s][w] <= 1'b0;
    end else begin
      if (do_fill) begin
        valid_q[idx][victim] <= 1'b1;
        miss_q  <= 1'b0;
        level_q <= '0;
      end else if (in_valid && !hit) begin
        miss_q <= 1'b1;
        if (miss_q) level_q <= level_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!clear && in_valid && !hit && miss_q && !last_level) begin
      for (int i = 0; i < HALF; i++) begin
        cand_way_q[i] <= red_way[i];
        cand_key_q[i] <= red_key[i];
      end
    end
    if (do_hit)
      acc_q[idx][hit_way] <= hit_sum[CNT_W] ? '1 : hit_sum[CNT_W-1:0];
    if (do_fill) begin
      tag_q[idx][victim] <= in_desc;
      acc_q[idx][victim] <= CNT_W'(in_count);
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n || clear)
                           in_valid && !in_ready |=> in_valid && $stable(in_desc)
                                                     && $stable(in_count));

endmodule
