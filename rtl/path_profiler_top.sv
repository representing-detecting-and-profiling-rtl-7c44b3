// path_profiler_top: programmable hardware path profiler.
//
// The profiler watches the branches a processor retires and reconstructs
// the program paths they form, without instrumenting the program. A path is
// named by a compact descriptor (start address, number of branches, one
// direction bit per branch). Branches leave the commit stage together with
// a block event count (instructions, cache misses, mispredictions, or a
// power cost, accumulated since the previous branch) and wait in a small
// branch queue. The profiler logic classifies each one (call, return,
// forward, backward, indirect) and, as the PPCR dictates, updates, pops and
// pushes entries of the path stack. Every popped path is delivered to all
// enabled consumers:
//   * the hot path table, which keeps an LFU-managed profile of the hottest
//     paths with 32-bit accumulators;
//   * the phase detector, which turns the paths of each interval into a
//     signature and flags phase changes;
//   * the software-thread port (sw_*), for a Whole Program Path compressor
//     or any other consumer outside this block.
// The L1 data cache cost apportioning logic, which helps the pipeline
// charge power costs to the instructions whose event counters feed the
// block event counter, sits beside the profiler with its own ports; the
// per-instruction event counters themselves belong to the host pipeline.
//
// Interface summary: commit_* is one commit group per cycle (commit_stall
// asks the pipeline to hold it); ppcr_* programs the control register;
// repair_pop lets the OS discard stack entries; hpt_* and pd_* configure and
// read the two on-chip consumers; ev_* are one-cycle event pulses for
// monitoring. Default sizes are the published ones where given (32-branch
// descriptors, 8-bit event counters, 4-entry branch queue, 512-entry 4-way
// table); the stack depth, commit width and phase detector sizes are this
// implementation's choices.
module path_profiler_top
  import pp_pkg::*;
#(
  parameter int COMMIT_W    = 4,
  parameter int BQ_DEPTH    = 4,
  parameter int STACK_DEPTH = 16,
  parameter int HPT_ENTRIES = 512,
  parameter int HPT_WAYS    = 4,
  parameter int PD_N_ACC    = 32,
  parameter int PD_ACC_W    = 24,
  parameter int PD_SIG_W    = 8,
  parameter int DC_SLOTS    = 4,
  parameter int DC_PORTS    = 2,
  parameter int DC_COST_W   = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // commit stage
  input  logic [COMMIT_W-1:0]          commit_valid,
  input  logic [COMMIT_W-1:0][EVT_W-1:0] commit_evt,
  input  logic                         commit_br_valid,
  input  branch_rec_t                  commit_br,
  output logic                         commit_stall,
  // control register
  input  logic                         ppcr_we,
  input  ppcr_t                        ppcr_wdata,
  output ppcr_t                        ppcr_cfg,
  // OS repair of the path stack
  input  logic                         repair_pop,
  output logic                         repair_ack,
  // consumers
  input  logic                         hpt_en,
  input  logic                         pd_en,
  input  logic                         sw_en,
  output logic                         sw_valid,
  output path_out_t                    sw_path,
  input  logic                         sw_ready,
  // hot path table
  input  logic                         hpt_clear,
  input  logic [$clog2(HPT_ENTRIES/HPT_WAYS)-1:0] hpt_rd_set,
  input  logic [((HPT_WAYS > 1) ? $clog2(HPT_WAYS) : 1)-1:0] hpt_rd_way,
  output logic                         hpt_rd_valid,
  output path_desc_t                   hpt_rd_desc,
  output logic [31:0]                  hpt_rd_acc,
  // phase detector
  input  logic [31:0]                  pd_interval_len,
  input  logic [31:0]                  pd_threshold,
  output logic                         pd_interval_end,
  output logic                         pd_result_valid,
  output logic                         pd_phase_change,
  output logic [31:0]                  pd_distance,
  // dcache cost apportioning
  input  logic [DC_SLOTS-1:0]          dc_access,
  input  logic [DC_COST_W-1:0]         dc_access_cost,
  output logic [DC_SLOTS-1:0][DC_COST_W-1:0] dc_inc,
  // status and event pulses
  output logic [$clog2(BQ_DEPTH+1)-1:0]    bq_occupancy,
  output logic [$clog2(STACK_DEPTH+1)-1:0] stack_depth,
  output logic                         ev_path,
  output logic                         ev_overflow,
  output logic                         ev_split,
  output logic                         ev_extend,
  output logic                         ev_underflow,
  output logic                         ev_drop_incomplete,
  output logic                         ev_hpt_hit,
  output logic                         ev_hpt_miss,
  output logic                         ev_hpt_evict
);

  // ---------------- commit side ----------------
  logic        bq_in_valid, bq_in_ready;
  branch_rec_t bq_in_rec;
  logic        bq_out_valid, bq_out_ready;
  branch_rec_t bq_out_rec;

  ppcr u_ppcr (
    .clk, .rst_n, .wr_en(ppcr_we), .wr_data(ppcr_wdata), .cfg(ppcr_cfg)
  );

  block_event_counter #(.WIDTH(COMMIT_W)) u_bec (
    .clk, .rst_n,
    .count_instr (ppcr_cfg.count_instr),
    .slot_valid  (commit_valid),
    .slot_evt    (commit_evt),
    .br_valid    (commit_br_valid),
    .br          (commit_br),
    .enq_valid   (bq_in_valid),
    .enq_rec     (bq_in_rec),
    .enq_ready   (bq_in_ready),
    .stall       (commit_stall)
  );

  branch_queue #(.DEPTH(BQ_DEPTH)) u_bq (
    .clk, .rst_n,
    .in_valid  (bq_in_valid),
    .in_rec    (bq_in_rec),
    .in_ready  (bq_in_ready),
    .out_valid (bq_out_valid),
    .out_rec   (bq_out_rec),
    .out_ready (bq_out_ready),
    .occupancy (bq_occupancy)
  );

  // ---------------- path detector ----------------
  logic         st_push, st_pop, st_wr_tos, st_empty;
  stack_entry_t st_push_entry, st_tos_entry, st_tos;
  logic         pl_out_valid, pl_out_ready;
  path_out_t    pl_out;

  profiler_logic u_pl (
    .clk, .rst_n,
    .cfg           (ppcr_cfg),
    .br_valid      (bq_out_valid),
    .br_in         (bq_out_rec),
    .br_ready      (bq_out_ready),
    .repair_pop, .repair_ack,
    .st_push, .st_push_entry, .st_pop, .st_wr_tos, .st_tos_entry,
    .st_tos, .st_empty,
    .out_valid     (pl_out_valid),
    .out_path      (pl_out),
    .out_ready     (pl_out_ready),
    .ev_split, .ev_extend, .ev_underflow, .ev_drop_incomplete
  );

  path_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n,
    .push       (st_push),
    .push_entry (st_push_entry),
    .pop        (st_pop),
    .wr_tos     (st_wr_tos),
    .tos_entry  (st_tos_entry),
    .tos        (st_tos),
    .empty      (st_empty),
    .depth      (stack_depth),
    .overflow   (ev_overflow)
  );

  assign ev_path = pl_out_valid && pl_out_ready;

  // ---------------- path descriptor distribution ----------------
  localparam int C_HPT = 0, C_PD = 1, C_SW = 2;
  logic [2:0] c_valid, c_ready;

  path_fork #(.N(3)) u_fork (
    .clk, .rst_n,
    .enable    ({sw_en, pd_en, hpt_en}),
    .in_valid  (pl_out_valid),
    .in_ready  (pl_out_ready),
    .out_valid (c_valid),
    .out_ready (c_ready)
  );

  hot_path_table #(.ENTRIES(HPT_ENTRIES), .WAYS(HPT_WAYS), .CNT_W(32)) u_hpt (
    .clk, .rst_n,
    .clear    (hpt_clear),
    .in_valid (c_valid[C_HPT]),
    .in_desc  (pl_out.desc),
    .in_count (ppcr_cfg.hpt_events ? pl_out.evt : EVT_W'(1)),
    .in_ready (c_ready[C_HPT]),
    .rd_set   (hpt_rd_set),
    .rd_way   (hpt_rd_way),
    .rd_valid (hpt_rd_valid),
    .rd_desc  (hpt_rd_desc),
    .rd_acc   (hpt_rd_acc),
    .ev_hit   (ev_hpt_hit),
    .ev_miss  (ev_hpt_miss),
    .ev_evict (ev_hpt_evict)
  );

  phase_detector #(.N_ACC(PD_N_ACC), .ACC_W(PD_ACC_W), .SIG_W(PD_SIG_W)) u_pd (
    .clk, .rst_n,
    .in_valid     (c_valid[C_PD]),
    .in_desc      (pl_out.desc),
    .in_count     (pl_out.evt),
    .in_ready     (c_ready[C_PD]),
    .interval_len (pd_interval_len),
    .threshold    (pd_threshold),
    .interval_end (pd_interval_end),
    .result_valid (pd_result_valid),
    .phase_change (pd_phase_change),
    .distance     (pd_distance)
  );

  assign sw_valid       = c_valid[C_SW];
  assign sw_path        = pl_out;
  assign c_ready[C_SW]  = sw_ready;

  // ---------------- power cost apportioning ----------------
  dcache_cost_apportion #(.SLOTS(DC_SLOTS), .PORTS(DC_PORTS), .COST_W(DC_COST_W)) u_dc (
    .access      (dc_access),
    .access_cost (dc_access_cost),
    .inc         (dc_inc)
  );

endmodule
