// block_event_counter: commit-stage accumulator of events between branches.
//
// Every instruction in the pipeline carries its own event counter, bumped
// each time it causes the architectural event being profiled. When the
// instructions commit, their counts are added into this block event
// counter; when a branch commits, the running sum (including the branch's
// own count) travels with the branch into the branch queue and the counter
// restarts from zero. In instruction-count mode (count_instr = 1) every
// committing instruction adds one instead, which gives each path its
// instruction count.
//
// Interface: a commit group of up to WIDTH instructions per cycle
// (slot_valid/slot_evt). If br_valid is set, the group ends with the branch
// described by br; its events field is ignored and filled in here. The
// branch is handed to the branch queue through enq_valid/enq_ready; when the
// queue is full, stall is raised combinationally, the group is not taken and
// the commit stage must present it again.
//
// Timing: the sum is combinational; the counter updates on the clock edge.
// Sums saturate at 2**EVT_W-1. The accumulate-and-reset behaviour follows
// the published scheme; the commit-group form (at most one branch per group,
// at its end) and saturation are choices of this implementation.
module block_event_counter
  import pp_pkg::*;
#(
  parameter int WIDTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   count_instr,
  input  logic [WIDTH-1:0]       slot_valid,
  input  logic [WIDTH-1:0][EVT_W-1:0] slot_evt,
  input  logic                   br_valid,
  input  branch_rec_t            br,
  output logic                   enq_valid,
  output branch_rec_t            enq_rec,
  input  logic                   enq_ready,
  output logic                   stall
);

  logic [EVT_W-1:0] acc_q;
  logic [EVT_W-1:0] sum;

  always_comb begin
    sum = acc_q;
    for (int i = 0; i < WIDTH; i++) begin
      if (slot_valid[i])
        sum = sat_add_evt(sum, count_instr ? EVT_W'(1) : slot_evt[i]);
    end
  end

  always_comb begin
    enq_valid      = br_valid;
    enq_rec        = br;
    enq_rec.events = sum;
    stall          = br_valid && !enq_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc_q <= '0;
    else if (br_valid) begin
      if (enq_ready) acc_q <= '0;
    end else
      acc_q <= sum;
  end

endmodule
