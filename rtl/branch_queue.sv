// branch_queue: FIFO of retiring branches between the commit stage and the
// path profiler.
//
// It lets the pipeline keep committing while the profiler spends several
// cycles on one branch (a backward branch costs an update, a pop and a
// push). A four-entry queue is the size found to hide almost all of the
// profiler's latency, and is the default here. When the queue is full the
// commit stage stalls (in_ready low).
//
// Interface: valid/ready on both sides; out_rec is the head entry and is
// valid whenever out_valid is set. A write into a full queue is refused even
// if a read happens in the same cycle. Storage is a circular buffer with
// read/write pointers and an occupancy count; one entry in and one out per
// cycle.
module branch_queue
  import pp_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  branch_rec_t in_rec,
  output logic        in_ready,
  output logic        out_valid,
  output branch_rec_t out_rec,
  input  logic        out_ready,
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  branch_rec_t mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;

  logic do_wr, do_rd;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_rec   = mem[rd_ptr];
  assign occupancy = count;
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_rec;
  end

  // A refused write must be offered again unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid);

endmodule
