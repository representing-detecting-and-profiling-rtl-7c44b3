// path_stack: the hardware stack that holds the path each active procedure
// is currently traversing.
//
// Each entry is a path descriptor plus an 8-bit event counter, a path
// extension counter and an "incomplete" flag. The profiler logic works on
// the top entry only and issues at most one command per cycle:
//   push   - put push_entry on top;
//   pop    - remove the top entry (its contents are tos before the edge);
//   wr_tos - replace the top entry with tos_entry (an update).
// The stack is a circular buffer. Pushing onto a full stack overwrites the
// bottom (oldest) entry, which is the first of the two overflow policies
// the published design offers; overflow pulses and the lost entry is gone.
// The matching underflow is handled by the profiler logic, which creates an
// entry marked incomplete when it needs a top entry and finds none.
//
// Interface: tos/empty/depth are registered state; commands act on the
// clock edge. DEPTH is not given by the published design; 16 is this
// implementation's choice.
module path_stack
  import pp_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  stack_entry_t  push_entry,
  input  logic          pop,
  input  logic          wr_tos,
  input  stack_entry_t  tos_entry,
  output stack_entry_t  tos,
  output logic          empty,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic          overflow
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  stack_entry_t mem [DEPTH];
  logic [PW-1:0] top_q;
  logic [CW-1:0] cnt_q;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [PW-1:0] dec(logic [PW-1:0] p);
    return (p == '0) ? PW'(DEPTH - 1) : p - 1'b1;
  endfunction

  assign tos      = mem[top_q];
  assign empty    = (cnt_q == '0);
  assign depth    = cnt_q;
  assign overflow = push && (cnt_q == CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_q <= '0;
      cnt_q <= '0;
    end else if (push) begin
      top_q <= inc(top_q);
      if (cnt_q != CW'(DEPTH)) cnt_q <= cnt_q + 1'b1;
    end else if (pop && !empty) begin
      top_q <= dec(top_q);
      cnt_q <= cnt_q - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push)
      mem[inc(top_q)] <= push_entry;
    else if (wr_tos && !empty)
      mem[top_q] <= tos_entry;
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({push, pop, wr_tos}));

endmodule
