// profiler_logic: the path detector's controller. It turns the stream of
// retiring branches into a stream of completed paths.
//
// For each branch taken from the branch queue it looks up, by branch class,
// which path stack operations the PPCR asks for and runs them in the fixed
// order update (or update-count), pop, push, one operation per cycle:
//   update       top path gets one more branch: length+1, the branch's
//                direction shifted into bit 0, block events added to its
//                8-bit (saturating) event counter;
//   update-count only the events are added;
//   pop          the top path is offered on out_*; the operation ends when
//                the consumers take it (out_ready), then the entry leaves;
//   push         a fresh path starting at the branch target.
// So with the Ball-Larus mapping a forward branch costs one cycle, a call
// two, and a backward branch three when the consumers take the popped path
// at once. A hot path table miss holds the pop for two more cycles, which
// gives the five cycles per backward branch of the published latency
// model (one for the update, one plus two for the pop, one for the push).
//
// Special cases, all from the published design unless noted:
//  * Length limit: when an update brings a path to MAX_LEN branches and the
//    mapping does not pop anyway, a pop and a push of a path starting at the
//    branch target are added. (Splitting when the limit is reached, rather
//    than one branch later, is this implementation's reading; it keeps the
//    branch in the path.)
//  * Extended paths: with ext_loop set, a backward branch whose top path has
//    extension count below max_ext only updates the path and counts up.
//    With ext_proc set, a call does the same, and a return whose top path
//    has a positive extension count only updates it and counts down.
//  * Underflow: an update or update-count that finds the stack empty first
//    creates an entry marked incomplete, starting at the branch's own
//    address. A pop of an incomplete entry discards it instead of emitting.
//  * Repair: repair_pop (from the OS after setjmp/longjmp or an exception)
//    discards the top entry while no branch is being processed; repair_ack
//    says it happened.
//  * When the PPCR is disabled, branches are drained and ignored (this
//    implementation's choice, so that profiling off never stalls commit).
module profiler_logic
  import pp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ppcr_t        cfg,
  // branch queue head
  input  logic         br_valid,
  input  branch_rec_t  br_in,
  output logic         br_ready,
  // OS path stack repair
  input  logic         repair_pop,
  output logic         repair_ack,
  // path stack
  output logic         st_push,
  output stack_entry_t st_push_entry,
  output logic         st_pop,
  output logic         st_wr_tos,
  output stack_entry_t st_tos_entry,
  input  stack_entry_t st_tos,
  input  logic         st_empty,
  // completed paths
  output logic         out_valid,
  output path_out_t    out_path,
  input  logic         out_ready,
  // event pulses
  output logic         ev_split,
  output logic         ev_extend,
  output logic         ev_underflow,
  output logic         ev_drop_incomplete
);

  logic        busy_q;
  branch_rec_t br_q;
  br_ops_t     ops_q;

  br_type_e     fresh_type;
  br_ops_t      fresh_ops;
  logic         fresh_ext_up, fresh_ext_down;
  logic         start;
  branch_rec_t  cur_br;
  br_ops_t      cur_ops, rem_ops;
  logic [EXT_W-1:0] tos_ext;
  stack_entry_t base, upd;

  branch_classifier u_cls (.br(br_in), .br_type(fresh_type));

  always_comb begin
    tos_ext        = st_empty ? '0 : st_tos.ext;
    fresh_ops      = cfg.map[fresh_type];
    fresh_ext_up   = 1'b0;
    fresh_ext_down = 1'b0;
    if (cfg.ext_loop && fresh_type == BR_BACKWARD && tos_ext < cfg.max_ext)
      fresh_ext_up = 1'b1;
    if (cfg.ext_proc && fresh_type == BR_CALL && tos_ext < cfg.max_ext)
      fresh_ext_up = 1'b1;
    if (cfg.ext_proc && fresh_type == BR_RETURN && tos_ext != '0)
      fresh_ext_down = 1'b1;
    if (fresh_ext_up || fresh_ext_down)
      fresh_ops = '{update: 1'b1, default: 1'b0};
    if (!cfg.enable)
      fresh_ops = '0;
  end

  always_comb begin
    start      = !busy_q && !repair_pop && br_valid;
    br_ready   = start;
    repair_ack = !busy_q && repair_pop;
    cur_br     = busy_q ? br_q  : br_in;
    cur_ops    = busy_q ? ops_q : (start ? fresh_ops : '0);
    rem_ops    = cur_ops;

    st_push       = 1'b0;
    st_pop        = 1'b0;
    st_wr_tos     = 1'b0;
    st_push_entry = '0;
    st_tos_entry  = '0;
    out_valid     = 1'b0;
    out_path      = '{desc: st_tos.desc, evt: st_tos.evt};

    ev_split           = 1'b0;
    ev_extend          = 1'b0;
    ev_underflow       = 1'b0;
    ev_drop_incomplete = 1'b0;

    // entry the update works on
    if (st_empty) begin
      base            = '0;
      base.desc.start = cur_br.pc;
      base.incomplete = 1'b1;
    end else
      base = st_tos;
    upd = base;
    if (cur_ops.update) begin
      upd.desc.len = base.desc.len + 1'b1;
      upd.desc.dir = {base.desc.dir[MAX_LEN-2:0], cur_br.taken};
    end
    upd.evt = sat_add_evt(base.evt, cur_br.events);
    if (!busy_q && fresh_ext_up)   upd.ext = base.ext + 1'b1;
    if (!busy_q && fresh_ext_down) upd.ext = base.ext - 1'b1;

    if (repair_ack) begin
      st_pop = !st_empty;
    end else if (cur_ops.update || cur_ops.update_count) begin
      rem_ops.update       = 1'b0;
      rem_ops.update_count = 1'b0;
      if (st_empty) begin
        st_push       = 1'b1;
        st_push_entry = upd;
        ev_underflow  = 1'b1;
      end else begin
        st_wr_tos    = 1'b1;
        st_tos_entry = upd;
      end
      ev_extend = !busy_q && (fresh_ext_up || fresh_ext_down);
      if (cur_ops.update && upd.desc.len == LEN_W'(MAX_LEN) && !cur_ops.pop) begin
        rem_ops.pop  = 1'b1;
        rem_ops.push = 1'b1;
        ev_split     = 1'b1;
      end
    end else if (cur_ops.pop) begin
      if (st_empty) begin
        rem_ops.pop = 1'b0;
      end else if (st_tos.incomplete) begin
        st_pop             = 1'b1;
        rem_ops.pop        = 1'b0;
        ev_drop_incomplete = 1'b1;
      end else begin
        out_valid = 1'b1;
        if (out_ready) begin
          st_pop      = 1'b1;
          rem_ops.pop = 1'b0;
        end
      end
    end else if (cur_ops.push) begin
      st_push             = 1'b1;
      st_push_entry       = '0;
      st_push_entry.desc.start = cur_br.target;
      rem_ops.push        = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      ops_q  <= '0;
      br_q   <= '0;
    end else begin
      if (start) br_q <= br_in;
      if (busy_q || start) begin
        ops_q  <= rem_ops;
        busy_q <= (rem_ops != '0);
      end
    end
  end

  // A path offered to the consumers stays offered, unchanged, until taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_path));
  // Never both update and update-count for one branch.
  a_one_update: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(cur_ops.update && cur_ops.update_count));

endmodule
