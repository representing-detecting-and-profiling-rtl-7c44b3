// Testbench for profiler_logic together with a path_stack.
//
// It replays a small procedure whose control flow graph has six blocks:
// B1 falls into B2, B2 ends with an unconditional jump to B3, B3 branches
// to B5 (taken) or falls into B4, B4 falls into B5, B5 branches back to B2
// (taken) or falls into B6, and B6 branches forward to an exit block that
// returns. With the Ball-Larus mapping the iteration sequence
// A A A C X (A = B2,B3 not taken,B5 back; C = B2,B3 taken,B5 back;
// X = the exit) must give the paths
//   {B1,3,101} {B2,3,101} {B2,3,101} {B2,3,111} {B2,4,1001};
// with loop extension by one, A A A A A C C C X must give
//   {B1,6,101101} {B2,6,101101} {B2,6,101111} {B2,6,111111} {B2,4,1001}.
// Further scenarios: the Whole Program Path mapping, splitting at 32
// branches, stack overflow and underflow with incomplete paths, procedure
// extension, OS repair pops and a disabled profiler. Per-branch latencies
// are measured: forward 1 cycle, call 2, return 2, backward 3 when the
// consumer takes the path at once and 5 when it needs two more cycles.
module tb_profiler_logic;
  import pp_pkg::*;
  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  ppcr_t cfg;
  logic br_valid, br_ready, repair_pop, repair_ack;
  branch_rec_t br_in;
  logic st_push, st_pop, st_wr_tos, st_empty;
  stack_entry_t st_push_entry, st_tos_entry, st_tos;
  logic [2:0] depth;
  logic overflow;
  logic out_valid, out_ready;
  path_out_t out_path;
  logic ev_split, ev_extend, ev_underflow, ev_drop_incomplete;

  int checks = 0, failures = 0;
  int cons_delay = 0, wait_cnt = 0;
  path_out_t got [$];
  int n_split = 0, n_extend = 0, n_under = 0, n_drop = 0, n_over = 0;

  profiler_logic dut (.clk, .rst_n, .cfg, .br_valid, .br_in, .br_ready, .repair_pop,
    .repair_ack, .st_push, .st_push_entry, .st_pop, .st_wr_tos, .st_tos_entry, .st_tos,
    .st_empty, .out_valid, .out_path, .out_ready, .ev_split, .ev_extend, .ev_underflow,
    .ev_drop_incomplete);
  path_stack #(.DEPTH(DEPTH)) stack (.clk, .rst_n, .push(st_push), .push_entry(st_push_entry),
    .pop(st_pop), .wr_tos(st_wr_tos), .tos_entry(st_tos_entry), .tos(st_tos),
    .empty(st_empty), .depth(depth), .overflow(overflow));

  always #5 clk = ~clk;

  assign out_ready = out_valid && (wait_cnt >= cons_delay);
  always @(posedge clk) begin
    if (out_valid && !out_ready) wait_cnt <= wait_cnt + 1;
    else wait_cnt <= 0;
    if (out_valid && out_ready) got.push_back(out_path);
    if (ev_split) n_split++;
    if (ev_extend) n_extend++;
    if (ev_underflow) n_under++;
    if (ev_drop_incomplete) n_drop++;
    if (overflow) n_over++;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- branch helpers ----
  typedef enum {K_COND, K_CALL, K_RET, K_IND} kind_e;
  function automatic branch_rec_t mk(int pc, int tgt, bit tk, kind_e k, int ev);
    branch_rec_t r = '0;
    r.pc = 32'(pc); r.target = 32'(tgt); r.taken = tk;
    r.is_call = (k == K_CALL); r.is_return = (k == K_RET); r.is_indirect = (k == K_IND);
    r.events = 8'(ev);
    return r;
  endfunction

  // send one branch; returns the number of clock edges until it was taken
  task automatic send(branch_rec_t r, output int waited);
    logic acc;
    br_in = r; br_valid = 1; waited = 0;
    forever begin
      #1 acc = br_ready;
      @(posedge clk); #1;
      waited++;
      if (acc) break;
    end
    br_valid = 0;
  endtask

  task automatic idle(int n);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  // Procedure layout: block Bi starts at 'h100 + 'h10*(i-1), its branch is
  // the last word; the exit block at 'h160 returns to the caller at 'h1004.
  localparam int B1 = 'h100, B2 = 'h110, B3 = 'h120, B4 = 'h130, B5 = 'h140,
                 B6 = 'h150, BX = 'h160, CALLER = 'h1000;

  task automatic iter_a(output int lat_back);
    int w;
    send(mk(B2 + 'hC, B3, 1, K_COND, 1), w);
    send(mk(B3 + 'hC, B4, 0, K_COND, 1), w);
    send(mk(B5 + 'hC, B2, 1, K_COND, 1), w);
    lat_back = w;
  endtask
  task automatic iter_c();
    int w;
    send(mk(B2 + 'hC, B3, 1, K_COND, 1), w);
    send(mk(B3 + 'hC, B5, 1, K_COND, 1), w);
    send(mk(B5 + 'hC, B2, 1, K_COND, 1), w);
  endtask
  task automatic exit_path(output int lat_ret);
    int w;
    send(mk(B2 + 'hC, B3, 1, K_COND, 1), w);
    send(mk(B3 + 'hC, B4, 0, K_COND, 1), w);
    send(mk(B5 + 'hC, B6, 0, K_COND, 1), w);
    send(mk(B6 + 'hC, BX, 1, K_COND, 1), w);
    send(mk(BX + 4, CALLER + 4, 1, K_RET, 1), w);
    lat_ret = w;
  endtask

  function automatic path_out_t p(int start, int len, logic [31:0] dir, int evt);
    path_out_t x;
    x.desc.start = 32'(start); x.desc.len = LEN_W'(len); x.desc.dir = dir; x.evt = 8'(evt);
    return x;
  endfunction

  task automatic expect_paths(path_out_t exp [$], string tag);
    check(got.size() == exp.size(), $sformatf("%s: %0d paths, expected %0d", tag, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      check(got[i] == exp[i], $sformatf("%s path %0d: {%h,%0d,%b,ev%0d} expected {%h,%0d,%b,ev%0d}",
            tag, i, got[i].desc.start, got[i].desc.len, got[i].desc.dir, got[i].evt,
            exp[i].desc.start, exp[i].desc.len, exp[i].desc.dir, exp[i].evt));
    end
    got.delete();
  endtask

  task automatic do_reset(ppcr_t c);
    rst_n = 0; cfg = c; br_valid = 0; repair_pop = 0;
    idle(2);
    rst_n = 1;
    idle(1);
  endtask

  initial begin
    int w, lat_back, lat_ret, lat_call, lat_fwd;
    ppcr_t c;
    br_in = '0;

    // ---------- Ball-Larus paths ----------
    do_reset(PPCR_RESET);
    send(mk(CALLER, B1, 1, K_CALL, 1), w);            // caller's entry is created incomplete
    send(mk(B2 + 'hC, B3, 1, K_COND, 1), lat_call);   // measures the call
    send(mk(B3 + 'hC, B4, 0, K_COND, 1), lat_fwd);    // measures a forward branch
    send(mk(B5 + 'hC, B2, 1, K_COND, 1), w);
    iter_a(lat_back);
    send(mk(B2 + 'hC, B3, 1, K_COND, 1), w);          // measures the backward branch
    lat_back = w;
    send(mk(B3 + 'hC, B4, 0, K_COND, 1), w);
    send(mk(B5 + 'hC, B2, 1, K_COND, 1), w);
    iter_c();
    exit_path(lat_ret);
    send(mk(CALLER + 'h10, CALLER + 'h20, 1, K_COND, 0), w);   // measures the return
    lat_ret = w;
    idle(3);
    check(lat_call == 2, $sformatf("call latency %0d", lat_call));
    check(lat_fwd == 1, $sformatf("forward latency %0d", lat_fwd));
    check(lat_back == 3, $sformatf("backward latency %0d", lat_back));
    check(lat_ret == 2, $sformatf("return latency %0d", lat_ret));
    check(n_under == 1, "caller entry created as incomplete");
    // events: each branch brings one; the return adds its own to the last path
    expect_paths('{p(B1, 3, 'b101, 3), p(B2, 3, 'b101, 3), p(B2, 3, 'b101, 3),
                   p(B2, 3, 'b111, 3), p(B2, 4, 'b1001, 5)}, "BL");
    check(depth == 1 && st_tos.incomplete && st_tos.desc.len == 1, "caller entry on top");

    // slow consumer: backward branch costs 1 + (1 + 2) + 1 cycles
    cons_delay = 2;
    send(mk(CALLER + 'h20, B1, 1, K_CALL, 0), w);
    send(mk(B2 + 'hC, B3, 1, K_COND, 0), w);
    send(mk(B5 + 'hC, B2, 1, K_COND, 0), w);
    send(mk(B2 + 'hC, B3, 1, K_COND, 0), w);
    check(w == 5, $sformatf("backward latency with 2-cycle consumer %0d", w));
    cons_delay = 0;
    got.delete();

    // ---------- extended loop paths (one loop boundary) ----------
    c = PPCR_RESET; c.ext_loop = 1; c.max_ext = 1;
    do_reset(c);
    n_extend = 0;
    send(mk(CALLER, B1, 1, K_CALL, 0), w);
    send(mk(B2 + 'hC, B3, 1, K_COND, 1), w);
    send(mk(B3 + 'hC, B4, 0, K_COND, 1), w);
    send(mk(B5 + 'hC, B2, 1, K_COND, 1), w);
    repeat (4) iter_a(w);
    repeat (3) iter_c();
    exit_path(w);
    idle(3);
    expect_paths('{p(B1, 6, 'b101101, 6), p(B2, 6, 'b101101, 6), p(B2, 6, 'b101111, 6),
                   p(B2, 6, 'b111111, 6), p(B2, 4, 'b1001, 5)}, "EXT");
    check(n_extend == 4, $sformatf("loop extensions %0d", n_extend));

    // ---------- Whole Program Path sub-paths ----------
    c = PPCR_RESET; c.map = MAP_WPP;
    do_reset(c);
    send(mk('h2000, 'h2010, 0, K_COND, 0), w);        // creates incomplete entry
    send(mk('h200C, 'h3000, 1, K_CALL, 2), w);        // pops (drops incomplete), pushes 'h3000
    send(mk('h3004, 'h3010, 1, K_COND, 1), w);
    send(mk('h3010, 'h3020, 0, K_COND, 1), w);
    send(mk('h3024, 'h4000, 1, K_CALL, 1), w);        // ends {3000,2,10}, pushes 'h4000
    send(mk('h4004, 'h4010, 1, K_COND, 1), w);
    send(mk('h400C, 'h3028, 1, K_RET, 1), w);         // ends {4000,1,1}, pushes 'h3028
    send(mk('h302C, 'h3040, 1, K_COND, 1), w);
    send(mk('h3044, 'h2010, 1, K_RET, 1), w);         // ends {3028,1,1}, pushes 'h2010
    idle(3);
    expect_paths('{p('h3000, 2, 'b10, 3), p('h4000, 1, 'b1, 2), p('h3028, 1, 'b1, 2)}, "WPP");
    check(n_drop >= 1, "incomplete path dropped");
    check(depth == 1 && st_tos.desc.start == 'h2010, "WPP path after return");

    // ---------- split at 32 branches ----------
    do_reset(PPCR_RESET);
    n_split = 0;
    send(mk('h5000, 'h6000, 1, K_CALL, 0), w);
    for (int i = 0; i < 40; i++)
      send(mk('h6000 + 8*i, 'h6004 + 8*i, i % 3 == 0, K_COND, 1), w);
    send(mk('h7000, 'h5004, 1, K_RET, 0), w);
    idle(3);
    begin
      logic [31:0] d1, d2;
      d1 = '0; d2 = '0;
      for (int i = 0; i < 32; i++) d1 = {d1[30:0], 1'(i % 3 == 0)};
      for (int i = 32; i < 40; i++) d2 = {d2[30:0], 1'(i % 3 == 0)};
      expect_paths('{p('h6000, 32, d1, 32), p('h6000 + 8*31 + 4, 8, d2, 8)}, "SPLIT");
    end
    check(n_split == 1, $sformatf("splits %0d", n_split));

    // ---------- overflow, underflow, repair ----------
    do_reset(PPCR_RESET);
    n_over = 0; n_drop = 0; n_under = 0;
    for (int i = 0; i < 6; i++) begin
      send(mk('h8000 + 'h100*i, 'h8100 + 'h100*i, 1, K_CALL, 0), w);
      send(mk('h8104 + 'h100*i, 'h8110 + 'h100*i, 1, K_COND, 1), w);
    end
    check(depth == DEPTH && n_over == 3, $sformatf("overflow depth %0d overflows %0d", depth, n_over));
    for (int i = 5; i >= 0; i--)
      send(mk('h8180 + 'h100*i, 'h8004 + 'h100*i, 1, K_RET, 0), w);
    idle(3);
    // the four youngest procedures give complete paths; the last two
    // returns find an empty stack, create incomplete entries and drop them
    // (the first underflow was the caller's entry at the first call)
    check(got.size() == 4, $sformatf("paths after overflow %0d", got.size()));
    check(n_under == 3 && n_drop == 2, $sformatf("underflow %0d dropped %0d", n_under, n_drop));
    got.delete();
    send(mk('h9000, 'hA000, 1, K_CALL, 0), w);
    send(mk('hA000, 'hB000, 1, K_CALL, 0), w);
    idle(2);
    check(depth == 3, "depth before repair");
    repair_pop = 1;
    #1 check(repair_ack, "repair ack");
    @(posedge clk); @(posedge clk); #1 repair_pop = 0;
    check(depth == 1, $sformatf("depth after two repair pops %0d", depth));
    check(got.size() == 0, "repair pops emit nothing");

    // ---------- procedure extension ----------
    // the first call is made with procedure extension still off, then the
    // PPCR is switched so that the callee's path may span one call
    do_reset(PPCR_RESET);
    send(mk('hC000, 'hD000, 1, K_CALL, 0), w);        // incomplete caller, then push 'hD000
    idle(2);
    c = PPCR_RESET; c.ext_proc = 1; c.max_ext = 1;
    cfg = c;
    send(mk('hD004, 'hD010, 1, K_COND, 1), w);
    send(mk('hD014, 'hE000, 1, K_CALL, 1), w);        // extends into the callee
    send(mk('hE004, 'hE010, 0, K_COND, 1), w);
    send(mk('hE014, 'hE100, 1, K_CALL, 1), w);        // second call: limit reached, push
    send(mk('hE104, 'hE018, 1, K_RET, 1), w);         // pops {E100,0}
    send(mk('hE01C, 'hD018, 1, K_RET, 1), w);         // extended return: update
    send(mk('hD01C, 'hD000, 1, K_COND, 1), w);        // backward: ends the path
    idle(3);
    expect_paths('{p('hE100, 0, '0, 1), p('hD000, 5, 'b11011, 6)}, "PROC");

    // ---------- disabled ----------
    c = PPCR_RESET; c.enable = 0;
    do_reset(c);
    for (int i = 0; i < 5; i++) send(mk('h100 * i, 'h40, 1, K_COND, 1), w);
    idle(2);
    check(st_empty && got.size() == 0 && w == 1, "disabled profiler drains branches");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
