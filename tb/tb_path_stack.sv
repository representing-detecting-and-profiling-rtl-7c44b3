// Testbench for path_stack: random push, pop and top-of-stack writes
// against a reference stack that drops its bottom entry when a push finds
// it full. Checks the top entry, depth, empty and overflow every cycle.
module tb_path_stack;
  import pp_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, wr_tos, empty, overflow;
  stack_entry_t push_entry, tos_entry, tos;
  logic [3:0] depth;
  int checks = 0, failures = 0;
  stack_entry_t model [$];
  int n_over = 0;

  path_stack #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .push_entry, .pop, .wr_tos,
    .tos_entry, .tos, .empty, .depth, .overflow);
  always #5 clk = ~clk;

  function automatic stack_entry_t rnd_entry();
    stack_entry_t e;
    e.desc.start = $urandom;
    e.desc.len = LEN_W'($urandom_range(MAX_LEN, 0));
    e.desc.dir = $urandom;
    e.evt = 8'($urandom);
    e.ext = 2'($urandom);
    e.incomplete = 1'($urandom);
    return e;
  endfunction

  initial begin
    push = 0; pop = 0; wr_tos = 0; push_entry = '0; tos_entry = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int r;
      int pp;
      pp = ((cyc / 300) % 2) ? 6 : 3;   // phases that grow or shrink the stack
      r = $urandom_range(9, 0);
      push = 0; pop = 0; wr_tos = 0;
      if (r < pp) push = 1;
      else if (r < 8) pop = 1;
      else wr_tos = 1;
      push_entry = rnd_entry();
      tos_entry = rnd_entry();
      #1;
      checks++;
      if (empty != (model.size() == 0) || depth != 4'(model.size()) ||
          overflow != (push && model.size() == DEPTH)) begin
        failures++; $display("FAIL flags depth %0d model %0d", depth, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (tos != model[$]) begin failures++; $display("FAIL tos cyc %0d", cyc); end
      end
      @(posedge clk);
      if (push) begin
        if (model.size() == DEPTH) begin void'(model.pop_front()); n_over++; end
        model.push_back(push_entry);
      end else if (pop) begin
        if (model.size() > 0) void'(model.pop_back());
      end else if (wr_tos && model.size() > 0) begin
        model[model.size()-1] = tos_entry;
      end
      #1;
    end
    checks++;
    if (n_over == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
