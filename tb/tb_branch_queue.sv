// Testbench for branch_queue: random traffic at both ends against a
// reference queue. Checks order, data, the full and empty flags, the
// occupancy count and that the queue holds exactly DEPTH entries.
module tb_branch_queue;
  import pp_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  branch_rec_t in_rec, out_rec;
  logic [2:0] occupancy;
  int checks = 0, failures = 0;
  branch_rec_t model [$];
  int n_full = 0, max_occ = 0;

  branch_queue #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_rec, .in_ready,
    .out_valid, .out_rec, .out_ready, .occupancy);
  always #5 clk = ~clk;

  initial begin
    in_valid = 0; out_ready = 0; in_rec = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int bias;
      bias = (cyc / 500) % 2;   // alternate fill-heavy and drain-heavy phases
      if (!in_valid) begin
        in_rec = '0;
        in_rec.pc = $urandom;
        in_rec.target = $urandom;
        in_rec.events = 8'($urandom);
        in_valid = ($urandom_range(3, 0) < (bias ? 3 : 1));
      end
      out_ready = ($urandom_range(3, 0) < (bias ? 1 : 3));
      #1;
      checks++;
      if (occupancy != 3'(model.size()) || in_ready != (model.size() < DEPTH) ||
          out_valid != (model.size() > 0)) begin
        failures++;
        $display("FAIL flags occ %0d model %0d cyc %0d t %0t", occupancy, model.size(), cyc, $time);
      end
      if (out_valid) begin
        checks++;
        if (out_rec != model[0]) begin failures++; $display("FAIL data"); end
      end
      if (!in_ready) n_full++;
      if (model.size() > max_occ) max_occ = model.size();
      begin
        logic did_rd, did_wr;
        did_rd = out_valid && out_ready;
        did_wr = in_valid && in_ready;
        @(posedge clk); #1;
        if (did_rd) void'(model.pop_front());
        if (did_wr) begin model.push_back(in_rec); in_valid = 0; end
      end
    end
    checks++;
    if (n_full == 0 || max_occ != DEPTH) begin failures++; $display("FAIL never full"); end
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
