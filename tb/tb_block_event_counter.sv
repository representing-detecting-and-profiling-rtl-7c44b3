// Testbench for block_event_counter: random commit groups, some ending in
// a branch, with the queue randomly refusing. A reference sum of the
// per-instruction counts (or of the instructions in counting mode) since
// the last accepted branch must travel with each branch; a refused group
// must leave the counter unchanged and raise stall.
module tb_block_event_counter;
  import pp_pkg::*;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic count_instr;
  logic [W-1:0] slot_valid;
  logic [W-1:0][EVT_W-1:0] slot_evt;
  logic br_valid, enq_valid, enq_ready, stall;
  branch_rec_t br, enq_rec;
  int checks = 0, failures = 0;
  int ref_acc = 0;
  int n_stall = 0, n_sat = 0;

  block_event_counter #(.WIDTH(W)) dut (.clk, .rst_n, .count_instr, .slot_valid,
    .slot_evt, .br_valid, .br, .enq_valid, .enq_rec, .enq_ready, .stall);
  always #5 clk = ~clk;

  initial begin
    count_instr = 0; slot_valid = 0; slot_evt = '0; br_valid = 0; br = '0; enq_ready = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int grp;
      if (cyc == 2000) begin
        // switch mode only right after a branch so the reference stays simple
        count_instr = 1;
      end
      slot_valid = 4'($urandom);
      for (int i = 0; i < W; i++)
        slot_evt[i] = (cyc % 500 < 20) ? 8'($urandom_range(255, 100)) : 8'($urandom_range(3, 0));
      br_valid  = ($urandom_range(3, 0) == 0) && (slot_valid != 0);
      br        = '0;
      br.pc     = $urandom;
      br.events = 8'hAA;
      enq_ready = ($urandom_range(4, 0) != 0);
      grp = 0;
      for (int i = 0; i < W; i++)
        if (slot_valid[i]) grp += count_instr ? 1 : int'(slot_evt[i]);
      #1;
      if (br_valid) begin
        int e;
        e = ref_acc + grp;
        if (e > 255) begin e = 255; n_sat++; end
        checks++;
        if (!enq_valid || enq_rec.events != 8'(e) || enq_rec.pc != br.pc || stall != !enq_ready) begin
          failures++;
          $display("FAIL cyc %0d events %0d expected %0d stall %b", cyc, enq_rec.events, e, stall);
        end
        if (enq_ready) ref_acc = 0;
        else n_stall++;
      end else begin
        checks++;
        if (enq_valid || stall) begin failures++; $display("FAIL spurious enq"); end
        ref_acc = ref_acc + grp;
        if (ref_acc > 255) ref_acc = 255;
      end
      @(posedge clk); #1;
      if (cyc == 1999) begin
        // flush the accumulated count with an accepted branch
        slot_valid = 0; br_valid = 1; enq_ready = 1; #1;
        checks++;
        if (enq_rec.events != 8'(ref_acc)) begin failures++; $display("FAIL flush"); end
        ref_acc = 0;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (n_stall == 0 || n_sat == 0) begin failures++; $display("FAIL stall %0d sat %0d", n_stall, n_sat); end
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
