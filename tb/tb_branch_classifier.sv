// Testbench for branch_classifier: random branch records, each class
// predicted from the record's flags and the sign of (target - pc).
module tb_branch_classifier;
  import pp_pkg::*;
  branch_rec_t br;
  br_type_e    t;
  int checks = 0, failures = 0;
  int seen [5];

  branch_classifier dut (.br(br), .br_type(t));

  function automatic br_type_e expect_type(branch_rec_t b);
    if (b.is_call) return BR_CALL;
    if (b.is_return) return BR_RETURN;
    if (b.is_indirect) return BR_INDIRECT;
    if (b.taken && $signed({1'b0, b.target}) - $signed({1'b0, b.pc}) <= 0) return BR_BACKWARD;
    return BR_FORWARD;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      br = '0;
      br.pc = $urandom_range(1000, 0) * 4;
      br.target = (i % 7 == 0) ? br.pc : $urandom_range(1000, 0) * 4;
      br.taken = $urandom_range(1, 0);
      br.is_call = ($urandom_range(9, 0) == 0);
      br.is_return = ($urandom_range(9, 0) == 0);
      br.is_indirect = ($urandom_range(9, 0) == 0);
      #1;
      checks++;
      seen[int'(t)]++;
      if (t !== expect_type(br)) begin
        failures++;
        $display("FAIL pc=%h tgt=%h tk=%b got %s", br.pc, br.target, br.taken, t.name());
      end
    end
    // a not-taken branch to a lower address continues the path (forward)
    br = '0; br.pc = 32'h100; br.target = 32'h80; br.taken = 1'b0; #1;
    checks++; if (t != BR_FORWARD) failures++;
    br.taken = 1'b1; #1;
    checks++; if (t != BR_BACKWARD) failures++;
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL class %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
