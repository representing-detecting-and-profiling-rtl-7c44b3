// Testbench for ppcr: reset value (Ball-Larus mapping), a write of the
// Whole Program Path mapping, and the rule that update wins over
// update-count when both are requested.
module tb_ppcr;
  import pp_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  ppcr_t wr_data, cfg;
  int checks = 0, failures = 0;

  ppcr dut (.clk, .rst_n, .wr_en, .wr_data, .cfg);
  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // Table 1 rows: call {0,1,0,1}, return {0,1,1,0}, forward {1,0,0,0},
    // backward {1,0,1,1}, indirect {1,0,1,1}
    check(cfg.map[BR_CALL]     == 4'b0101, "reset call");
    check(cfg.map[BR_RETURN]   == 4'b0110, "reset return");
    check(cfg.map[BR_FORWARD]  == 4'b1000, "reset forward");
    check(cfg.map[BR_BACKWARD] == 4'b1011, "reset backward");
    check(cfg.map[BR_INDIRECT] == 4'b1011, "reset indirect");
    check(cfg.enable && cfg.count_instr && !cfg.ext_loop && !cfg.ext_proc, "reset flags");
    // Table 2
    wr_data = PPCR_RESET;
    wr_data.map[BR_CALL]   = 4'b0111;
    wr_data.map[BR_RETURN] = 4'b0111;
    wr_data.ext_loop = 1'b1;
    wr_data.max_ext  = 2'd1;
    wr_en = 1;
    @(posedge clk); #1 wr_en = 0;
    check(cfg.map[BR_CALL] == 4'b0111 && cfg.map[BR_RETURN] == 4'b0111, "wpp call/return");
    check(cfg.ext_loop && cfg.max_ext == 2'd1, "extension fields");
    // illegal: update and update-count together
    wr_data.map[BR_FORWARD] = 4'b1100;
    wr_data.map[BR_CALL]    = 4'b1101;
    @(posedge clk); #1;
    check(cfg.map[BR_FORWARD] == 4'b1000, "no write without wr_en");
    wr_en = 1;
    @(posedge clk); #1 wr_en = 0;
    check(cfg.map[BR_FORWARD] == 4'b1000, "update wins over update-count (forward)");
    check(cfg.map[BR_CALL] == 4'b1001, "update wins over update-count (call)");
    wr_data.map[BR_FORWARD] = 4'b0100;
    wr_en = 1;
    @(posedge clk); #1 wr_en = 0;
    check(cfg.map[BR_FORWARD] == 4'b0100, "update-count alone kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
