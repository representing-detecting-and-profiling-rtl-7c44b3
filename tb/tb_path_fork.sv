// Testbench for path_fork: a numbered stream is forked to three consumers
// that accept at random times, one of them switched off for a while. Every
// enabled consumer must see every item exactly once and in order, and the
// producer may only advance once all enabled consumers have the item.
module tb_path_fork;
  logic clk = 0, rst_n = 0;
  logic [2:0] enable, out_valid, out_ready;
  logic in_valid, in_ready;
  logic [15:0] data;
  int checks = 0, failures = 0;
  int expect_next [3];
  int got [3];
  int cycles = 0;

  path_fork #(.N(3)) dut (.clk, .rst_n, .enable, .in_valid, .in_ready,
                          .out_valid, .out_ready);
  always #5 clk = ~clk;

  initial begin
    enable = 3'b111; in_valid = 0; data = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      if (n == 200) enable = 3'b101;
      if (n == 300) enable = 3'b111;
      data = 16'(n);
      in_valid = 1;
      forever begin
        out_ready = 3'($urandom);
        #1;
        for (int c = 0; c < 3; c++) begin
          if (out_valid[c] && out_ready[c]) begin
            checks++;
            if (int'(data) != expect_next[c] || !enable[c]) begin
              failures++;
              $display("FAIL consumer %0d got %0d expected %0d", c, data, expect_next[c]);
            end
            expect_next[c]++;
            got[c]++;
          end
        end
        if (in_ready) begin
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (enable[c] && expect_next[c] != n + 1) begin
              failures++; $display("FAIL item %0d released before consumer %0d", n, c);
            end
            if (!enable[c]) expect_next[c] = n + 1;
          end
          @(posedge clk); #1;
          break;
        end
        @(posedge clk); #1;
      end
      in_valid = 0;
      if ($urandom_range(3, 0) == 0) begin @(posedge clk); #1; end
    end
    checks++;
    if (got[0] != 400 || got[1] != 300 || got[2] != 400) begin
      failures++; $display("FAIL counts %0d %0d %0d", got[0], got[1], got[2]);
    end
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
