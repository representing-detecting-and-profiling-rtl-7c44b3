// Testbench for dcache_cost_apportion: every access pattern of four slots
// and a range of costs. A lone access is charged the full cost; with two
// or more simultaneous accesses on the two-port cache each is charged half.
module tb_dcache_cost_apportion;
  logic [3:0] access;
  logic [7:0] cost;
  logic [3:0][7:0] inc;
  int checks = 0, failures = 0;

  dcache_cost_apportion #(.SLOTS(4), .PORTS(2), .COST_W(8)) dut (
    .access(access), .access_cost(cost), .inc(inc));

  initial begin
    for (int c = 0; c < 256; c += 7) begin
      for (int a = 0; a < 16; a++) begin
        int n;
        int e;
        access = 4'(a);
        cost = 8'(c);
        #1;
        n = $countones(access);
        e = (n == 1) ? c : c / 2;
        for (int s = 0; s < 4; s++) begin
          checks++;
          if (inc[s] != (access[s] ? 8'(e) : 8'd0)) begin
            failures++;
            $display("FAIL access=%b cost=%0d slot%0d got %0d", access, c, s, inc[s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
