// Testbench for path_index_hash: compares with a bit-by-bit reference in
// which bit k of each field lands in index bit (k mod IDX_W), and checks
// that changing any one of the three fields alone changes the index.
module tb_path_index_hash;
  import pp_pkg::*;
  localparam int W = 7;
  path_desc_t d;
  logic [W-1:0] idx;
  int checks = 0, failures = 0;

  path_index_hash #(.IDX_W(W)) dut (.desc(d), .idx(idx));

  function automatic logic [W-1:0] ref_idx(path_desc_t x);
    logic [W-1:0] r = '0;
    for (int k = 2; k < ADDR_W; k++) r[(k-2) % W] ^= x.start[k];
    for (int k = 0; k < MAX_LEN; k++) r[k % W] ^= x.dir[k];
    for (int k = 0; k < LEN_W; k++)   r[k % W] ^= x.len[k];
    return r;
  endfunction

  initial begin
    logic [W-1:0] i0;
    for (int i = 0; i < 3000; i++) begin
      d.start = $urandom;
      d.len   = LEN_W'($urandom_range(MAX_LEN, 0));
      d.dir   = $urandom;
      #1;
      checks++;
      if (idx !== ref_idx(d)) begin
        failures++;
        $display("FAIL %h %0d %h: %h vs %h", d.start, d.len, d.dir, idx, ref_idx(d));
      end
    end
    // each field matters
    d = '0; d.start = 32'h1000; d.len = 3; d.dir = 32'b101; #1; i0 = idx;
    d.len = 4; #1; checks++; if (idx == i0) failures++;
    d.len = 3; d.dir = 32'b111; #1; checks++; if (idx == i0) failures++;
    d.dir = 32'b101; d.start = 32'h1004; #1; checks++; if (idx == i0) failures++;
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
