// phase_detector: detects changes of program phase from the stream of
// acyclic intra-procedural paths and their instruction counts.
//
// An array of N_ACC accumulators is indexed by a hash of each incoming path
// descriptor (the same XOR fold as the hot path table) and the indexed
// accumulator adds the path's instruction count. Once the instructions seen
// in the current interval reach interval_len, the interval ends: the top
// SIG_W bits of every accumulator (the path-wise instruction distribution,
// coarsened) are latched as the interval's signature and all accumulators
// restart from zero. In the next cycle the Manhattan distance between this
// signature and the previous interval's is formed, scaled back to
// instructions, and compared with threshold: a distance at or above the
// threshold is a phase change, below it the two intervals belong to the
// same phase. The first interval after reset has no predecessor and never
// reports a change.
//
// The accumulator array, the high-order-bit signatures and the Manhattan
// distance against a threshold follow the published detector, as does the
// default operating threshold of 6 million instructions, which the
// testbenches program through the threshold input. The number and width of
// the accumulators, the signature width and the interval length are this
// implementation's choices (32 x 24 bits, 8-bit signatures, interval
// programmed through interval_len).
//
// Timing: in_ready is always high, one path per cycle. interval_end pulses
// in the cycle after the path that closed the interval; result_valid,
// phase_change and distance follow one cycle later. Accumulators saturate.
module phase_detector
  import pp_pkg::*;
#(
  parameter int N_ACC = 32,
  parameter int ACC_W = 24,
  parameter int SIG_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  path_desc_t        in_desc,
  input  logic [EVT_W-1:0]  in_count,
  output logic              in_ready,
  input  logic [31:0]       interval_len,
  input  logic [31:0]       threshold,
  output logic              interval_end,
  output logic              result_valid,
  output logic              phase_change,
  output logic [31:0]       distance
);

  localparam int IDX_W  = $clog2(N_ACC);
  localparam int DROP   = ACC_W - SIG_W;
  localparam int DIST_W = SIG_W + IDX_W + 1;

  logic [ACC_W-1:0] acc_q  [N_ACC];
  logic [SIG_W-1:0] sig_q  [N_ACC];
  logic [SIG_W-1:0] prev_q [N_ACC];
  logic [31:0]      total_q;
  logic             cmp_q, have_prev_q;

  logic [IDX_W-1:0] idx;
  logic [32:0]      total_next;
  logic             accept, end_now;
  logic [ACC_W-1:0] acc_next [N_ACC];
  logic [DIST_W-1:0] mdist;
  logic [31:0]      dist_instr;

  path_index_hash #(.IDX_W(IDX_W)) u_hash (.desc(in_desc), .idx(idx));

  always_comb begin
    in_ready   = 1'b1;
    accept     = in_valid;
    total_next = {1'b0, total_q} + 33'(in_count);
    end_now    = accept && (total_next >= {1'b0, interval_len});
    for (int i = 0; i < N_ACC; i++) begin
      logic [ACC_W:0] s;
      s = {1'b0, acc_q[i]} + ((accept && idx == IDX_W'(i)) ? (ACC_W+1)'(in_count) : '0);
      acc_next[i] = s[ACC_W] ? '1 : s[ACC_W-1:0];
    end
    mdist = '0;
    for (int i = 0; i < N_ACC; i++)
      mdist += (sig_q[i] >= prev_q[i]) ? DIST_W'(sig_q[i] - prev_q[i])
                                      : DIST_W'(prev_q[i] - sig_q[i]);
    dist_instr = 32'(mdist) << DROP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total_q      <= '0;
      cmp_q        <= 1'b0;
      have_prev_q  <= 1'b0;
      interval_end <= 1'b0;
      result_valid <= 1'b0;
      phase_change <= 1'b0;
      distance     <= '0;
      for (int i = 0; i < N_ACC; i++) begin
        acc_q[i]  <= '0;
        sig_q[i]  <= '0;
        prev_q[i] <= '0;
      end
    end else begin
      interval_end <= end_now;
      cmp_q        <= end_now;
      result_valid <= cmp_q;
      if (end_now) begin
        total_q <= '0;
        for (int i = 0; i < N_ACC; i++) begin
          sig_q[i] <= acc_next[i][ACC_W-1 -: SIG_W];
          acc_q[i] <= '0;
        end
      end else if (accept) begin
        total_q <= total_next[31:0];
        for (int i = 0; i < N_ACC; i++) acc_q[i] <= acc_next[i];
      end
      if (cmp_q) begin
        distance     <= dist_instr;
        phase_change <= have_prev_q && (dist_instr >= threshold);
        have_prev_q  <= 1'b1;
        for (int i = 0; i < N_ACC; i++) prev_q[i] <= sig_q[i];
      end
    end
  end

endmodule
