// path_fork: hands every path descriptor leaving the path stack to each
// consumer that is switched on (hot path table, phase detector, software
// thread port, ...).
//
// A consumer may take the descriptor in a different cycle from the others,
// so the fork remembers who has already taken the current one and offers it
// only to the rest. The producer sees in_ready once every enabled consumer
// has taken it (including any taking it in this cycle). A consumer that is
// switched off counts as having taken it.
//
// Interface: valid/ready upstream, N valid/ready pairs downstream, all
// sharing the data bus, which the producer holds stable while in_valid is
// high and in_ready low.
module path_fork #(
  parameter int N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] enable,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [N-1:0] out_valid,
  input  logic [N-1:0] out_ready
);

  logic [N-1:0] taken_q;
  logic [N-1:0] done;

  always_comb begin
    out_valid = {N{in_valid}} & enable & ~taken_q;
    done      = taken_q | ~enable | (out_valid & out_ready);
    in_ready  = &done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      taken_q <= '0;
    else if (in_valid) begin
      if (in_ready) taken_q <= '0;
      else          taken_q <= done & enable;
    end
  end

endmodule
