// ppcr: the path profiler control register.
//
// Software programs it to choose which kind of path the profiler detects
// and which metric it counts: the operations run for each branch type
// (update, update-count, pop, push), whether paths may be extended across
// loop back-edges or procedure calls and by how many, whether the block
// event counter counts instructions or architectural events, and whether
// the hot path table accumulates those events or path frequencies.
//
// The published design allows only one of update and update-count for a
// branch type. A write that sets both keeps update and clears update-count,
// so the register never holds an illegal mapping. It resets to the
// Ball-Larus mapping with instruction counting, profiler enabled.
//
// Interface: wr_en/wr_data write the whole register on the clock edge;
// cfg is the registered value.
module ppcr
  import pp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  ppcr_t wr_data,
  output ppcr_t cfg
);

  ppcr_t legal;

  always_comb begin
    legal = wr_data;
    for (int t = 0; t < NUM_BR_TYPES; t++) begin
      if (wr_data.map[t].update) legal.map[t].update_count = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cfg <= PPCR_RESET;
    else if (wr_en) cfg <= legal;
  end

endmodule
