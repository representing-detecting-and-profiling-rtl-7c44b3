// dcache_cost_apportion: shares the relative power cost of L1 data cache
// accesses among the instructions that made them in the same cycle.
//
// The cache's power model charges one access-cost unit per cycle while at
// most PORTS accesses are made, and proportionally more when accesses
// exceed the ports. Apportioned per instruction this is:
//   one access                 -> the full access cost
//   k accesses, k >= 2         -> access cost / min(k, PORTS)
// With two ports (the published configuration) that is the full cost for a
// lone access and half the cost otherwise. The result is added to the event
// counter of each accessing instruction, so that path profiles can carry a
// power estimate. The cost itself is a technology constant computed
// offline; here it is an input so it can be programmed.
//
// Interface: access[i] marks an instruction slot accessing the dcache this
// cycle; inc[i] is what that slot's event counter must add (0 for slots not
// accessing). Purely combinational; division truncates.
module dcache_cost_apportion #(
  parameter int SLOTS  = 4,
  parameter int PORTS  = 2,
  parameter int COST_W = 8
) (
  input  logic [SLOTS-1:0]             access,
  input  logic [COST_W-1:0]            access_cost,
  output logic [SLOTS-1:0][COST_W-1:0] inc
);

  localparam int CW = $clog2(SLOTS + 1);

  logic [CW-1:0]     num;
  logic [CW-1:0]     share;
  logic [COST_W-1:0] per_instr;

  always_comb begin
    num = '0;
    for (int i = 0; i < SLOTS; i++) num += CW'(access[i]);
    share = (num > CW'(PORTS)) ? CW'(PORTS) : num;
    per_instr = (share == '0) ? '0 : access_cost / COST_W'(share);
    for (int i = 0; i < SLOTS; i++) inc[i] = access[i] ? per_instr : '0;
  end

endmodule
