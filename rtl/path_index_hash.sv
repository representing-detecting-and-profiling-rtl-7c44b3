// path_index_hash: index function of the hot path table and of the phase
// detector's accumulator array.
//
// The index mixes the three fields of a path descriptor: bits of the start
// address, the path length and the direction bits are XORed together. Using
// all three spreads paths that share a start address far better than the
// address and direction bits alone. The published design gives the fields
// and the XOR; how they are folded is this implementation's choice: the two
// low address bits (always zero for aligned instructions) are dropped, then
// the address, the direction bits and the length are each cut into IDX_W-bit
// slices and all slices are XORed.
//
// Purely combinational.
module path_index_hash
  import pp_pkg::*;
#(
  parameter int IDX_W = 7
) (
  input  path_desc_t        desc,
  output logic [IDX_W-1:0]  idx
);

  localparam int AW = ADDR_W - 2;
  localparam int NA = (AW + IDX_W - 1) / IDX_W;
  localparam int ND = (MAX_LEN + IDX_W - 1) / IDX_W;
  localparam int NL = (LEN_W + IDX_W - 1) / IDX_W;

  logic [NA*IDX_W-1:0] a_ext;
  logic [ND*IDX_W-1:0] d_ext;
  logic [NL*IDX_W-1:0] l_ext;

  always_comb begin
    a_ext = (NA*IDX_W)'(desc.start[ADDR_W-1:2]);
    d_ext = (ND*IDX_W)'(desc.dir);
    l_ext = (NL*IDX_W)'(desc.len);
    idx   = '0;
    for (int i = 0; i < NA; i++) idx ^= a_ext[i*IDX_W +: IDX_W];
    for (int i = 0; i < ND; i++) idx ^= d_ext[i*IDX_W +: IDX_W];
    for (int i = 0; i < NL; i++) idx ^= l_ext[i*IDX_W +: IDX_W];
  end

endmodule
