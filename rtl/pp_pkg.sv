// pp_pkg: types and constants shared by the hardware path profiler.
//
// A path is named by a path descriptor: the address of its first
// instruction, the number of branches on it (0..MAX_LEN) and one direction
// bit per branch (1 = taken). Direction bits are shifted in at bit 0, so the
// first branch of a path of length L sits in bit L-1; a path printed as
// "101" with length 3 is dir = 3'b101. The 32-branch limit and the 8-bit
// path event counter follow the published design; the 32-bit address and
// the 2-bit extension counter ("typically 1-3 bits") are choices of this
// implementation.
//
// The path profiler control register (PPCR) holds, per branch type, which
// of the four path stack operations run: update, update-count, pop, push.
// They always run in that order. The two mappings below are the ones that
// detect acyclic intra-procedural (Ball-Larus) paths and the sub-paths of a
// Whole Program Path.
package pp_pkg;

  localparam int ADDR_W  = 32;                 // instruction address width
  localparam int MAX_LEN = 32;                 // branches per path descriptor
  localparam int LEN_W   = $clog2(MAX_LEN + 1);
  localparam int EVT_W   = 8;                  // path / block event counter
  localparam int EXT_W   = 2;                  // path extension counter
  localparam int NUM_BR_TYPES = 5;

  typedef enum logic [2:0] {
    BR_CALL     = 3'd0,
    BR_RETURN   = 3'd1,
    BR_FORWARD  = 3'd2,
    BR_BACKWARD = 3'd3,
    BR_INDIRECT = 3'd4
  } br_type_e;

  // Operations for one branch type.
  typedef struct packed {
    logic update;        // append branch to top-of-stack path, add events
    logic update_count;  // add events only
    logic pop;           // emit and remove top-of-stack path
    logic push;          // new path starting at the branch target
  } br_ops_t;

  typedef br_ops_t [NUM_BR_TYPES-1:0] br_map_t;   // indexed by br_type_e

  typedef struct packed {
    logic [ADDR_W-1:0]  start;
    logic [LEN_W-1:0]   len;
    logic [MAX_LEN-1:0] dir;
  } path_desc_t;

  localparam int DESC_W = $bits(path_desc_t);

  typedef struct packed {
    path_desc_t       desc;
    logic [EVT_W-1:0] evt;
    logic [EXT_W-1:0] ext;
    logic             incomplete;  // start of path was lost (stack underflow)
  } stack_entry_t;

  // A path leaving the path stack, with its event count.
  typedef struct packed {
    path_desc_t       desc;
    logic [EVT_W-1:0] evt;
  } path_out_t;

  // One retiring branch as delivered by the commit stage.
  typedef struct packed {
    logic [ADDR_W-1:0] pc;
    logic [ADDR_W-1:0] target;     // next fetch address (fall-through if not taken)
    logic              taken;
    logic              is_call;
    logic              is_return;
    logic              is_indirect;
    logic [EVT_W-1:0]  events;     // block event count
  } branch_rec_t;

  typedef struct packed {
    logic             enable;      // profiler consumes branches
    br_map_t          map;         // branch type -> operations
    logic             ext_loop;    // paths may span backward branches
    logic             ext_proc;    // paths may span calls / returns
    logic [EXT_W-1:0] max_ext;     // maximum extension count
    logic             count_instr; // block event counter counts instructions
    logic             hpt_events;  // HPT accumulates event counts (else 1 per path)
  } ppcr_t;

  // Table 1: Ball-Larus paths.  {update, update_count, pop, push}
  localparam br_map_t MAP_BL = '{
    BR_INDIRECT: 4'b1011,
    BR_BACKWARD: 4'b1011,
    BR_FORWARD:  4'b1000,
    BR_RETURN:   4'b0110,
    BR_CALL:     4'b0101
  };

  // Table 2: sub-paths of a Whole Program Path.
  localparam br_map_t MAP_WPP = '{
    BR_INDIRECT: 4'b1011,
    BR_BACKWARD: 4'b1011,
    BR_FORWARD:  4'b1000,
    BR_RETURN:   4'b0111,
    BR_CALL:     4'b0111
  };

  localparam ppcr_t PPCR_RESET = '{
    enable:      1'b1,
    map:         MAP_BL,
    ext_loop:    1'b0,
    ext_proc:    1'b0,
    max_ext:     '0,
    count_instr: 1'b1,
    hpt_events:  1'b0
  };

  function automatic logic [EVT_W-1:0] sat_add_evt(logic [EVT_W-1:0] a,
                                                   logic [EVT_W-1:0] b);
    logic [EVT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[EVT_W] ? '1 : s[EVT_W-1:0];
  endfunction

endpackage
