// branch_classifier: sorts a retiring branch into one of the five classes
// the path profiler acts on: call, return, indirect, forward or backward.
//
// Calls, returns and indirect jumps are marked by the pipeline (is_call,
// is_return, is_indirect, in that priority). Any other branch is backward
// when it was taken to an address at or below its own, which is what closes
// a loop iteration; every other branch, including a not-taken conditional
// branch whatever its target, is forward. Treating a not-taken backward
// branch as forward is this implementation's reading: the loop exit then
// continues the current path, as in the published example where the loop
// exit branch's 0 is part of the path that follows the loop.
//
// Purely combinational.
module branch_classifier
  import pp_pkg::*;
(
  input  branch_rec_t br,
  output br_type_e    br_type
);

  always_comb begin
    if (br.is_call)
      br_type = BR_CALL;
    else if (br.is_return)
      br_type = BR_RETURN;
    else if (br.is_indirect)
      br_type = BR_INDIRECT;
    else if (br.taken && (br.target <= br.pc))
      br_type = BR_BACKWARD;
    else
      br_type = BR_FORWARD;
  end

endmodule
