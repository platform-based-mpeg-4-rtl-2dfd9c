// me_range_check: range checker of the pattern generation stage.
// A candidate is valid when both motion vector components lie inside the
// search range, -16..+15 integer pixels by default, so that every pixel it
// needs is inside the 48x48 search window. Purely combinational.
module me_range_check
  import me_pkg::*;
#(
  parameter int MV_MIN = -SR,
  parameter int MV_MAX = SR - 1
) (
  input  cand_t cand,
  output logic  valid
);
  assign valid = (int'(cand.u) >= MV_MIN) && (int'(cand.u) <= MV_MAX) &&
                 (int'(cand.v) >= MV_MIN) && (int'(cand.v) <= MV_MAX);
endmodule
