// me_term: termination detector of the distortion calculation stage.
// Implements the halfway termination of partial distortion elimination: as
// soon as the partial (rate-biased) SAD accumulated for the candidate in
// progress reaches the smallest complete cost found so far, the candidate
// cannot win, and `terminate` tells the address generator to stop and the
// accumulator to drop it. Combinational; the comparison uses the registered
// partial sum, so a termination takes effect one read after the row that
// caused it.
module me_term
  import me_pkg::*;
(
  input  logic            active,
  input  logic [SADW-1:0] partial,
  input  logic [SADW-1:0] min_cost,
  output logic            terminate
);
  assign terminate = active && (partial >= min_cost);
endmodule
