// repc_match_unit: matching unit of the REPC classifier.
//
// Gathers the per-rule results: cls[r] is rule r's classified output
// {Mvlan, Mudp, Mdp, Msp, Mda, Msa} and hit[r] says that all six fields
// matched and the rule is valid. The unit forms the rule match bit-vector,
// qualified by in_valid and by the header extractor's ok flag, and reports
// the lowest-numbered matching rule (rule 0 has the highest priority).
// The priority order is this design's choice.
//
// Timing: combinational. It sits behind the registered matcher outputs, so
// out_valid follows in_valid in the same cycle.
module repc_match_unit #(
  parameter int unsigned NUM_RULES = 16
) (
  input  logic                          in_valid,
  input  logic                          in_ok,
  input  logic [NUM_RULES-1:0]          hit,
  output logic                          out_valid,
  output logic [NUM_RULES-1:0]          match_vec,
  output logic                          any_match,
  output logic [$clog2(NUM_RULES)-1:0]  best_rule
);

  assign out_valid = in_valid;
  assign match_vec = (in_valid && in_ok) ? hit : '0;
  assign any_match = |match_vec;

  always_comb begin
    best_rule = '0;
    for (int r = int'(NUM_RULES) - 1; r >= 0; r--)
      if (match_vec[r]) best_rule = r[$clog2(NUM_RULES)-1:0];
  end

endmodule
