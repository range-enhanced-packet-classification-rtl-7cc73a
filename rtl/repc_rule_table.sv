// repc_rule_table: rule store of the REPC classifier.
//
// Holds NUM_RULES rules in registers so that every rule's matcher reads its
// rule in parallel each cycle. A rule does not hold its ranges: it names,
// for each of the four range fields, an entry of that field's range table
// (see repc_field_unit), and holds the VLAN ID and protocol with their
// wildcard bits, 39 bits in all. Rules are written whole through a simple
// write port (wr_en, wr_addr, wr_rule). Reset clears every rule, so no rule
// is valid after reset.
// Storing the rules as precomputed entries follows the REPC description;
// the register-file organisation and the write port are this design's
// choices.
//
// Timing: a write at a rising edge is visible on rules[] right after it.
module repc_rule_table #(
  parameter int unsigned NUM_RULES = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [$clog2(NUM_RULES)-1:0]  wr_addr,
  input  repc_pkg::rule_t               wr_rule,
  output repc_pkg::rule_t               rules [NUM_RULES]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < NUM_RULES; r++) rules[r] <= '0;
    end else if (wr_en) begin
      rules[wr_addr] <= wr_rule;
    end
  end

  initial begin
    assert (NUM_RULES >= 2) else $error("repc_rule_table: at least two rules");
  end

endmodule
