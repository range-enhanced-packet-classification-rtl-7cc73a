// repc_rule_match: classifier of one REPC rule.
//
// The four range fields are matched by the shared field units, which give
// one bit per table entry; this rule picks, for each field, the bit of the
// entry its index names. The control matcher checks the VLAN ID and the
// protocol against the rule. The six results form the rule's classified
// output
//   cls = {Mvlan, Mudp, Mdp, Msp, Mda, Msa}
// and hit is their AND, qualified by the rule's valid bit.
//
// Timing: the packet fields and the rule are sampled at a rising edge, at
// the same edge as the field units sample the packet; cls and hit are
// valid two cycles later. The rule's indices and valid bit travel through
// two registers beside the range matchers, so a rule rewritten while
// packets are in flight is applied consistently to each packet.
module repc_rule_match #(
  parameter int unsigned NUM_RANGES = repc_pkg::NUM_RANGES
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  repc_pkg::hdr_fields_t        fields,
  input  repc_pkg::rule_t              rule,
  input  logic [NUM_RANGES-1:0]        sa_match,
  input  logic [NUM_RANGES-1:0]        da_match,
  input  logic [NUM_RANGES-1:0]        sp_match,
  input  logic [NUM_RANGES-1:0]        dp_match,
  output logic [repc_pkg::CLS_W-1:0]   cls,
  output logic                         hit
);
  import repc_pkg::*;

  typedef struct packed {
    logic              valid;
    logic [RIDX_W-1:0] sa_idx, da_idx, sp_idx, dp_idx;
  } sel_t;

  sel_t sel_q [2];

  repc_ctrl_match u_ctrl (
    .clk, .rst_n,
    .vlan_present  (fields.vlan_present),
    .vlan          (fields.vlan),
    .proto         (fields.proto),
    .rule_vlan     (rule.vlan),
    .rule_vlan_any (rule.vlan_any),
    .rule_proto    (rule.proto),
    .rule_proto_any(rule.proto_any),
    .m_vlan        (cls[CLS_VLAN]),
    .m_udp         (cls[CLS_UDP]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q[0] <= '0;
      sel_q[1] <= '0;
    end else begin
      sel_q[0] <= '{valid: rule.valid, sa_idx: rule.sa_idx, da_idx: rule.da_idx,
                    sp_idx: rule.sp_idx, dp_idx: rule.dp_idx};
      sel_q[1] <= sel_q[0];
    end
  end

  // An index past the table end selects nothing
  function automatic logic pick(input logic [NUM_RANGES-1:0] m, input logic [RIDX_W-1:0] i);
    return (int'(i) < int'(NUM_RANGES)) ? m[i] : 1'b0;
  endfunction

  assign cls[CLS_SA] = pick(sa_match, sel_q[1].sa_idx);
  assign cls[CLS_DA] = pick(da_match, sel_q[1].da_idx);
  assign cls[CLS_SP] = pick(sp_match, sel_q[1].sp_idx);
  assign cls[CLS_DP] = pick(dp_match, sel_q[1].dp_idx);

  assign hit = sel_q[1].valid & (&cls);

endmodule
