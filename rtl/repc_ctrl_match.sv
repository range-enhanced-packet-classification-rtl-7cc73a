// repc_ctrl_match: control-field matcher of one REPC rule.
//
// Gives the two control bits of the classified output: Mvlan, the packet's
// VLAN ID equals the rule's VLAN ID, and Mudp, the packet's IP protocol
// number equals the rule's protocol (17 selects UDP, 6 TCP). Each field has
// a wildcard bit in the rule that makes it match any packet; an untagged
// packet matches only a VLAN wildcard. The REPC design matches these fields
// "by initializing proper protocol specifications"; the exact-value-plus-
// wildcard encoding is this design's choice.
//
// Timing: two register stages (compare, then hold), so that Mvlan and Mudp
// line up with the RBVE range matchers, whose match also appears two cycles
// after the key.
module repc_ctrl_match (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            vlan_present,
  input  logic [repc_pkg::VLAN_W-1:0]     vlan,
  input  logic [repc_pkg::PROTO_W-1:0]    proto,
  input  logic [repc_pkg::VLAN_W-1:0]     rule_vlan,
  input  logic                            rule_vlan_any,
  input  logic [repc_pkg::PROTO_W-1:0]    rule_proto,
  input  logic                            rule_proto_any,
  output logic                            m_vlan,
  output logic                            m_udp
);

  logic vlan_q, udp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vlan_q <= 1'b0;
      udp_q  <= 1'b0;
      m_vlan <= 1'b0;
      m_udp  <= 1'b0;
    end else begin
      vlan_q <= rule_vlan_any || (vlan_present && vlan == rule_vlan);
      udp_q  <= rule_proto_any || (proto == rule_proto);
      m_vlan <= vlan_q;
      m_udp  <= udp_q;
    end
  end

endmodule
