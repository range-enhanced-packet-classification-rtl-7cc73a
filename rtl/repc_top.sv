// repc_top: range-enhanced packet classifier (REPC).
//
// Classifies each incoming packet against a rule set in which the IP
// addresses and the L4 ports are given as arbitrary ranges (or prefixes),
// without expanding a range into many prefixes as a TCAM would.
// The data path is:
//
//   stream --> PGU --> HEU --> 4 field units --> NUM_RULES x rule_match --> match unit
//              (framing,   (field    (range table +     (pick one range bit    (bit-vector,
//               header      extract)  RBVE matcher per   per field, VLAN and    first match)
//               buffer)               distinct range)    protocol matcher)
//                                                            ^
//                                                       rule table
//
// Each range field (SA, DA, SP, DP) has its own table of NUM_RANGES
// distinct ranges, shared by all rules, and one RBVE matcher per entry; a
// rule holds an index into each table. Ranges are written through the
// range_wr_* port (field, entry, bounds, or a prefix value and length),
// rules through the rule_wr_* port.
//
// Each rule's matcher yields the classified output
//   classified[r] = {Mvlan, Mudp, Mdp, Msp, Mda, Msa};
// match_vec[r] is set when all six bits are set and rule r is valid, and
// best_rule is the lowest-numbered matching rule.
//
// Timing: the packet's EoP word is accepted at edge 0; the PGU flags the
// packet at edge 1, the RBVE stage codes are registered at edge 2 and the
// field matches at edge 3, so cls_valid and the results are high in the
// cycle after edge 3: a latency of three clock cycles from the EoP word, as
// in the REPC design. One packet can finish every cycle in principle; with
// the default 64-bit input and a 64-byte minimum frame the input port
// limits the rate to one packet per eight cycles.
// Interface: see repc_pgu for the input stream and repc_rule_table for the
// rule write port. pgu_err/pgu_err_code report framing errors; such packets
// are not classified. cls_ok is low for a packet without an IPv4 header, and
// such a packet matches no rule.
// The block structure (PGU, HEU, RBVE per field, matching unit) and the
// field set follow the REPC architecture, as does keeping each field's
// distinct ranges once; the rule and range counts, the word width, the
// write ports and the first-match output are this design's own choices.
module repc_top #(
  parameter int unsigned NUM_RULES  = 16,
  parameter int unsigned NUM_RANGES = repc_pkg::NUM_RANGES,
  parameter int unsigned DATA_W    = 64,
  parameter int unsigned HDR_BYTES = 64,
  parameter int unsigned MAX_WORDS = 191
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // packet stream
  input  logic                          in_valid,
  input  logic                          in_sop,
  input  logic                          in_eop,
  input  logic [DATA_W-1:0]             in_data,
  // range table write port (ports use the low 16 bits of lb/ub)
  input  logic                          range_wr_en,
  input  repc_pkg::field_e              range_wr_field,
  input  logic [$clog2(NUM_RANGES)-1:0] range_wr_addr,
  input  logic [31:0]                   range_wr_lb,
  input  logic [31:0]                   range_wr_ub,
  input  logic                          range_wr_prefix,
  input  logic [5:0]                    range_wr_len,
  // rule write port
  input  logic                          rule_wr_en,
  input  logic [$clog2(NUM_RULES)-1:0]  rule_wr_addr,
  input  repc_pkg::rule_t               rule_wr_data,
  // framing errors
  output logic                          pgu_err,
  output repc_pkg::pgu_err_e            pgu_err_code,
  // classification result
  output logic                          cls_valid,
  output logic                          cls_ok,
  output logic [repc_pkg::CLS_W-1:0]    classified [NUM_RULES],
  output logic [NUM_RULES-1:0]          match_vec,
  output logic                          any_match,
  output logic [$clog2(NUM_RULES)-1:0]  best_rule
);
  import repc_pkg::*;

  logic        pkt_valid;
  logic [7:0]  hdr [HDR_BYTES];
  hdr_fields_t fields;
  rule_t       rules [NUM_RULES];
  logic [NUM_RULES-1:0] hit;
  logic [1:0]  valid_q, ok_q;
  logic [NUM_RANGES-1:0] sa_m, da_m, sp_m, dp_m;

  repc_pgu #(.DATA_W(DATA_W), .HDR_BYTES(HDR_BYTES), .MAX_WORDS(MAX_WORDS)) u_pgu (
    .clk, .rst_n, .in_valid, .in_sop, .in_eop, .in_data,
    .pkt_valid, .pkt_err(pgu_err), .err_code(pgu_err_code), .hdr);

  repc_heu #(.HDR_BYTES(HDR_BYTES)) u_heu (.hdr, .fields);

  repc_field_unit #(.W(ADDR_W), .D(ADDR_STRIDE), .NUM_RANGES(NUM_RANGES)) u_sa (
    .clk, .rst_n, .wr_en(range_wr_en && range_wr_field == FIELD_SA), .wr_addr(range_wr_addr),
    .wr_lb(range_wr_lb), .wr_ub(range_wr_ub), .wr_prefix(range_wr_prefix), .wr_len(range_wr_len),
    .b(fields.sa), .match(sa_m));
  repc_field_unit #(.W(ADDR_W), .D(ADDR_STRIDE), .NUM_RANGES(NUM_RANGES)) u_da (
    .clk, .rst_n, .wr_en(range_wr_en && range_wr_field == FIELD_DA), .wr_addr(range_wr_addr),
    .wr_lb(range_wr_lb), .wr_ub(range_wr_ub), .wr_prefix(range_wr_prefix), .wr_len(range_wr_len),
    .b(fields.da), .match(da_m));
  repc_field_unit #(.W(PORT_W), .D(PORT_STRIDE), .NUM_RANGES(NUM_RANGES)) u_sp (
    .clk, .rst_n, .wr_en(range_wr_en && range_wr_field == FIELD_SP), .wr_addr(range_wr_addr),
    .wr_lb(range_wr_lb[PORT_W-1:0]), .wr_ub(range_wr_ub[PORT_W-1:0]), .wr_prefix(range_wr_prefix),
    .wr_len(range_wr_len), .b(fields.sp), .match(sp_m));
  repc_field_unit #(.W(PORT_W), .D(PORT_STRIDE), .NUM_RANGES(NUM_RANGES)) u_dp (
    .clk, .rst_n, .wr_en(range_wr_en && range_wr_field == FIELD_DP), .wr_addr(range_wr_addr),
    .wr_lb(range_wr_lb[PORT_W-1:0]), .wr_ub(range_wr_ub[PORT_W-1:0]), .wr_prefix(range_wr_prefix),
    .wr_len(range_wr_len), .b(fields.dp), .match(dp_m));

  repc_rule_table #(.NUM_RULES(NUM_RULES)) u_rules (
    .clk, .rst_n, .wr_en(rule_wr_en), .wr_addr(rule_wr_addr), .wr_rule(rule_wr_data), .rules);

  for (genvar r = 0; r < NUM_RULES; r++) begin : g_rule
    repc_rule_match #(.NUM_RANGES(NUM_RANGES)) u_match (
      .clk, .rst_n, .fields, .rule(rules[r]),
      .sa_match(sa_m), .da_match(da_m), .sp_match(sp_m), .dp_match(dp_m),
      .cls(classified[r]), .hit(hit[r]));
  end

  // Packet valid and header-ok travel beside the two matcher stages
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      ok_q    <= '0;
    end else begin
      valid_q <= {valid_q[0], pkt_valid};
      ok_q    <= {ok_q[0], fields.ok};
    end
  end

  assign cls_ok = ok_q[1];

  repc_match_unit #(.NUM_RULES(NUM_RULES)) u_mu (
    .in_valid(valid_q[1]), .in_ok(ok_q[1]), .hit,
    .out_valid(cls_valid), .match_vec, .any_match, .best_rule);

endmodule
