// repc_pkg: types and constants shared by the range-enhanced packet
// classifier (REPC).
//
// The classifier matches the IPv4 5-tuple style fields of a packet against a
// rule set. The address fields are 32 bits wide and are compared in four
// 8-bit slices; the port fields are 16 bits wide and are compared in four
// 4-bit slices. These widths and strides are the ones the REPC architecture
// uses. The VLAN ID (12 bits, from the 802.1Q tag) and the 8-bit IP protocol
// number are matched exactly, each with a per-rule wildcard; those encodings
// and the rule layout are this design's own choice.
//
// Each range field keeps a table of its distinct ranges (NUM_RANGES of
// them, shared by all rules); a rule names one entry per range field by
// index. RIDX_W sets the index width and so the largest range table.
//
// The classified output of one rule is the 6-bit vector
//   {Mvlan, Mudp, Mdp, Msp, Mda, Msa}
// whose bit positions are given by the CLS_* constants below.
package repc_pkg;

  // Field widths and RBVE strides
  localparam int unsigned ADDR_W      = 32;  // IPv4 source/destination address
  localparam int unsigned PORT_W      = 16;  // TCP/UDP source/destination port
  localparam int unsigned ADDR_STRIDE = 8;   // d for the address fields (j = 4)
  localparam int unsigned PORT_STRIDE = 4;   // d for the port fields (j = 4)
  localparam int unsigned VLAN_W      = 12;  // 802.1Q VLAN identifier
  localparam int unsigned PROTO_W     = 8;   // IPv4 protocol number

  // Range tables: one per range field, indexed by the rules
  localparam int unsigned RIDX_W     = 4;   // range index width
  localparam int unsigned NUM_RANGES = 16;  // default ranges per field

  typedef enum logic [1:0] {
    FIELD_SA = 2'd0,
    FIELD_DA = 2'd1,
    FIELD_SP = 2'd2,
    FIELD_DP = 2'd3
  } field_e;

  // Classified output bit positions
  localparam int unsigned CLS_W    = 6;
  localparam int unsigned CLS_SA   = 0;
  localparam int unsigned CLS_DA   = 1;
  localparam int unsigned CLS_SP   = 2;
  localparam int unsigned CLS_DP   = 3;
  localparam int unsigned CLS_UDP  = 4;
  localparam int unsigned CLS_VLAN = 5;

  // Frame constants used by the header extractor
  localparam logic [15:0] ETH_TYPE_VLAN = 16'h8100;
  localparam logic [15:0] ETH_TYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_PROTO_TCP  = 8'd6;
  localparam logic [7:0]  IP_PROTO_UDP  = 8'd17;

  // Header fields produced by the header extractor
  typedef struct packed {
    logic               ok;            // IPv4 header found and fully inside the buffer
    logic               vlan_present;  // frame carried an 802.1Q tag
    logic [VLAN_W-1:0]  vlan;          // VLAN ID (0 when untagged)
    logic [PROTO_W-1:0] proto;         // IP protocol number
    logic [ADDR_W-1:0]  sa;            // IP source address
    logic [ADDR_W-1:0]  da;            // IP destination address
    logic [PORT_W-1:0]  sp;            // L4 source port (0 unless TCP or UDP)
    logic [PORT_W-1:0]  dp;            // L4 destination port (0 unless TCP or UDP)
  } hdr_fields_t;

  // One rule: an index into each range field's table, exact values with
  // wildcards for the control fields.
  typedef struct packed {
    logic               valid;
    logic [RIDX_W-1:0]  sa_idx;
    logic [RIDX_W-1:0]  da_idx;
    logic [RIDX_W-1:0]  sp_idx;
    logic [RIDX_W-1:0]  dp_idx;
    logic [VLAN_W-1:0]  vlan;
    logic               vlan_any;
    logic [PROTO_W-1:0] proto;
    logic               proto_any;
  } rule_t;

  // Packet generation unit error codes
  typedef enum logic [2:0] {
    PGU_OK       = 3'd0,
    PGU_NO_SOP   = 3'd1,  // data word outside a packet (EoP or data without SoP)
    PGU_DUP_SOP  = 3'd2,  // SoP inside a packet: the open packet is dropped
    PGU_RUNT     = 3'd3,  // EoP before the header buffer was filled
    PGU_OVERSIZE = 3'd4   // packet longer than the maximum frame length
  } pgu_err_e;

  // Prefix value/len -> inclusive range bounds. prefix_mask has len leading
  // ones; a W-bit field (W <= 32) uses its top W bits.
  function automatic logic [ADDR_W-1:0] prefix_mask(input logic [5:0] len);
    logic [ADDR_W-1:0] m;
    for (int i = 0; i < ADDR_W; i++) m[ADDR_W-1-i] = (i < int'(len));
    return m;
  endfunction

  function automatic logic [ADDR_W-1:0] prefix_lb(input logic [ADDR_W-1:0] v, input logic [5:0] len);
    return v & prefix_mask(len);
  endfunction

  function automatic logic [ADDR_W-1:0] prefix_ub(input logic [ADDR_W-1:0] v, input logic [5:0] len);
    return v | ~prefix_mask(len);
  endfunction

endpackage
