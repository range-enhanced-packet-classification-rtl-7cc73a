// repc_heu: header extractor unit of the REPC classifier.
//
// Reads the header bytes buffered by the packet generation unit and
// produces the fields the classifier matches: IPv4 source and destination
// address (32 bits), TCP/UDP source and destination port (16 bits), the
// 802.1Q VLAN ID and the IP protocol number (which tells UDP from TCP).
//
// How it works: the frame is taken to start with an Ethernet II header.
// If the type field at byte 12 is 0x8100 the frame carries a VLAN tag and
// the real type field and the IP header move 4 bytes further. The IP header
// is recognised by type 0x0800, version 4 and IHL >= 5; the L4 header starts
// IHL*4 bytes after it, so IP options are skipped. Ports are read only for
// TCP (6) and UDP (17) and are 0 otherwise. fields.ok is low when no IPv4
// header is found or when the L4 ports would lie outside the buffer.
// Which fields are extracted follows the REPC description; the frame
// format (Ethernet II, optional single 802.1Q tag, IPv4) is this design's
// own reading of it.
//
// Timing: purely combinational; the fields are registered by the matchers.
module repc_heu #(
  parameter int unsigned HDR_BYTES = 64
) (
  input  logic [7:0]            hdr [HDR_BYTES],
  output repc_pkg::hdr_fields_t fields
);
  import repc_pkg::*;

  always_comb begin
    logic [15:0] etype;
    int unsigned l3, l4;
    logic [3:0]  ihl;
    logic        tcp_udp;

    fields = '0;
    fields.vlan_present = ({hdr[12], hdr[13]} == ETH_TYPE_VLAN);
    fields.vlan         = fields.vlan_present ? {hdr[14][3:0], hdr[15]} : '0;
    etype = fields.vlan_present ? {hdr[16], hdr[17]} : {hdr[12], hdr[13]};
    l3    = fields.vlan_present ? 18 : 14;
    ihl   = hdr[l3][3:0];
    l4    = l3 + 4 * int'(ihl);

    fields.proto = hdr[l3 + 9];
    fields.sa    = {hdr[l3 + 12], hdr[l3 + 13], hdr[l3 + 14], hdr[l3 + 15]};
    fields.da    = {hdr[l3 + 16], hdr[l3 + 17], hdr[l3 + 18], hdr[l3 + 19]};
    fields.ok    = (etype == ETH_TYPE_IPV4) && (hdr[l3][7:4] == 4'd4) &&
                   (ihl >= 4'd5) && (l4 + 4 <= HDR_BYTES);
    tcp_udp = (fields.proto == IP_PROTO_TCP) || (fields.proto == IP_PROTO_UDP);
    if (fields.ok && tcp_udp) begin
      fields.sp = {hdr[l4],     hdr[l4 + 1]};
      fields.dp = {hdr[l4 + 2], hdr[l4 + 3]};
    end
    if (!fields.ok) begin
      fields.proto = '0;
      fields.sa    = '0;
      fields.da    = '0;
    end
  end

  initial begin
    assert (HDR_BYTES >= 42) else $error("repc_heu: header buffer too small");
  end

endmodule
