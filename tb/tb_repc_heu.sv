// tb_repc_heu: self-checking test of the header extractor.
//
// Builds random frames byte by byte: with or without an 802.1Q tag, IPv4
// with IHL from 5 to 11 (11 pushes the ports past a 64-byte buffer), TCP,
// UDP or another protocol, and now and then a non-IPv4 type or a wrong IP
// version. The expected fields are written down while the frame is built,
// independently of the extractor's offset arithmetic, and compared with the
// extractor's combinational output. Each frame kind must occur.
module tb_repc_heu;
  import repc_pkg::*;
  localparam int HDR_BYTES = 64;

  int checks = 0;
  int failures = 0;

  logic [7:0]  hdr [HDR_BYTES];
  hdr_fields_t fields;

  repc_heu #(.HDR_BYTES(HDR_BYTES)) dut (.hdr, .fields);

  int kind_cnt [5];  // 0 is_tag, 1 untagged, 2 non-TCP/UDP, 3 not IPv4, 4 ports out of buffer

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hdr_fields_t exp;
    for (int n = 0; n < 4000; n++) begin
      int p, ihl, sel;
      logic is_tag, ipv4;
      logic [7:0] proto;
      for (int i = 0; i < HDR_BYTES; i++) hdr[i] = 8'($urandom);
      exp = '0;
      is_tag = $urandom_range(0, 1) == 1;
      ipv4 = $urandom_range(0, 9) != 0;
      p = 12;
      if (is_tag) begin
        hdr[12] = 8'h81; hdr[13] = 8'h00;
        exp.vlan_present = 1'b1;
        exp.vlan = {hdr[14][3:0], hdr[15]};
        p = 16;
      end else if (hdr[12] == 8'h81 && hdr[13] == 8'h00) begin
        hdr[13] = 8'h01;
      end
      if (ipv4) begin
        hdr[p] = 8'h08; hdr[p + 1] = 8'h00;
      end else if ($urandom_range(0, 1) == 1) begin
        hdr[p] = 8'h86; hdr[p + 1] = 8'hDD;
      end else begin
        hdr[p] = 8'h08; hdr[p + 1] = 8'h00;
      end
      p += 2;
      ihl = $urandom_range(5, 11);
      hdr[p] = {(ipv4 ? 4'd4 : ($urandom_range(0, 1) == 1 ? 4'd6 : 4'd4)), 4'(ihl)};
      if (!ipv4 && hdr[p][7:4] == 4'd4 && hdr[p - 2] == 8'h08) hdr[p][3:0] = 4'd3;  // bad IHL
      sel = $urandom_range(0, 4);
      proto = (sel < 2) ? IP_PROTO_TCP : (sel < 4) ? IP_PROTO_UDP : 8'd1;
      hdr[p + 9] = proto;
      exp.ok = ipv4 && (p + ihl * 4 + 4 <= HDR_BYTES);
      if (exp.ok) begin
        exp.proto = proto;
        exp.sa = {hdr[p + 12], hdr[p + 13], hdr[p + 14], hdr[p + 15]};
        exp.da = {hdr[p + 16], hdr[p + 17], hdr[p + 18], hdr[p + 19]};
        if (proto != 8'd1) begin
          exp.sp = {hdr[p + ihl * 4], hdr[p + ihl * 4 + 1]};
          exp.dp = {hdr[p + ihl * 4 + 2], hdr[p + ihl * 4 + 3]};
        end
      end
      kind_cnt[is_tag ? 0 : 1]++;
      if (exp.ok && proto == 8'd1) kind_cnt[2]++;
      if (!ipv4) kind_cnt[3]++;
      if (ipv4 && !exp.ok) kind_cnt[4]++;
      #1;
      checks++;
      if (fields !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL frame %0d: got %h expected %h", n, fields, exp);
      end
    end
    for (int c = 0; c < 5; c++) begin
      checks++;
      if (kind_cnt[c] == 0) begin
        failures++;
        $display("FAIL frame kind %0d never generated", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
