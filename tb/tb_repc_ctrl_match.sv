// tb_repc_ctrl_match: self-checking test of the VLAN/protocol matcher.
//
// Drives a new packet/rule pair every cycle, with VLAN IDs and protocols
// drawn from small sets so that equal and unequal values, tagged and
// untagged packets and both wildcards all occur, and checks Mvlan and Mudp
// three edges after the inputs were driven (two register stages).
module tb_repc_ctrl_match;
  import repc_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  logic               vlan_present = 1'b0, rule_vlan_any = 1'b0, rule_proto_any = 1'b0;
  logic [VLAN_W-1:0]  vlan = '0, rule_vlan = '0;
  logic [PROTO_W-1:0] proto = '0, rule_proto = '0;
  logic               m_vlan, m_udp;

  repc_ctrl_match dut (.clk, .rst_n, .vlan_present, .vlan, .proto, .rule_vlan, .rule_vlan_any,
                       .rule_proto, .rule_proto_any, .m_vlan, .m_udp);

  logic [1:0] exp_q [$];
  int         exp_t [$];
  int         hits_v = 0, hits_p = 0, miss_v = 0, miss_p = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (exp_t.size() > 0 && exp_t[0] + 3 == cyc) begin
      logic [1:0] e;
      void'(exp_t.pop_front());
      e = exp_q.pop_front();
      checks++;
      if ({m_vlan, m_udp} !== e) begin
        failures++;
        $display("FAIL cycle %0d: {m_vlan,m_udp}=%b expected %b", cyc, {m_vlan, m_udp}, e);
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ev, ep;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic               vp, va, pa;
      logic [VLAN_W-1:0]  v, rv;
      logic [PROTO_W-1:0] p, rp;
      vp = $urandom_range(0, 3) != 0;
      v  = 12'($urandom_range(1, 4));
      rv = 12'($urandom_range(1, 4));
      va = $urandom_range(0, 4) == 0;
      p  = ($urandom_range(0, 1) == 1) ? IP_PROTO_UDP : IP_PROTO_TCP;
      rp = ($urandom_range(0, 1) == 1) ? IP_PROTO_UDP : IP_PROTO_TCP;
      pa = $urandom_range(0, 4) == 0;
      vlan_present <= vp; vlan <= v; rule_vlan <= rv; rule_vlan_any <= va;
      proto <= p; rule_proto <= rp; rule_proto_any <= pa;
      ev = va || (vp && v == rv);
      ep = pa || (p == rp);
      if (ev) hits_v++; else miss_v++;
      if (ep) hits_p++; else miss_p++;
      exp_q.push_back({ev, ep});
      exp_t.push_back(cyc);
      @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_t.size() != 0 || hits_v == 0 || miss_v == 0 || hits_p == 0 || miss_p == 0) begin
      failures++;
      $display("FAIL coverage: pending=%0d vlan %0d/%0d proto %0d/%0d",
               exp_t.size(), hits_v, miss_v, hits_p, miss_p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
