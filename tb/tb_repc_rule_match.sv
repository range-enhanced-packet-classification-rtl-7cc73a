// tb_repc_rule_match: self-checking test of one rule's classifier.
//
// Every cycle a random packet (VLAN, protocol) and a random rule enter,
// and the field units' match vectors are driven two cycles later, as the
// real field units deliver them. Three edges after the packet and rule
// were driven the test compares cls = {Mvlan, Mudp, Mdp, Msp, Mda, Msa}
// and hit with values it computes by indexing the match vectors with the
// rule's indices and comparing the control fields. Each classified bit
// must be seen both set and clear, and full hits and hits suppressed by a
// cleared valid bit must occur.
module tb_repc_rule_match;
  import repc_pkg::*;
  localparam int NR = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  hdr_fields_t      fields = '0;
  rule_t            rule = '0;
  logic [NR-1:0]    sa_m = '0, da_m = '0, sp_m = '0, dp_m = '0;
  logic [CLS_W-1:0] cls;
  logic             hit;

  repc_rule_match #(.NUM_RANGES(NR)) dut (
    .clk, .rst_n, .fields, .rule, .sa_match(sa_m), .da_match(da_m), .sp_match(sp_m),
    .dp_match(dp_m), .cls, .hit);

  rule_t          rq [$];
  hdr_fields_t    fq [$];
  logic [CLS_W:0] exp_q [$];
  int             exp_t [$];
  int             full_hits = 0, invalid_hits = 0;
  int             bit_set [CLS_W];
  localparam int  N = 4000;

  always @(posedge clk) begin
    if (exp_t.size() > 0 && exp_t[0] + 3 == cyc) begin
      logic [CLS_W:0] e;
      void'(exp_t.pop_front());
      e = exp_q.pop_front();
      checks++;
      if ({hit, cls} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL {hit,cls}=%b expected %b", {hit, cls}, e);
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
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N + 2; i++) begin
      if (i < N) begin
        hdr_fields_t f;
        rule_t r;
        f = '0;
        f.ok = 1'b1;
        f.vlan_present = $urandom_range(0, 3) != 0;
        f.vlan = 12'($urandom_range(0, 3));
        f.proto = ($urandom_range(0, 1) == 1) ? IP_PROTO_UDP : IP_PROTO_TCP;
        r.valid = $urandom_range(0, 7) != 0;
        r.sa_idx = 4'($urandom); r.da_idx = 4'($urandom);
        r.sp_idx = 4'($urandom); r.dp_idx = 4'($urandom);
        r.vlan = 12'($urandom_range(0, 3));
        r.vlan_any = $urandom_range(0, 2) == 0;
        r.proto = ($urandom_range(0, 3) != 0) ? f.proto : IP_PROTO_TCP;
        r.proto_any = $urandom_range(0, 5) == 0;
        fields <= f;
        rule <= r;
        rq.push_back(r);
        fq.push_back(f);
      end
      if (i >= 2) begin
        // match vectors for the packet driven two cycles ago, mostly ones
        logic [NR-1:0] a, b, c, d;
        logic [CLS_W-1:0] e;
        rule_t r;
        hdr_fields_t f;
        a = NR'($urandom | $urandom);
        b = NR'($urandom | $urandom);
        c = NR'($urandom | $urandom);
        d = NR'($urandom | $urandom);
        sa_m <= a; da_m <= b; sp_m <= c; dp_m <= d;
        r = rq.pop_front();
        f = fq.pop_front();
        e[CLS_SA] = a[r.sa_idx];
        e[CLS_DA] = b[r.da_idx];
        e[CLS_SP] = c[r.sp_idx];
        e[CLS_DP] = d[r.dp_idx];
        e[CLS_VLAN] = r.vlan_any || (f.vlan_present && f.vlan == r.vlan);
        e[CLS_UDP] = r.proto_any || f.proto == r.proto;
        for (int k = 0; k < CLS_W; k++) if (e[k]) bit_set[k]++;
        if (&e && r.valid) full_hits++;
        if (&e && !r.valid) invalid_hits++;
        exp_q.push_back({r.valid && (&e), e});
        exp_t.push_back(cyc - 2);
      end
      @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_t.size() != 0 || full_hits == 0 || invalid_hits == 0) begin
      failures++;
      $display("FAIL coverage: pending=%0d full hits=%0d invalid-rule hits=%0d",
               exp_t.size(), full_hits, invalid_hits);
    end
    for (int k = 0; k < CLS_W; k++) begin
      checks++;
      if (bit_set[k] == 0 || bit_set[k] == N) begin
        failures++;
        $display("FAIL classified bit %0d constant over the run", k);
      end
    end
    $display("full hits %0d, hits on invalid rules %0d", full_hits, invalid_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
