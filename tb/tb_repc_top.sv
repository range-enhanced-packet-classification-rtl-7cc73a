// tb_repc_top: end-to-end test of the REPC classifier at its default size
// (16 rules, 16 ranges per field, 64-bit input words, 64-byte header buffer).
//
// The test fills the four range tables, about half of the entries as
// prefixes and half as ranges, and the rule table, then streams Ethernet frames through the input port:
// VLAN-tagged and untagged, IPv4 over TCP or UDP with and without IP
// options, a few non-IPv4 frames, and framing errors (stray word, runt,
// oversize, SoP inside a frame). Field values are drawn near the rules'
// bounds so that every RBVE first-stage code occurs. For each good frame
// the test computes every rule's classified output (through the rule's
// range indices), the match vector and
// the first matching rule from plain comparisons and checks them, and it
// checks that the result appears exactly three clock cycles after the EoP
// word. Ranges and rules are rewritten between bursts. A final burst of 32
// minimum-length frames sent with no idle cycle must give one result every
// 8 cycles, the rate of the 64-bit input port. Each mechanism -
// every error kind, tagged and untagged frames, non-IPv4 frames, prefix
// and range table writes, no/one/several matching rules, back-to-back frames and each RBVE
// first-stage code - is counted and must occur at least once.
module tb_repc_top;
  import repc_pkg::*;
  localparam int NUM_RULES = 16;
  localparam int DATA_W = 64;
  localparam int MAX_WORDS = 191;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                 in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0;
  logic [DATA_W-1:0]    in_data = '0;
  logic                 range_wr_en = 1'b0, range_wr_prefix = 1'b0;
  field_e               range_wr_field = FIELD_SA;
  logic [3:0]           range_wr_addr = '0;
  logic [31:0]          range_wr_lb = '0, range_wr_ub = '0;
  logic [5:0]           range_wr_len = '0;
  logic                 rule_wr_en = 1'b0;
  logic [3:0]           rule_wr_addr = '0;
  rule_t                rule_wr_data = '0;
  logic                 pgu_err;
  pgu_err_e             pgu_err_code;
  logic                 cls_valid, cls_ok, any_match;
  logic [CLS_W-1:0]     classified [NUM_RULES];
  logic [NUM_RULES-1:0] match_vec;
  logic [3:0]           best_rule;

  repc_top dut (
    .clk, .rst_n, .in_valid, .in_sop, .in_eop, .in_data,
    .range_wr_en, .range_wr_field, .range_wr_addr, .range_wr_lb, .range_wr_ub, .range_wr_prefix,
    .range_wr_len, .rule_wr_en, .rule_wr_addr, .rule_wr_data,
    .pgu_err, .pgu_err_code, .cls_valid, .cls_ok, .classified, .match_vec, .any_match, .best_rule);

  // ---------------------------------------------------------------- model
  localparam int NR = 16;
  rule_t       model [NUM_RULES];
  logic [31:0] rlb [4][NR];   // range tables, by field_e
  logic [31:0] rub [4][NR];

  typedef struct {
    int               t_eop;  // cycle in which the EoP word was driven
    logic             ok;
    logic [CLS_W-1:0] cls [NUM_RULES];
    logic [NUM_RULES-1:0] vec;
  } exp_t;
  exp_t exp_q [$];
  int   err_q [$];   // expected error codes, in order

  // mechanism counters
  int n_err [5];
  int n_tag = 0, n_untag = 0, n_nonip = 0, n_prefix_wr = 0, n_range_wr = 0;
  int n_nomatch = 0, n_onematch = 0, n_multimatch = 0, n_b2b = 0, n_rewrite = 0;
  int n_code [5];    // SA first-stage codes over all rule evaluations
  int n_pkts = 0;
  // sustained-rate phase: results seen, first and last result cycle
  logic tput_on = 1'b0;
  int   tput_n = 0, tput_first = 0, tput_last = 0;

  function automatic int code_of(logic [7:0] b1, logic [7:0] l1, logic [7:0] u1);
    if (l1 < b1 && b1 < u1) return 0;
    if (b1 == u1 && b1 == l1) return 2;
    if (b1 == u1 && l1 < u1) return 1;
    if (b1 == l1 && l1 < u1) return 3;
    return 4;
  endfunction

  function automatic logic [31:0] plo(logic [31:0] v, int len);
    return (len == 0) ? 32'h0 : ((v >> (32 - len)) << (32 - len));
  endfunction
  function automatic logic [31:0] phi(logic [31:0] v, int len);
    return (len == 32) ? v : (plo(v, len) | (32'hFFFF_FFFF >> len));
  endfunction

  // ---------------------------------------------------------------- checker
  always @(negedge clk) begin
    if (pgu_err) begin
      checks++;
      if (err_q.size() == 0 || int'(pgu_err_code) != err_q[0]) begin
        failures++;
        $display("FAIL unexpected PGU error %0d", pgu_err_code);
      end
      if (err_q.size() > 0) begin
        n_err[err_q[0]]++;
        void'(err_q.pop_front());
      end
    end
    if (cls_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL result without a packet");
      end else begin
        e = exp_q.pop_front();
        if (cyc - e.t_eop != 3) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 3", cyc - e.t_eop);
        end
        if (cls_ok !== e.ok || match_vec !== e.vec || any_match !== (e.vec != 0)) begin
          failures++;
          $display("FAIL packet %0d: ok=%b vec=%b expected ok=%b vec=%b",
                   n_pkts, cls_ok, match_vec, e.ok, e.vec);
        end
        for (int r = 0; r < NUM_RULES; r++)
          if (classified[r] !== e.cls[r]) begin
            failures++;
            $display("FAIL packet %0d rule %0d: classified=%b expected %b",
                     n_pkts, r, classified[r], e.cls[r]);
          end
        if (e.vec != 0) begin
          int b;
          b = 0;
          for (int r = NUM_RULES - 1; r >= 0; r--) if (e.vec[r]) b = r;
          if (int'(best_rule) != b) begin
            failures++;
            $display("FAIL best_rule %0d expected %0d", best_rule, b);
          end
        end
        n_pkts++;
        if (tput_on) begin
          if (tput_n == 0) tput_first = cyc;
          tput_last = cyc;
          tput_n++;
        end
      end
    end
  end

  // ---------------------------------------------------------------- drivers
  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
      rule_wr_en = 1'b0;
      range_wr_en = 1'b0;
    end
  endtask

  task automatic write_rule(int addr, rule_t r);
    @(negedge clk);
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
    range_wr_en = 1'b0;
    rule_wr_en = 1'b1;
    rule_wr_addr = 4'(addr);
    rule_wr_data = r;
    model[addr] = r;
  endtask

  task automatic write_range(field_e fld, int k, logic [31:0] lb, logic [31:0] ub, logic pm, int len);
    int w;
    @(negedge clk);
    in_valid = 1'b0; in_sop = 1'b0; in_eop = 1'b0;
    rule_wr_en = 1'b0;
    range_wr_en = 1'b1;
    range_wr_field = fld;
    range_wr_addr = 4'(k);
    range_wr_lb = lb;
    range_wr_ub = ub;
    range_wr_prefix = pm;
    range_wr_len = 6'(len);
    w = (fld == FIELD_SA || fld == FIELD_DA) ? 32 : 16;
    if (w == 16) begin
      lb = {16'h0, lb[15:0]};
      ub = {16'h0, ub[15:0]};
    end
    if (pm) begin
      // prefix over the field's w bits
      ub = phi(lb << (32 - w), len) >> (32 - w);
      lb = plo(lb << (32 - w), len) >> (32 - w);
      n_prefix_wr++;
    end else n_range_wr++;
    rlb[fld][k] = lb;
    rub[fld][k] = ub;
  endtask

  // A random rule around some anchors
  function automatic logic [31:0] near32(logic [31:0] v);
    case ($urandom_range(0, 4))
      0: return v;
      1: return v + 32'($urandom_range(1, 2000));
      2: return v - 32'($urandom_range(1, 2000));
      3: return {v[31:24], 24'($urandom)};
      default: return {v[31:16], 16'($urandom)};
    endcase
  endfunction

  // Fill range entries first..NR-1 of every field; SA entry 0 is the full
  // address space (prefix of length 0)
  task automatic program_ranges(int first);
    for (int k = first; k < NR; k++) begin
      logic [31:0] x, y;
      x = {8'd10, 8'($urandom_range(0, 3)), 16'($urandom)};
      y = near32(x);
      if (k == 0) write_range(FIELD_SA, 0, x, x, 1'b1, 0);
      else write_range(FIELD_SA, k, (x < y) ? x : y, (x < y) ? y : x,
                       $urandom_range(0, 1) == 1, $urandom_range(8, 24));
      x = {8'd192, 8'd168, 8'($urandom_range(0, 3)), 8'($urandom)};
      y = near32(x);
      write_range(FIELD_DA, k, (x < y) ? x : y, (x < y) ? y : x,
                  $urandom_range(0, 1) == 1, $urandom_range(0, 24));
      x = 32'($urandom_range(1000, 1100));
      write_range(FIELD_SP, k, x, x + 32'($urandom_range(0, 200)), 1'b0, 0);
      case ($urandom_range(0, 4))
        0: write_range(FIELD_DP, k, 32'd80, 32'd80, 1'b0, 0);
        1: write_range(FIELD_DP, k, 32'd0, 32'd1023, 1'b0, 0);
        2: write_range(FIELD_DP, k, 32'd0, 32'd0, 1'b1, 0);
        3: write_range(FIELD_DP, k, 32'd8080, 32'd0, 1'b1, 12);
        default: write_range(FIELD_DP, k, 32'd443, 32'd8080, 1'b0, 0);
      endcase
    end
    idle(1);
  endtask

  task automatic program_rules(int first);
    for (int a = first; a < NUM_RULES; a++) begin
      rule_t r;
      r.valid = $urandom_range(0, 9) != 0;
      r.sa_idx = 4'($urandom_range(1, NR - 1));
      r.da_idx = 4'($urandom);
      r.sp_idx = 4'($urandom);
      r.dp_idx = 4'($urandom);
      r.vlan = 12'($urandom_range(1, 3));
      r.vlan_any = $urandom_range(0, 2) != 0;
      r.proto = ($urandom_range(0, 1) == 1) ? IP_PROTO_UDP : IP_PROTO_TCP;
      r.proto_any = $urandom_range(0, 1) == 0;
      if (a == 0) begin  // catch-all on SA at the highest priority, mostly invalid
        r.sa_idx = 4'd0;
        r.valid = $urandom_range(0, 5) == 0;
      end
      write_rule(a, r);
    end
    idle(1);
  endtask

  // Build and send one frame; kind: 0 good, 1 runt, 2 oversize, 3 non-IPv4,
  // 4 cut short by the next SoP (sent as a partial frame only),
  // 5 good, minimum length (one header buffer, 8 words)
  task automatic send_frame(int kind, logic b2b);
    logic [7:0]  f [];
    int          nbytes, p, ihl, words, ri;
    logic        tag;
    logic [11:0] vlan;
    logic [7:0]  proto;
    logic [31:0] sa, da;
    logic [15:0] sp, dp;
    hdr_fields_t h;
    exp_t        e;

    tag = $urandom_range(0, 1) == 1;
    vlan = 12'($urandom_range(1, 3));
    proto = ($urandom_range(0, 1) == 1) ? IP_PROTO_UDP : IP_PROTO_TCP;
    ihl = ($urandom_range(0, 3) == 0) ? 6 : 5;
    // pick fields near a random rule's bounds
    ri = $urandom_range(0, NUM_RULES - 1);
    begin
      logic [31:0] l, u;
      l = rlb[FIELD_SA][model[ri].sa_idx];
      u = rub[FIELD_SA][model[ri].sa_idx];
      case ($urandom_range(0, 4))
        0: sa = l;
        1: sa = u;
        2: sa = l + (u - l) / 2;
        3: sa = near32(l);
        default: sa = near32(u);
      endcase
      l = rlb[FIELD_DA][model[ri].da_idx];
      u = rub[FIELD_DA][model[ri].da_idx];
      case ($urandom_range(0, 3))
        0: da = l;
        1: da = u;
        2: da = l + (u - l) / 2;
        default: da = near32(l);
      endcase
      sp = rlb[FIELD_SP][model[ri].sp_idx][15:0] + 16'($urandom_range(0, 70)) - 16'd5;
    end
    dp = ($urandom_range(0, 1) == 0) ? 16'd80 : 16'($urandom_range(0, 9000));

    words = (kind == 1) ? $urandom_range(1, 7) :
            (kind == 2) ? $urandom_range(MAX_WORDS + 1, MAX_WORDS + 4) :
            (kind == 4) ? $urandom_range(1, 12) :
            (kind == 5) ? 8 : $urandom_range(8, 20);
    nbytes = words * 8;
    f = new[(nbytes < 64) ? 64 : nbytes];
    foreach (f[i]) f[i] = 8'($urandom);
    p = 12;
    if (tag) begin
      f[12] = 8'h81; f[13] = 8'h00; f[14] = {4'($urandom), vlan[11:8]}; f[15] = vlan[7:0];
      p = 16;
    end
    {f[p], f[p + 1]} = (kind == 3) ? 16'h86DD : ETH_TYPE_IPV4;
    p += 2;
    f[p] = {4'd4, 4'(ihl)};
    f[p + 9] = proto;
    {f[p + 12], f[p + 13], f[p + 14], f[p + 15]} = sa;
    {f[p + 16], f[p + 17], f[p + 18], f[p + 19]} = da;
    {f[p + ihl * 4], f[p + ihl * 4 + 1]} = sp;
    {f[p + ihl * 4 + 2], f[p + ihl * 4 + 3]} = dp;

    // expected header fields
    h = '0;
    h.vlan_present = tag;
    h.vlan = tag ? vlan : 12'd0;
    h.ok = (kind != 3);
    if (h.ok) begin
      h.proto = proto; h.sa = sa; h.da = da; h.sp = sp; h.dp = dp;
    end

    // send
    for (int w = 0; w < words; w++) begin
      @(negedge clk);
      rule_wr_en = 1'b0;
      range_wr_en = 1'b0;
      in_valid = 1'b1;
      in_sop = (w == 0);
      in_eop = (w == words - 1) && kind != 4;
      for (int k = 0; k < 8; k++) in_data[63 - 8 * k -: 8] = f[w * 8 + k];
      if (w == 0 && b2b) n_b2b++;
    end
    if (kind == 4) begin
      err_q.push_back(int'(PGU_DUP_SOP));
      return;
    end
    if (kind == 1) begin err_q.push_back(int'(PGU_RUNT)); return; end
    if (kind == 2) begin err_q.push_back(int'(PGU_OVERSIZE)); return; end

    e.t_eop = cyc;
    e.ok = h.ok;
    e.vec = '0;
    for (int r = 0; r < NUM_RULES; r++) begin
      logic [CLS_W-1:0] c;
      c[CLS_SA] = rlb[FIELD_SA][model[r].sa_idx] <= h.sa && h.sa <= rub[FIELD_SA][model[r].sa_idx];
      c[CLS_DA] = rlb[FIELD_DA][model[r].da_idx] <= h.da && h.da <= rub[FIELD_DA][model[r].da_idx];
      c[CLS_SP] = rlb[FIELD_SP][model[r].sp_idx] <= 32'(h.sp) && 32'(h.sp) <= rub[FIELD_SP][model[r].sp_idx];
      c[CLS_DP] = rlb[FIELD_DP][model[r].dp_idx] <= 32'(h.dp) && 32'(h.dp) <= rub[FIELD_DP][model[r].dp_idx];
      c[CLS_VLAN] = model[r].vlan_any || (h.vlan_present && h.vlan == model[r].vlan);
      c[CLS_UDP] = model[r].proto_any || h.proto == model[r].proto;
      e.cls[r] = c;
      e.vec[r] = h.ok && model[r].valid && (&c);
    end
    for (int k = 0; k < NR; k++)
      n_code[code_of(h.sa[31:24], rlb[FIELD_SA][k][31:24], rub[FIELD_SA][k][31:24])]++;
    if (!h.ok) n_nonip++;
    else if (tag) n_tag++;
    else n_untag++;
    if (e.vec == 0) n_nomatch++;
    else if ($onehot(e.vec)) n_onematch++;
    else n_multimatch++;
    exp_q.push_back(e);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    program_ranges(0);
    program_rules(0);
    // framing errors
    @(negedge clk);
    in_valid = 1'b1; in_sop = 1'b0; in_eop = 1'b0; in_data = '1;
    err_q.push_back(int'(PGU_NO_SOP));
    idle(2);
    send_frame(1, 1'b0);
    idle(1);
    send_frame(2, 1'b0);
    send_frame(4, 1'b1);
    send_frame(0, 1'b1);
    idle(2);
    for (int burst = 0; burst < 12; burst++) begin
      for (int i = 0; i < 40; i++) begin
        int k;
        logic gap;
        k = $urandom_range(0, 19);
        gap = $urandom_range(0, 1) == 1;
        if (gap) idle($urandom_range(1, 3));
        send_frame((k == 0) ? 3 : (k == 1) ? 1 : (k == 2) ? 4 : 0, !gap);
      end
      idle(6);
      // rewrite part of the range tables and the rule set between bursts
      program_ranges($urandom_range(1, NR - 1));
      program_rules($urandom_range(0, NUM_RULES - 1));
      n_rewrite++;
    end
    idle(6);

    // sustained rate: 32 minimum frames with no idle cycle between them
    // must give 32 results, one every 8 cycles (64 bits per cycle in)
    tput_on = 1'b1;
    for (int i = 0; i < 32; i++) send_frame(5, i != 0);
    idle(6);
    tput_on = 1'b0;
    checks++;
    $display("  sustained rate       %0d results in %0d cycles", tput_n, tput_last - tput_first);
    if (tput_n != 32 || tput_last - tput_first != 8 * 31) begin
      failures++;
      $display("FAIL sustained rate: %0d results over %0d cycles, expected 32 over %0d",
               tput_n, tput_last - tput_first, 8 * 31);
    end

    checks++;
    if (exp_q.size() != 0 || err_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results and %0d errors never seen", exp_q.size(), err_q.size());
    end
    begin
      int cnt [16];
      string nm [16];
      cnt = '{n_err[1], n_err[2], n_err[3], n_err[4], n_tag, n_untag, n_nonip, n_prefix_wr,
              n_range_wr, n_nomatch, n_onematch, n_multimatch, n_b2b, n_rewrite, n_code[0], n_code[1]};
      nm = '{"no-SoP error", "dup-SoP error", "runt error", "oversize error", "tagged frame",
             "untagged frame", "non-IPv4 frame", "prefix range write", "plain range write",
             "no match", "single match", "multiple match", "back-to-back frame", "rule rewrite",
             "SA code 111", "SA code 001"};
      for (int i = 0; i < 16; i++) begin
        checks++;
        $display("  %-20s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", nm[i]);
        end
      end
      for (int c = 2; c < 5; c++) begin
        checks++;
        $display("  SA code %0d           %0d", c, n_code[c]);
        if (n_code[c] == 0) begin
          failures++;
          $display("FAIL SA first-stage code %0d never happened", c);
        end
      end
    end
    $display("packets classified: %0d", n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
