// tb_repc_field_unit: self-checking test of a field's range table and its
// RBVE matchers.
//
// Two units are tested: the address configuration (32 bits, stride 8) and
// the port configuration (16 bits, stride 4), each with 16 entries. After
// reset every entry must match nothing. Then, in rounds, random entries are
// rewritten (as [lb, ub] ranges or as prefixes, with the model bounds
// computed by shifting), and a stream of keys - a new one every cycle,
// drawn near the stored bounds - is compared with the whole match vector
// three edges after each key was driven. Prefix writes, range writes and
// keys matching none, one and several entries must all occur.
module tb_repc_field_unit;
  localparam int NR = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          a_we = 1'b0, p_we = 1'b0, wr_prefix = 1'b0;
  logic [3:0]    wr_addr = '0;
  logic [31:0]   wr_lb = '0, wr_ub = '0;
  logic [5:0]    wr_len = '0;
  logic [31:0]   a_b = '0;
  logic [15:0]   p_b = '0;
  logic [NR-1:0] a_m, p_m;

  repc_field_unit #(.W(32), .D(8), .NUM_RANGES(NR)) dut_a (
    .clk, .rst_n, .wr_en(a_we), .wr_addr, .wr_lb, .wr_ub, .wr_prefix, .wr_len, .b(a_b), .match(a_m));
  repc_field_unit #(.W(16), .D(4), .NUM_RANGES(NR)) dut_p (
    .clk, .rst_n, .wr_en(p_we), .wr_addr, .wr_lb(wr_lb[15:0]), .wr_ub(wr_ub[15:0]), .wr_prefix,
    .wr_len, .b(p_b), .match(p_m));

  logic [31:0] alb [NR], aub [NR];
  logic [15:0] plb [NR], pub [NR];
  logic [NR-1:0] exp_a [$], exp_p [$];
  int            exp_t [$];
  int n_prefix = 0, n_range = 0, n_none = 0, n_one = 0, n_many = 0;

  always @(posedge clk) begin
    if (exp_t.size() > 0 && exp_t[0] + 3 == cyc) begin
      logic [NR-1:0] ea, ep;
      void'(exp_t.pop_front());
      ea = exp_a.pop_front();
      ep = exp_p.pop_front();
      checks += 2;
      if (a_m !== ea) begin
        failures++;
        if (failures < 10) $display("FAIL address match %b expected %b", a_m, ea);
      end
      if (p_m !== ep) begin
        failures++;
        if (failures < 10) $display("FAIL port match %b expected %b", p_m, ep);
      end
    end
  end

  function automatic logic [31:0] lo32(logic [31:0] v, int len);
    return (len == 0) ? 32'h0 : ((v >> (32 - len)) << (32 - len));
  endfunction
  function automatic logic [31:0] hi32(logic [31:0] v, int len);
    return (len == 32) ? v : (lo32(v, len) | (32'hFFFF_FFFF >> len));
  endfunction
  function automatic logic [15:0] lo16(logic [15:0] v, int len);
    return (len == 0) ? 16'h0 : ((v >> (16 - len)) << (16 - len));
  endfunction
  function automatic logic [15:0] hi16(logic [15:0] v, int len);
    return (len == 16) ? v : (lo16(v, len) | (16'hFFFF >> len));
  endfunction

  task automatic write_entry(logic addr_field, int k);
    logic [31:0] x, y;
    logic pm;
    int len;
    pm = $urandom_range(0, 1) == 1;
    x = {8'd10, 8'($urandom_range(0, 2)), 16'($urandom)};
    y = x + 32'($urandom_range(0, 70000));
    if (!addr_field) begin
      x = 32'($urandom_range(0, 3000));
      y = x + 32'($urandom_range(0, 600));
    end
    len = addr_field ? $urandom_range(8, 32) : $urandom_range(4, 16);
    a_we <= addr_field; p_we <= !addr_field;
    wr_addr <= 4'(k); wr_lb <= x; wr_ub <= y; wr_prefix <= pm; wr_len <= 6'(len);
    if (addr_field) begin
      alb[k] = pm ? lo32(x, len) : x;
      aub[k] = pm ? hi32(x, len) : y;
    end else begin
      plb[k] = pm ? lo16(x[15:0], len) : x[15:0];
      pub[k] = pm ? hi16(x[15:0], len) : y[15:0];
    end
    if (pm) n_prefix++; else n_range++;
    @(posedge clk);
  endtask

  task automatic key(logic [31:0] b, logic [15:0] pb);
    logic [NR-1:0] ea, ep;
    for (int k = 0; k < NR; k++) begin
      ea[k] = alb[k] <= b && b <= aub[k];
      ep[k] = plb[k] <= pb && pb <= pub[k];
    end
    if (ea == 0) n_none++;
    else if ($onehot(ea)) n_one++;
    else n_many++;
    a_we <= 1'b0; p_we <= 1'b0;
    a_b <= b; p_b <= pb;
    exp_a.push_back(ea); exp_p.push_back(ep); exp_t.push_back(cyc);
    @(posedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NR; k++) begin
      alb[k] = '1; aub[k] = '0; plb[k] = '1; pub[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // empty after reset
    for (int i = 0; i < 20; i++) key($urandom, 16'($urandom));
    for (int k = 0; k < NR; k++) begin
      write_entry(1'b1, k);
      write_entry(1'b0, k);
    end
    for (int round = 0; round < 20; round++) begin
      a_we <= 1'b0; p_we <= 1'b0;
      @(posedge clk);
      for (int i = 0; i < 150; i++) begin
        int k;
        logic [31:0] b;
        logic [15:0] pb;
        k = $urandom_range(0, NR - 1);
        case ($urandom_range(0, 3))
          0: b = alb[k];
          1: b = aub[k];
          2: b = alb[k] + 32'($urandom_range(0, 3)) - 32'd2;
          default: b = aub[k] + 32'($urandom_range(0, 3)) - 32'd1;
        endcase
        case ($urandom_range(0, 2))
          0: pb = plb[k] + 16'($urandom_range(0, 2)) - 16'd1;
          1: pb = pub[k] + 16'($urandom_range(0, 2)) - 16'd1;
          default: pb = 16'($urandom_range(0, 4000));
        endcase
        key(b, pb);
      end
      repeat (4) @(posedge clk);
      for (int j = 0; j < 4; j++) begin
        write_entry(1'b1, $urandom_range(0, NR - 1));
        write_entry(1'b0, $urandom_range(0, NR - 1));
      end
    end
    a_we <= 1'b0; p_we <= 1'b0;
    repeat (4) @(posedge clk);
    begin
      int cnt [6];
      cnt = '{n_prefix, n_range, n_none, n_one, n_many, 3 - exp_t.size()};
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (cnt[i] == 0 || (i == 5 && cnt[i] != 3)) begin
          failures++;
          $display("FAIL coverage item %0d = %0d", i, cnt[i]);
        end
      end
      $display("prefix writes %0d, range writes %0d, keys matching none %0d / one %0d / several %0d",
               n_prefix, n_range, n_none, n_one, n_many);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
