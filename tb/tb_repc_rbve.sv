// tb_repc_rbve: self-checking test of the RBVE range matcher.
//
// Two instances are tested side by side: the address configuration
// (32 bits, stride 8) and the port configuration (16 bits, stride 4).
// A new key and range enter every cycle; the expected result,
// lb <= b <= ub computed directly on the whole words, is compared two
// cycles later, which also checks the two-cycle latency. The stimulus
// mixes directed corner cases (bounds equal to the key, bounds sharing
// leading slices, single-value ranges, empty ranges with lb > ub) with
// random ranges built so that every stage code of the first slice
// (111, 001, 010, 100, 000) occurs; each code's count is checked.
module tb_repc_rbve;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [31:0] a_b, a_lb, a_ub;
  logic [15:0] p_b, p_lb, p_ub;
  logic a_m, p_m;

  repc_rbve #(.W(32), .D(8)) dut_a (.clk, .rst_n, .b(a_b), .lb(a_lb), .ub(a_ub), .match(a_m));
  repc_rbve #(.W(16), .D(4)) dut_p (.clk, .rst_n, .b(p_b), .lb(p_lb), .ub(p_ub), .match(p_m));

  logic exp_a [$];
  logic exp_p [$];
  int   exp_t [$];   // cycle in which the inputs were driven
  int   cyc = 0;
  int code_cnt [5];  // 0:111 1:001 2:010 3:100 4:000
  int a_hits = 0, a_miss = 0;

  // Make a value that shares the first n slices of 'base' and is random after
  function automatic logic [31:0] share32(logic [31:0] base, int n);
    logic [31:0] r = $urandom;
    logic [31:0] m = (n == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> (8 * n));
    return (base & m) | (r & ~m);
  endfunction
  function automatic logic [15:0] share16(logic [15:0] base, int n);
    logic [15:0] r = 16'($urandom);
    logic [15:0] m = (n == 0) ? 16'h0 : ~(16'hFFFF >> (4 * n));
    return (base & m) | (r & ~m);
  endfunction

  function automatic int code_of(logic [7:0] b1, logic [7:0] l1, logic [7:0] u1);
    if (l1 < b1 && b1 < u1) return 0;
    if (b1 == u1 && b1 == l1) return 2;
    if (b1 == u1 && l1 < u1) return 1;
    if (b1 == l1 && l1 < u1) return 3;
    return 4;
  endfunction

  task automatic drive(logic [31:0] b, logic [31:0] lb, logic [31:0] ub,
                       logic [15:0] pb, logic [15:0] plb, logic [15:0] pub);
    a_b <= b; a_lb <= lb; a_ub <= ub;
    p_b <= pb; p_lb <= plb; p_ub <= pub;
    exp_a.push_back(lb <= b && b <= ub);
    exp_p.push_back(plb <= pb && pb <= pub);
    exp_t.push_back(cyc);
    code_cnt[code_of(b[31:24], lb[31:24], ub[31:24])]++;
    if (lb <= b && b <= ub) a_hits++; else a_miss++;
  endtask

  // Inputs driven after edge k are sampled at edge k+1 (stage codes) and
  // k+2 (match), so the result is read at edge k+3, before it changes.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (exp_t.size() > 0 && exp_t[0] + 3 == cyc) begin
        logic ea, ep;
        void'(exp_t.pop_front());
        ea = exp_a.pop_front();
        ep = exp_p.pop_front();
        checks += 2;
        if (a_m !== ea) begin
          failures++;
          $display("FAIL addr match=%0b expected %0b", a_m, ea);
        end
        if (p_m !== ep) begin
          failures++;
          $display("FAIL port match=%0b expected %0b", p_m, ep);
        end
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] lb, ub, b;
    logic [15:0] plb, pub, pb;
    a_b = 0; a_lb = 0; a_ub = 0; p_b = 0; p_lb = 0; p_ub = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // the first drive is compared two edges later
    @(posedge clk);
    // directed corner cases
    drive(32'h0A05_0000, 32'h0A00_0000, 32'h0AFF_FFFF, 16'h0050, 16'h0050, 16'h0050); @(posedge clk);
    drive(32'h0A00_0000, 32'h0A00_0000, 32'h0AFF_FFFF, 16'h0051, 16'h0050, 16'h0050); @(posedge clk);
    drive(32'h0AFF_FFFF, 32'h0A00_0000, 32'h0AFF_FFFF, 16'h04FF, 16'h0400, 16'h04FF); @(posedge clk);
    drive(32'h0B00_0000, 32'h0A00_0000, 32'h0AFF_FFFF, 16'h0500, 16'h0400, 16'h04FF); @(posedge clk);
    drive(32'h09FF_FFFF, 32'h0A00_0000, 32'h0AFF_FFFF, 16'h03FF, 16'h0400, 16'h04FF); @(posedge clk);
    drive(32'hC0A8_0164, 32'hC0A8_0164, 32'hC0A8_0164, 16'h1234, 16'h1235, 16'h1233); @(posedge clk);
    drive(32'hC0A8_0163, 32'hC0A8_0164, 32'hC0A8_0164, 16'h0000, 16'h0000, 16'hFFFF); @(posedge clk);
    drive(32'h1234_5678, 32'h1234_5679, 32'h1234_5677, 16'hFFFF, 16'h0000, 16'hFFFF); @(posedge clk);
    drive(32'h1234_5678, 32'h1200_0000, 32'h1234_5678, 16'h8000, 16'h7FFF, 16'h8000); @(posedge clk);
    drive(32'h1234_5679, 32'h1200_0000, 32'h1234_5678, 16'h8001, 16'h7FFF, 16'h8000); @(posedge clk);
    drive(32'h1200_0000, 32'h1200_0000, 32'h1234_5678, 16'h7FFF, 16'h7FFF, 16'h8000); @(posedge clk);
    drive(32'h11FF_FFFF, 32'h1200_0000, 32'h1234_5678, 16'h7FFE, 16'h7FFF, 16'h8000); @(posedge clk);
    // random ranges whose bounds share 0..3 leading slices, keys near the bounds
    for (int i = 0; i < 6000; i++) begin
      int n, sel;
      lb = $urandom;
      ub = share32(lb, $urandom_range(0, 3));
      if (lb > ub && $urandom_range(0, 3) != 0) begin
        b = lb; lb = ub; ub = b;
      end
      sel = $urandom_range(0, 4);
      n = $urandom_range(0, 4);
      case (sel)
        0: b = share32(lb, n);
        1: b = share32(ub, n);
        2: b = lb + 32'($signed($urandom_range(0, 4)) - 2);
        3: b = ub + 32'($signed($urandom_range(0, 4)) - 2);
        default: b = $urandom;
      endcase
      plb = 16'($urandom);
      pub = share16(plb, $urandom_range(0, 3));
      if (plb > pub && $urandom_range(0, 3) != 0) begin
        pb = plb; plb = pub; pub = pb;
      end
      case ($urandom_range(0, 3))
        0: pb = share16(plb, $urandom_range(0, 4));
        1: pb = share16(pub, $urandom_range(0, 4));
        2: pb = plb + 16'($signed($urandom_range(0, 2)) - 1);
        default: pb = pub + 16'($signed($urandom_range(0, 2)) - 1);
      endcase
      drive(b, lb, ub, pb, plb, pub);
      @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_t.size() != 0) begin
      failures++;
      $display("FAIL %0d results never compared", exp_t.size());
    end
    // every first-stage code, and both outcomes, must have been exercised
    for (int c = 0; c < 5; c++) begin
      checks++;
      if (code_cnt[c] == 0) begin
        failures++;
        $display("FAIL stage-1 code %0d never exercised", c);
      end
    end
    checks++;
    if (a_hits < 100 || a_miss < 100) begin
      failures++;
      $display("FAIL too few hits (%0d) or misses (%0d)", a_hits, a_miss);
    end
    $display("stage-1 codes 111:%0d 001:%0d 010:%0d 100:%0d 000:%0d hits:%0d misses:%0d",
             code_cnt[0], code_cnt[1], code_cnt[2], code_cnt[3], code_cnt[4], a_hits, a_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
