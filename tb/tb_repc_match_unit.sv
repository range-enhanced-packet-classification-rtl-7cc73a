// tb_repc_match_unit: self-checking test of the matching unit.
//
// Applies random hit vectors (sparse, dense, empty and single-bit) with the
// valid and header-ok flags set and cleared, and checks the match
// bit-vector, the any-match flag and that best_rule is the lowest set bit,
// computed by a simple scan in the test.
module tb_repc_match_unit;
  localparam int NUM_RULES = 16;

  int checks = 0;
  int failures = 0;

  logic                         in_valid, in_ok, out_valid, any_match;
  logic [NUM_RULES-1:0]         hit, match_vec;
  logic [$clog2(NUM_RULES)-1:0] best_rule;

  repc_match_unit #(.NUM_RULES(NUM_RULES)) dut (
    .in_valid, .in_ok, .hit, .out_valid, .match_vec, .any_match, .best_rule);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int multi = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [NUM_RULES-1:0] ev;
      int eb;
      in_valid = $urandom_range(0, 7) != 0;
      in_ok = $urandom_range(0, 7) != 0;
      case ($urandom_range(0, 3))
        0: hit = '0;
        1: hit = NUM_RULES'(1) << $urandom_range(0, NUM_RULES - 1);
        2: hit = NUM_RULES'($urandom) & NUM_RULES'($urandom) & NUM_RULES'($urandom);
        default: hit = NUM_RULES'($urandom);
      endcase
      ev = (in_valid && in_ok) ? hit : '0;
      eb = 0;
      for (int r = NUM_RULES - 1; r >= 0; r--) if (ev[r]) eb = r;
      if ($countones(ev) > 1) multi++;
      #1;
      checks++;
      if (out_valid !== in_valid || match_vec !== ev || any_match !== (ev != 0) ||
          (ev != 0 && int'(best_rule) != eb)) begin
        failures++;
        if (failures < 10)
          $display("FAIL hit=%b valid=%b ok=%b: vec=%b any=%b best=%0d (expected best %0d)",
                   hit, in_valid, in_ok, match_vec, any_match, best_rule, eb);
      end
    end
    checks++;
    if (multi == 0) begin
      failures++;
      $display("FAIL no multi-rule match generated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
