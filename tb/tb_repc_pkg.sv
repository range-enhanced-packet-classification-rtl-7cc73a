// tb_repc_pkg: self-checking test of the shared package's prefix helpers.
//
// For every prefix length 0..32 and random values, prefix_lb and prefix_ub
// must equal the value with its low 32-len bits cleared and set,
// computed here by shifting. Also checks that the classified-output bit
// positions are distinct and cover the six bits.
module tb_repc_pkg;
  import repc_pkg::*;
  int checks = 0;
  int failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CLS_W-1:0] seen;
    for (int len = 0; len <= 32; len++) begin
      for (int i = 0; i < 50; i++) begin
        logic [31:0] v, elo, ehi;
        v = $urandom;
        elo = (len == 0) ? 32'h0 : ((v >> (32 - len)) << (32 - len));
        ehi = (len == 32) ? v : (elo | (32'hFFFF_FFFF >> len));
        checks++;
        if (prefix_lb(v, 6'(len)) !== elo || prefix_ub(v, 6'(len)) !== ehi) begin
          failures++;
          $display("FAIL %h/%0d: [%h, %h] expected [%h, %h]", v, len,
                   prefix_lb(v, 6'(len)), prefix_ub(v, 6'(len)), elo, ehi);
        end
      end
    end
    seen = '0;
    seen[CLS_SA] = 1'b1; seen[CLS_DA] = 1'b1; seen[CLS_SP] = 1'b1;
    seen[CLS_DP] = 1'b1; seen[CLS_UDP] = 1'b1; seen[CLS_VLAN] = 1'b1;
    checks++;
    if (seen != '1) begin
      failures++;
      $display("FAIL classified bit positions overlap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
