// tb_repc_rule_table: self-checking test of the rule store.
//
// Checks that reset clears every rule, then writes random rules to random
// entries, with idle cycles between some writes, and after every cycle
// compares all entries with a model array kept by the test.
module tb_repc_rule_table;
  import repc_pkg::*;
  localparam int NUM_RULES = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                         wr_en = 1'b0;
  logic [$clog2(NUM_RULES)-1:0] wr_addr = '0;
  rule_t                        wr_rule = '0;
  rule_t                        rules [NUM_RULES];
  rule_t                        model [NUM_RULES];

  repc_rule_table #(.NUM_RULES(NUM_RULES)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_rule, .rules);

  task automatic compare_all(string what);
    checks++;
    for (int r = 0; r < NUM_RULES; r++)
      if (rules[r] !== model[r]) begin
        failures++;
        $display("FAIL %s: entry %0d differs", what, r);
        break;
      end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int writes = 0;
    for (int r = 0; r < NUM_RULES; r++) model[r] = '0;
    repeat (2) @(negedge clk);
    compare_all("during reset");
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      logic we;
      @(negedge clk);
      we = $urandom_range(0, 3) != 0;
      wr_en = we;
      wr_addr = 4'($urandom_range(0, NUM_RULES - 1));
      wr_rule = rule_t'({$urandom, $urandom});
      @(negedge clk);
      if (we) begin
        model[wr_addr] = wr_rule;
        writes++;
      end
      wr_en = 1'b0;
      compare_all("after write");
    end
    checks++;
    if (writes == 0) begin
      failures++;
      $display("FAIL no write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
