// tb_repc_pgu: self-checking test of the packet generation unit.
//
// Sends a random mix of good frames (8 to 40 words), frames that are too
// short, frames longer than MAX_WORDS (reduced to 24 here), frames cut off
// by a new SoP, stray words outside any frame, one-word frames and idle
// gaps. For every word accepted the expected outcome is worked out by the
// test, and the PGU's pulse must appear exactly one cycle after the EoP (or
// stray) word with the right error code; for good frames the header buffer
// must hold the frame's first 64 bytes. Each error kind must occur.
module tb_repc_pgu;
  import repc_pkg::*;
  localparam int DATA_W = 64;
  localparam int HDR_BYTES = 64;
  localparam int MAX_WORDS = 24;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic              in_valid = 1'b0, in_sop = 1'b0, in_eop = 1'b0;
  logic [DATA_W-1:0] in_data = '0;
  logic              pkt_valid, pkt_err;
  pgu_err_e          err_code;
  logic [7:0]        hdr [HDR_BYTES];

  repc_pgu #(.DATA_W(DATA_W), .HDR_BYTES(HDR_BYTES), .MAX_WORDS(MAX_WORDS)) dut (
    .clk, .rst_n, .in_valid, .in_sop, .in_eop, .in_data, .pkt_valid, .pkt_err, .err_code, .hdr);

  // Expected event for the next cycle
  logic       exp_pulse = 1'b0;
  pgu_err_e   exp_code = PGU_OK;
  logic [7:0] exp_hdr [HDR_BYTES];
  int         kind_cnt [5];

  // Checker: at each edge compare the outputs registered at the previous
  // edge with what that edge's word should have produced.
  task automatic check_now();
    checks++;
    if (pkt_valid !== (exp_pulse && exp_code == PGU_OK) ||
        pkt_err !== (exp_pulse && exp_code != PGU_OK)) begin
      failures++;
      $display("FAIL t=%0t valid=%0b err=%0b expected pulse=%0b code=%0d",
               $time, pkt_valid, pkt_err, exp_pulse, exp_code);
    end else if (pkt_err && err_code != exp_code) begin
      failures++;
      $display("FAIL t=%0t err_code=%0d expected %0d", $time, err_code, exp_code);
    end
    if (exp_pulse) kind_cnt[int'(exp_code)]++;
    if (exp_pulse && exp_code == PGU_OK) begin
      checks++;
      for (int i = 0; i < HDR_BYTES; i++)
        if (hdr[i] !== exp_hdr[i]) begin
          failures++;
          $display("FAIL header byte %0d = %02x expected %02x", i, hdr[i], exp_hdr[i]);
          break;
        end
    end
  endtask

  // Model state
  logic m_in_pkt = 1'b0;
  int   m_words = 0;
  logic [7:0] m_hdr [HDR_BYTES];

  // Present one word for one cycle, update the model, check at the next edge
  task automatic word(logic v, logic sop, logic eop);
    logic [DATA_W-1:0] d;
    d = {$urandom, $urandom};
    in_valid <= v; in_sop <= sop; in_eop <= eop; in_data <= d;
    @(posedge clk);
    // the edge just taken registers the outcome of this word
    #1;
    exp_pulse = 1'b0;
    if (v) begin
      if (!sop && !m_in_pkt) begin
        exp_pulse = 1'b1; exp_code = PGU_NO_SOP;
      end else begin
        if (sop && m_in_pkt) begin
          exp_pulse = 1'b1; exp_code = PGU_DUP_SOP;
        end
        if (sop) m_words = 0;
        if (m_words < HDR_BYTES / 8)
          for (int k = 0; k < 8; k++) m_hdr[m_words * 8 + k] = d[63 - 8 * k -: 8];
        m_words++;
        if (eop) begin
          exp_pulse = 1'b1;
          if (m_words > MAX_WORDS)          exp_code = PGU_OVERSIZE;
          else if (m_words < HDR_BYTES / 8) exp_code = PGU_RUNT;
          else begin
            exp_code = PGU_OK;
            exp_hdr = m_hdr;
          end
          m_in_pkt = 1'b0;
        end else m_in_pkt = 1'b1;
      end
    end
    check_now();
  endtask

  task automatic frame(int n);
    for (int i = 0; i < n; i++) word(1'b1, i == 0, i == n - 1);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    frame(8);
    frame(12);
    word(1'b1, 1'b0, 1'b0);            // stray word
    frame(3);                          // runt
    frame(MAX_WORDS + 3);              // oversize
    frame(MAX_WORDS);                  // longest good frame
    for (int i = 0; i < 5; i++) word(1'b1, i == 0, 1'b0);
    frame(9);                          // cuts off the open frame
    word(1'b1, 1'b1, 1'b1);            // one-word frame
    word(1'b1, 1'b0, 1'b1);            // EoP without SoP
    for (int i = 0; i < 300; i++) begin
      int r;
      r = $urandom_range(0, 9);
      case (r)
        0: word(1'b0, 1'b0, 1'b0);
        1: word(1'b1, 1'b0, $urandom_range(0, 1) == 1);
        2: frame($urandom_range(1, 7));
        3: frame($urandom_range(MAX_WORDS + 1, MAX_WORDS + 6));
        4: begin
          int n;
          n = $urandom_range(1, 10);
          for (int k = 0; k < n; k++) word(1'b1, k == 0, 1'b0);
        end
        default: frame($urandom_range(8, MAX_WORDS));
      endcase
    end
    word(1'b0, 1'b0, 1'b0);
    word(1'b0, 1'b0, 1'b0);
    for (int c = 0; c < 5; c++) begin
      checks++;
      if (kind_cnt[c] == 0) begin
        failures++;
        $display("FAIL outcome %0d never happened", c);
      end
    end
    $display("outcomes ok:%0d no_sop:%0d dup_sop:%0d runt:%0d oversize:%0d",
             kind_cnt[0], kind_cnt[1], kind_cnt[2], kind_cnt[3], kind_cnt[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
