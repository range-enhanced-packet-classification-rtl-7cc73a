// repc_pgu: packet generation unit of the REPC classifier.
//
// Takes the incoming frame as a stream of DATA_W-bit words framed by SoP
// (first word) and EoP (last word), checks the framing and hands one valid
// packet to the header extractor per good frame. The first HDR_BYTES bytes of
// the frame are kept in a header buffer; the payload beyond them is counted
// but not stored, since classification only reads the headers.
//
// Error checks (reported as a one-cycle pkt_err pulse with err_code):
//   PGU_NO_SOP    a word arrives outside a packet (no SoP seen)
//   PGU_DUP_SOP   SoP arrives while a packet is open; the open packet is
//                 dropped and the new one is received
//   PGU_RUNT      EoP arrives before the header buffer is full
//   PGU_OVERSIZE  the packet is longer than MAX_WORDS words
// A word with both SoP and EoP set is a one-word packet.
//
// Interface: in_data carries the frame in network byte order, the first
// byte in bits [DATA_W-1 -: 8]. There is no back-pressure; in_valid may be
// high every cycle. pkt_valid (or pkt_err) is high for one cycle, the cycle
// after the EoP word is accepted; hdr holds that packet's header bytes
// until the first header word of a later packet is accepted, which cannot be
// earlier than the same clock edge that ends the pkt_valid cycle.
// The framing signals follow the SoP/EoP description of the REPC input;
// the word width, header size, error set and maximum length are this
// design's own choices (defaults: 64-bit words, a 64-byte header buffer,
// i.e. a minimum Ethernet frame, and 1522-byte tagged frames at most).
module repc_pgu #(
  parameter int unsigned DATA_W    = 64,
  parameter int unsigned HDR_BYTES = 64,
  parameter int unsigned MAX_WORDS = 191
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_sop,
  input  logic              in_eop,
  input  logic [DATA_W-1:0] in_data,
  output logic              pkt_valid,
  output logic              pkt_err,
  output repc_pkg::pgu_err_e err_code,
  output logic [7:0]        hdr [HDR_BYTES]
);
  import repc_pkg::*;

  localparam int unsigned WB        = DATA_W / 8;      // bytes per word
  localparam int unsigned HDR_WORDS = HDR_BYTES / WB;  // words in the header buffer
  localparam int unsigned CW        = $clog2(MAX_WORDS + 2);

  logic          in_pkt;     // a packet is open
  logic [CW-1:0] words;      // words received in the open packet
  logic          oversize;   // the open packet passed MAX_WORDS

  // Word index within the packet of the word being accepted
  logic [CW-1:0] idx;
  logic [CW-1:0] cnt_next;
  assign idx      = in_sop ? '0 : words;
  assign cnt_next = (idx == CW'(MAX_WORDS + 1)) ? idx : idx + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      words     <= '0;
      oversize  <= 1'b0;
      pkt_valid <= 1'b0;
      pkt_err   <= 1'b0;
      err_code  <= PGU_OK;
    end else begin
      pkt_valid <= 1'b0;
      pkt_err   <= 1'b0;
      if (in_valid) begin
        if (!in_sop && !in_pkt) begin
          pkt_err  <= 1'b1;
          err_code <= PGU_NO_SOP;
        end else begin
          if (in_sop && in_pkt) begin
            pkt_err  <= 1'b1;
            err_code <= PGU_DUP_SOP;
          end
          if (in_eop) begin
            in_pkt <= 1'b0;
            if (oversize && !in_sop || cnt_next > CW'(MAX_WORDS)) begin
              pkt_err  <= 1'b1;
              err_code <= PGU_OVERSIZE;
            end else if (cnt_next < CW'(HDR_WORDS)) begin
              pkt_err  <= 1'b1;
              err_code <= PGU_RUNT;
            end else begin
              pkt_valid <= 1'b1;
              err_code  <= PGU_OK;
            end
            words    <= '0;
            oversize <= 1'b0;
          end else begin
            in_pkt   <= 1'b1;
            words    <= cnt_next;
            oversize <= (oversize && !in_sop) || cnt_next > CW'(MAX_WORDS);
          end
        end
      end
    end
  end

  // Header buffer: word idx fills bytes idx*WB .. idx*WB+WB-1
  always_ff @(posedge clk) begin
    if (in_valid && (in_sop || in_pkt) && idx < CW'(HDR_WORDS)) begin
      for (int unsigned w = 0; w < HDR_WORDS; w++) begin
        if (idx == CW'(w)) begin
          for (int unsigned k = 0; k < WB; k++)
            hdr[w*WB + k] <= in_data[DATA_W-1-8*k -: 8];
        end
      end
    end
  end

  initial begin
    assert (DATA_W % 8 == 0 && HDR_BYTES % (DATA_W / 8) == 0)
      else $error("repc_pgu: DATA_W must be whole bytes and divide the header buffer");
  end

endmodule
