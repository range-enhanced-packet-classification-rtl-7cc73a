// repc_field_unit: range table and RBVE matchers of one range field.
//
// REPC keeps the distinct ranges of each field once, however many rules
// use them, since a field has fewer distinct ranges than the rule set has
// rules. This unit holds NUM_RANGES [lb, ub] entries for one field (IP
// source address, IP destination address, source port or destination
// port) and one RBVE matcher per entry, so each packet's field value is
// tested against every entry in parallel. match[k] tells whether the
// value lies in entry k; the rules pick the bit they need by index.
//
// Writing: wr_en writes entry wr_addr with [wr_lb, wr_ub]. With wr_prefix
// set, wr_lb is a prefix value and wr_len (0..W) its length; the entry then
// holds lb = value & mask, ub = value | ~mask. Reset empties every entry
// (lb = all ones, ub = 0), so that it matches nothing.
//
// Timing: b is sampled at a rising edge and match is valid two cycles
// later (the RBVE latency); a write is used from the next edge on.
// Keeping one table per field and matching all entries at once follows
// the REPC description; the write port, reset and prefix conversion are
// this design's own choices.
module repc_field_unit #(
  parameter int unsigned W          = 32,
  parameter int unsigned D          = 8,
  parameter int unsigned NUM_RANGES = repc_pkg::NUM_RANGES
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           wr_en,
  input  logic [$clog2(NUM_RANGES)-1:0]  wr_addr,
  input  logic [W-1:0]                   wr_lb,
  input  logic [W-1:0]                   wr_ub,
  input  logic                           wr_prefix,
  input  logic [5:0]                     wr_len,
  input  logic [W-1:0]                   b,
  output logic [NUM_RANGES-1:0]          match
);
  import repc_pkg::*;

  logic [W-1:0] lb [NUM_RANGES];
  logic [W-1:0] ub [NUM_RANGES];
  logic [31:0]  mask32;
  logic [W-1:0] mask;

  assign mask32 = prefix_mask(wr_len);
  assign mask   = mask32[31 -: W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NUM_RANGES; k++) begin
        lb[k] <= '1;
        ub[k] <= '0;
      end
    end else if (wr_en) begin
      lb[wr_addr] <= wr_prefix ? (wr_lb & mask)  : wr_lb;
      ub[wr_addr] <= wr_prefix ? (wr_lb | ~mask) : wr_ub;
    end
  end

  for (genvar k = 0; k < NUM_RANGES; k++) begin : g_rbve
    repc_rbve #(.W(W), .D(D)) u_rbve (
      .clk, .rst_n, .b, .lb(lb[k]), .ub(ub[k]), .match(match[k]));
  end

  initial begin
    assert (W <= 32 && NUM_RANGES >= 2 && NUM_RANGES <= 2 ** RIDX_W)
      else $error("repc_field_unit: W <= 32 and 2 <= NUM_RANGES <= 2**RIDX_W");
  end

endmodule
