// repc_rbve: range bit-vector encoding (RBVE) matcher for one range of one
// field (one entry of a field's range table).  match = (lb <= b <= ub),
// computed slice by slice.
//
// How it works. The W-bit key b and the bounds lb, ub are cut into J = W/D
// slices of D bits (the stride), slice 1 being the most significant. Each
// slice is one "stage" of the RBVE:
//   * stage 1 gives a 3-bit code x = {x2,x1,x0}:
//       111  lb1 < b1 < ub1          match, later slices do not matter
//       001  b1 == ub1, lb1 < ub1    match so far, decided by the UB slices
//       010  b1 == lb1 == ub1        match so far, decided by LB and UB slices
//       100  b1 == lb1, lb1 < ub1    match so far, decided by the LB slices
//       000  otherwise               mismatch
//   * intermediate stages 2..J-1 give y = {b==ub, b<ub, b==lb, b>lb};
//   * the last stage J gives z = {b<=ub, b>=lb}.
// The stage codes are registered, and the next cycle combines them:
//   m1 = x2 & x1 & x0
//   LB chain:  x2 & (y_2 b==lb) & ... & (y_k b>lb), ending with z0
//   UB chain:  x0 & (y_2 b==ub) & ... & (y_k b<ub), ending with z1
//   both-chain (x1): while lb and ub slices are equal and b equals them the
//     code stays "both"; at the first slice where lb < ub it becomes a match
//     (lb < b < ub), an LB chain (b == lb) or a UB chain (b == ub).
// For J = 4 the two single chains are exactly the three terms m2, m3, m4 of
// the RBVE equations, and the match is their OR with m1 and the both-chain
// term m5. The both-chain term here follows every slice where lb and ub
// are still equal, so a range whose bounds share a leading slice (a prefix
// such as 10.0.0.0/8) is matched completely; the stage codes are those of
// the RBVE tables.
//
// Interface and timing: b, lb and ub are sampled at a rising edge; match is
// valid two cycles later (stage-code register, then match register). The
// module has no stall: it accepts a new key every cycle.
// Parameters: W (field width) and D (stride), W a multiple of D with
// W/D >= 2; defaults are the address field, 32 bits in 8-bit slices.
module repc_rbve #(
  parameter int unsigned W = 32,
  parameter int unsigned D = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] b,
  input  logic [W-1:0] lb,
  input  logic [W-1:0] ub,
  output logic         match
);

  localparam int unsigned J = W / D;   // number of stages
  localparam int NI = int'(J) - 2;  // intermediate stages

  // Slice i (0-based, 0 = most significant) of a W-bit value
  function automatic logic [D-1:0] slice(input logic [W-1:0] v, input int i);
    return v[W-1-i*D -: D];
  endfunction

  logic [2:0] x_d, x_q;
  logic [3:0] y_d [NI > 0 ? NI : 1];
  logic [3:0] y_q [NI > 0 ? NI : 1];
  logic [1:0] z_d, z_q;

  // Stage encoding
  always_comb begin
    logic [D-1:0] b1, l1, u1, bj, lj, uj;
    b1 = slice(b, 0);
    l1 = slice(lb, 0);
    u1 = slice(ub, 0);
    x_d = 3'b000;
    if (l1 < b1 && b1 < u1)           x_d = 3'b111;
    else if (b1 == l1 && b1 == u1)    x_d = 3'b010;
    else if (b1 == u1 && l1 < u1)     x_d = 3'b001;
    else if (b1 == l1 && l1 < u1)     x_d = 3'b100;

    for (int k = 0; k < (NI > 0 ? NI : 1); k++) begin
      logic [D-1:0] bi, li, ui;
      bi = slice(b, k + 1);
      li = slice(lb, k + 1);
      ui = slice(ub, k + 1);
      y_d[k] = (NI > 0) ? {bi == ui, bi < ui, bi == li, bi > li} : 4'b0000;
    end

    bj = slice(b, int'(J) - 1);
    lj = slice(lb, int'(J) - 1);
    uj = slice(ub, int'(J) - 1);
    z_d = {bj <= uj, bj >= lj};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      z_q <= '0;
      for (int k = 0; k < (NI > 0 ? NI : 1); k++) y_q[k] <= '0;
    end else begin
      x_q <= x_d;
      z_q <= z_d;
      for (int k = 0; k < (NI > 0 ? NI : 1); k++) y_q[k] <= y_d[k];
    end
  end

  // Match combination over the registered stage codes
  logic m_d;
  always_comb begin
    logic m1, m_lb, m_ub, m5;
    logic lb_run, ub_run;            // chains entered at stage 1
    logic both, lb5, ub5, lb5_n, ub5_n;  // chains entered from the both-code
    m1     = &x_q;
    lb_run = x_q[2] & ~x_q[1];
    ub_run = x_q[0] & ~x_q[1];
    m_lb   = 1'b0;
    m_ub   = 1'b0;
    both   = x_q[1] & ~x_q[0];
    lb5    = 1'b0;
    ub5    = 1'b0;
    m5     = 1'b0;
    for (int k = 0; k < NI; k++) begin
      m_lb   = m_lb | (lb_run & y_q[k][0]);
      lb_run = lb_run & y_q[k][1];
      m_ub   = m_ub | (ub_run & y_q[k][2]);
      ub_run = ub_run & y_q[k][3];

      m5    = m5 | (lb5 & y_q[k][0]) | (ub5 & y_q[k][2]) | (both & y_q[k][0] & y_q[k][2]);
      lb5_n = (lb5 & y_q[k][1]) | (both & y_q[k][1] & y_q[k][2]);
      ub5_n = (ub5 & y_q[k][3]) | (both & y_q[k][3] & y_q[k][0]);
      both  = both & y_q[k][1] & y_q[k][3];
      lb5   = lb5_n;
      ub5   = ub5_n;
    end
    m_lb = m_lb | (lb_run & z_q[0]);
    m_ub = m_ub | (ub_run & z_q[1]);
    m5   = m5 | (lb5 & z_q[0]) | (ub5 & z_q[1]) | (both & z_q[0] & z_q[1]);
    m_d  = m1 | m_lb | m_ub | m5;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match <= 1'b0;
    else        match <= m_d;
  end

  initial begin
    assert (W % D == 0 && W / D >= 2)
      else $error("repc_rbve: W must be a multiple of D with W/D >= 2");
  end

endmodule
