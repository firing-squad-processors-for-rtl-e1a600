// fsq_straight_cell: one machine ("soldier") of the straight firing-squad multiply-add
// processor.
//
// State: six data bits p0,q0,p1,q1,p,q, a 3-bit accumulator r = {r2,r1,r0} and a 2-bit
// switch s. The next state depends only on this state, on p,q,r2,s of the left
// neighbour (the `left` link) and on r0 of the right neighbour (`r0_right`).
//  - Switch: left.s = 0 clears the whole machine (the reset that sweeps left to right).
//    left.s = 3 advances s by one, saturating at 3. Otherwise s is held at 0.
//  - Data: s=0 loads the pair (p0,q0) from the left neighbour, and s=1 loads (p1,q1).
//    p follows the left neighbour from s>=1 and q from s>=2, so both pass the operand
//    streams on with one clock delay.
//  - Accumulator: r <= s1*r0_right + r1 + r2_left + P*q_left + p_left*q0 + p1*q + p*q1,
//    where P is p_left when s=0 and p0 otherwise. The sum is at most 7, so it always
//    fits in r.
// This is the single-formula hardware form of the four per-switch sums. Its only
// multiplexer is the one for P. The rightmost machine must be given r0_right = 0.
// Clearing data bits and accumulator on reset, not only the switch, is this design's
// choice: the single formula needs those bits to be zero before a machine starts.
// Timing: one state update per rising clock edge. The outputs are the registers.
module fsq_straight_cell
  import fsq_pkg::*;
(
  input  logic           clk,
  input  straight_link_t left,      // p, q, r2, s of the left neighbour
  input  logic           r0_right,  // r0 of the right neighbour (0 for the rightmost)
  output straight_link_t right,     // p, q, r2, s of this machine
  output logic           r0         // r0 of this machine, seen by the left neighbour
);

  sw_t        s;
  logic       p0, q0, p1, q1, p, q;
  logic [2:0] r;

  logic       pp;      // P: p_left before the first pair is stored, p0 afterwards
  logic [2:0] r_next;

  always_comb begin
    pp     = (s == SW_FIRST) ? left.p : p0;
    r_next = 3'(s[1] & r0_right) + 3'(r[1]) + 3'(left.r2)
           + 3'(pp & left.q) + 3'(left.p & q0) + 3'(p1 & q) + 3'(p & q1);
  end

  always_ff @(posedge clk) begin
    if (left.s == SW_FIRST) begin
      s  <= SW_FIRST;
      p0 <= 1'b0; q0 <= 1'b0;
      p1 <= 1'b0; q1 <= 1'b0;
      p  <= 1'b0; q  <= 1'b0;
      r  <= 3'd0;
    end else begin
      if (left.s == SW_RUN) s <= (s == SW_RUN) ? SW_RUN : s + 2'd1;
      else                  s <= SW_FIRST;
      if (s == SW_FIRST)  begin p0 <= left.p; q0 <= left.q; end
      if (s == SW_SECOND) begin p1 <= left.p; q1 <= left.q; end
      if (s != SW_FIRST)  p <= left.p;
      if (s >= SW_THIRD)  q <= left.q;
      r <= r_next;
    end
  end

  assign right = '{p: p, q: q, r2: r[2], s: s};
  assign r0    = r[0];

endmodule
