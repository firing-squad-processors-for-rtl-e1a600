// fsq_queer_cell: one machine of the "queer" multiply-add processor.
//
// State: a 1-bit switch s, two data bits p0,q0 and a 3-bit accumulator r = {r2,r1,r0}.
// Every machine sees the broadcast rail (rail_p, rail_q), which carries the current bits
// of x and y. It also sees s and r2 of its left neighbour and r0 of its right neighbour.
//  - left.s = 0 clears the machine (the reset sweeps left to right, one machine per clock).
//  - When the left neighbour has started and this machine has not (s=0), the machine
//    starts. It stores the rail bits in p0,q0 and sets s. This captures x_j,y_j in
//    machine j.
//  - Accumulator: r <= s*r0_right + r1 + r2_left + P*rail_q + rail_p*q0, with P = rail_p
//    while s=0 and p0 afterwards. At the start step this is r2_left + p*q, because r1 and
//    q0 are still cleared. Once running it is r0_right + r1 + r2_left + p0*q + p*q0.
//    The sum is at most 5.
// Clearing p0,q0 and r on reset is this design's choice. The rightmost machine must be
// given r0_right = 0.
// Timing: one state update per rising clock edge. The outputs are the registers.
module fsq_queer_cell
  import fsq_pkg::*;
(
  input  logic        clk,
  input  queer_link_t left,      // s and r2 of the left neighbour
  input  logic        rail_p,    // rail: current x bit
  input  logic        rail_q,    // rail: current y bit
  input  logic        r0_right,  // r0 of the right neighbour (0 for the rightmost)
  output queer_link_t right,     // s and r2 of this machine
  output logic        r0
);

  logic       s, p0, q0;
  logic [2:0] r;
  logic       pp;
  logic [2:0] r_next;

  always_comb begin
    pp     = s ? p0 : rail_p;
    r_next = 3'(s & r0_right) + 3'(r[1]) + 3'(left.r2) + 3'(pp & rail_q) + 3'(rail_p & q0);
  end

  always_ff @(posedge clk) begin
    if (!left.s) begin
      s  <= 1'b0;
      p0 <= 1'b0;
      q0 <= 1'b0;
      r  <= 3'd0;
    end else begin
      if (!s) begin
        s  <= 1'b1;
        p0 <= rail_p;
        q0 <= rail_q;
      end
      r <= r_next;
    end
  end

  assign right = '{s: s, r2: r[2]};
  assign r0    = r[0];

endmodule
