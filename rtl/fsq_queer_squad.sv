// fsq_queer_squad: the "queer" multiply-add processor. It computes x*y + z bit-serially
// with N simple machines and a broadcast rail.
//
// The current bits of x and y go onto a two-bit rail that every machine senses in the
// same clock. Machine j starts at clock j: it stores x_j,y_j and from then on adds
// x_j*y_t + x_t*y_j into its accumulator. z enters as the leftmost machine's r2 from
// the left. The rail has to reach all N machines within one clock, so the clock period
// grows with N. This version trades that for much simpler machines.
// The protocol is the same as fsq_straight_squad:
//  - clocks 0..2N-1: run=1, and x_bit/y_bit/z_bit carry bit t, LSB first, with sign or
//    zero replicas from clock N on.
//  - clocks 1..2N: out_bit carries result bit t-1.
//  - clock 2N: run=0. This resets the processor, and the next operation may start at 2N+1.
// One reset clock is needed after power-up. The machine count and rules follow the queer
// version. The default N is this design's own choice.
module fsq_queer_squad
  import fsq_pkg::*;
#(
  parameter int unsigned N = 16  // operand width in bits = number of machines
) (
  input  logic clk,
  input  logic run,     // 1: officer senses s=1 (compute); 0: reset
  input  logic x_bit,   // goes onto the rail
  input  logic y_bit,   // goes onto the rail
  input  logic z_bit,   // enters as the leftmost machine's r2 from the left
  output logic out_bit  // r0 of the leftmost machine
);

  queer_link_t link [N+1];
  logic        r0   [N+1];

  assign link[0] = '{s: run, r2: z_bit};
  assign r0[N]   = 1'b0;

  for (genvar j = 0; j < N; j++) begin : g_cell
    fsq_queer_cell u_cell (
      .clk      (clk),
      .left     (link[j]),
      .rail_p   (x_bit),
      .rail_q   (y_bit),
      .r0_right (r0[j+1]),
      .right    (link[j+1]),
      .r0       (r0[j])
    );
  end

  assign out_bit = r0[0];

endmodule
