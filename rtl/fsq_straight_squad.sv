// fsq_straight_squad: the straight firing-squad processor, which computes x*y + z
// bit-serially.
//
// The processor is a row of M = floor(N/2)+1 identical fsq_straight_cell machines. The
// environment is the left neighbour of the leftmost machine (the "officer"). While
// `run` is 1 the officer senses switch value 3, and while it is 0 it senses 0, which
// resets the squad. The reset sweeps right one machine per clock. Machine j stores bits
// 2j and 2j+1 of x and y and passes the rest of the streams on. Partial sums travel right
// as r2 carries and come back as r0 bits.
// Protocol for an operation starting at clock time 0:
//  - clocks 0..2N-1: run=1, and x_bit/y_bit/z_bit carry bit t of x, y and z, LSB first.
//    From clock N on they carry copies of the sign bit (two's complement) or zeros
//    (unsigned).
//  - clocks 1..2N: out_bit carries bit t-1 of the 2N-bit result x*y+z.
//  - clock 2N: run=0. This is the reset, and the next operation may start at 2N+1.
// The squad needs one reset clock (run=0) after power-up before its first operation.
// Machine count and I/O timing follow the straight version's rules. N is this design's
// own choice of default width.
module fsq_straight_squad
  import fsq_pkg::*;
#(
  parameter int unsigned N = 16  // operand width in bits
) (
  input  logic clk,
  input  logic run,     // 1: officer senses s=3 (compute); 0: officer senses s=0 (reset)
  input  logic x_bit,   // bit of x at this clock time
  input  logic y_bit,   // bit of y
  input  logic z_bit,   // bit of z (enters as the officer's r2 from the left)
  output logic out_bit  // r0 of the leftmost machine: result bit (clock time - 1)
);

  localparam int unsigned M = N / 2 + 1;  // number of machines

  straight_link_t link [M+1];  // link[j] is the left input of machine j
  logic           r0   [M+1];  // r0[j] is r0 of machine j; r0[M] is the tied-off right end

  assign link[0] = '{p: x_bit, q: y_bit, r2: z_bit, s: run ? SW_RUN : SW_FIRST};
  assign r0[M]   = 1'b0;

  for (genvar j = 0; j < M; j++) begin : g_cell
    fsq_straight_cell u_cell (
      .clk      (clk),
      .left     (link[j]),
      .r0_right (r0[j+1]),
      .right    (link[j+1]),
      .r0       (r0[j])
    );
  end

  assign out_bit = r0[0];

endmodule
