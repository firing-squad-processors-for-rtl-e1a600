// fsq_pkg: types and helpers shared by the firing-squad multiply-add processors.
//
// A squad is a row of identical machines. Each machine looks at its own state and at
// a few bits of its two neighbours. The bits that travel from a machine to its right
// neighbour are bundled here as packed structs, one for each version of the processor.
// The bit that travels leftwards (the right neighbour's r0) is a plain wire.
// The switch values follow the rules of the straight version: 0 takes the first
// operand bits, 1 takes the second, 2 and 3 pass the stream on, and 3 is "running".
// A left neighbour that shows switch 0 resets the machine.
// stream_bit() returns the bit that is fed to a processor at a given clock time. For
// the first N clocks it is a bit of the word. After that it is a copy of the sign bit
// for two's-complement operands, or zero for unsigned ones.
package fsq_pkg;

  typedef logic [1:0] sw_t;

  localparam sw_t SW_FIRST  = 2'd0;  // reset / waiting for the first operand bits
  localparam sw_t SW_SECOND = 2'd1;  // holding the first pair, taking the second
  localparam sw_t SW_THIRD  = 2'd2;  // holding both pairs, first stream bit arrives
  localparam sw_t SW_RUN    = 2'd3;  // streaming; the right neighbour may count up

  // Left-to-right neighbour signals of the straight version.
  typedef struct packed {
    logic p;    // streamed x bit
    logic q;    // streamed y bit
    logic r2;   // carry-out bit of the accumulator (weight 4)
    sw_t  s;    // switch
  } straight_link_t;

  // Left-to-right neighbour signals of the queer version.
  typedef struct packed {
    logic s;    // switch (1 = started)
    logic r2;   // carry-out bit of the accumulator
  } queer_link_t;

  // Maximum operand width that stream_bit() handles.
  localparam int unsigned MAX_W = 64;

  // Bit of an n-bit operand presented at clock time t of an operation.
  function automatic logic stream_bit(input logic [MAX_W-1:0] w, input int unsigned n,
                                      input int unsigned t, input logic is_signed);
    if (t < n) return w[t];
    return is_signed ? w[n-1] : 1'b0;
  endfunction

endpackage
