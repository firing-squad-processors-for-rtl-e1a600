// fsq_serial_io: word-level front end for one bit-serial multiply-add processor (either
// squad). It plays the role of the environment to the left of the officer.
//
// On `start` (accepted while `ready`) it latches the N-bit words x, y, z and the
// signedness. It then runs one operation of 2N+1 clocks:
//  - count 0..2N-1: run=1, and bit `count` of each word is driven, LSB first. From
//    count N on the sign bit is repeated (signed) or zeros are sent (unsigned).
//  - count 1..2N: the processor's out_bit is collected as result bit count-1.
//  - count 2N: run=0, which is the reset for the next operation. At the same clock
//    edge the 2N-bit result is registered and `done` pulses in the next cycle.
// A `start` in the count-2N cycle begins the next operation without a gap, so one
// operation is issued every 2N+1 clocks. `done` is high in the cycle after the
// (2N+1)-th clock edge that follows the edge taking `start`.
// The 2N+1 clock operation and the reset on the last clock follow the processor's
// protocol. The word latches, the handshake and the result register are this design's
// own.
module fsq_serial_io
  import fsq_pkg::*;
#(
  parameter int unsigned N = 16  // operand width
) (
  input  logic            clk,
  input  logic            rst_n,      // asynchronous, active low
  // word side
  input  logic            start,      // begin an operation (only while ready)
  input  logic            is_signed,  // 1: two's complement, 0: unsigned operands
  input  logic [N-1:0]    x,
  input  logic [N-1:0]    y,
  input  logic [N-1:0]    z,
  output logic            ready,      // start is accepted in this cycle
  output logic            done,       // one-cycle pulse: result is valid
  output logic [2*N-1:0]  result,     // x*y+z, 2N bits (held until the next done)
  // processor side
  output logic            run,
  output logic            x_bit,
  output logic            y_bit,
  output logic            z_bit,
  input  logic            out_bit
);

  localparam int unsigned LAST = 2 * N;
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic           active;
  logic [CW-1:0]  cnt;
  logic [N-1:0]   xr, yr, zr;
  logic           sgn;
  logic [2*N-2:0] res;   // result bits 0..2N-2 while they arrive

  assign ready = !active || (cnt == CW'(LAST));
  assign run   = active && (cnt < CW'(LAST));
  assign x_bit = stream_bit(MAX_W'(xr), N, 32'(cnt), sgn);
  assign y_bit = stream_bit(MAX_W'(yr), N, 32'(cnt), sgn);
  assign z_bit = stream_bit(MAX_W'(zr), N, 32'(cnt), sgn);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      xr     <= '0;
      yr     <= '0;
      zr     <= '0;
      sgn    <= 1'b0;
      res    <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (active && cnt != '0 && cnt != CW'(LAST)) res[cnt-1] <= out_bit;
      if (active && cnt == CW'(LAST)) begin
        result <= {out_bit, res};
        done   <= 1'b1;
      end
      if (start && ready) begin
        active <= 1'b1;
        cnt    <= '0;
        xr     <= x;
        yr     <= y;
        zr     <= z;
        sgn    <= is_signed;
      end else if (active) begin
        if (cnt == CW'(LAST)) active <= 1'b0;
        else                  cnt    <= cnt + 1'b1;
      end
    end
  end

  initial begin
    assert (N >= 1 && N <= MAX_W) else $error("fsq_serial_io: N out of range");
  end

endmodule
