// tb_fsq_straight_squad: end-to-end check of the straight processor at three widths,
// N=5 (odd, 3 machines), the default N=16 (9 machines) and N=3 (2 machines).
//
// The testbench itself plays the environment. It drives x, y and z LSB first for 2N
// clocks, with sign replicas for two's-complement operands and zeros for unsigned ones.
// It raises the reset on clock 2N and starts the next operation on the following clock,
// with an idle gap now and then. Each output bit is checked in exactly the clock where
// it must appear (bit t at clock t+1) against x*y+z computed here, modulo 2^(2N).
// Corner operands (most negative, all ones) are included. A third instance at N=3 is
// run through every combination of x, y and z, signed and unsigned.
module tb_fsq_straight_squad;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NW [3] = '{5, 16, 3};

  logic [2:0] run, xb, yb, zb, ob;

  fsq_straight_squad #(.N(5))  dut_small (.clk, .run(run[0]), .x_bit(xb[0]), .y_bit(yb[0]),
                                          .z_bit(zb[0]), .out_bit(ob[0]));
  fsq_straight_squad           dut_full  (.clk, .run(run[1]), .x_bit(xb[1]), .y_bit(yb[1]),
                                          .z_bit(zb[1]), .out_bit(ob[1]));
  fsq_straight_squad #(.N(3))  dut_tiny  (.clk, .run(run[2]), .x_bit(xb[2]), .y_bit(yb[2]),
                                          .z_bit(zb[2]), .out_bit(ob[2]));

  int checks = 0, failures = 0;

  function automatic logic sbit(longint unsigned w, int n, int t, bit sgn);
    if (t < n) return w[t];
    return sgn ? w[n-1] : 1'b0;
  endfunction

  // one operation on instance k, starting at the current clock time
  task automatic do_op(int k, longint unsigned x, longint unsigned y, longint unsigned z, bit sgn);
    int n;
    longint sx, sy, sz;
    longint unsigned expect_v, mask;
    n = NW[k];
    mask = (64'd1 << (2 * n)) - 1;
    if (sgn) begin
      sx = longint'(x << (64 - n)) >>> (64 - n);
      sy = longint'(y << (64 - n)) >>> (64 - n);
      sz = longint'(z << (64 - n)) >>> (64 - n);
    end else begin
      sx = longint'(x); sy = longint'(y); sz = longint'(z);
    end
    expect_v = longint'(sx * sy + sz) & mask;
    for (int t = 0; t <= 2 * n; t++) begin
      run[k] = (t < 2 * n);
      xb[k]  = sbit(x, n, t, sgn);
      yb[k]  = sbit(y, n, t, sgn);
      zb[k]  = sbit(z, n, t, sgn);
      @(negedge clk);
      if (t < 2 * n) begin
        checks++;
        if (ob[k] != expect_v[t]) begin
          failures++;
          if (failures < 10)
            $display("N=%0d x=%0h y=%0h z=%0h signed=%0b: bit %0d is %0b, expected %0b",
                     n, x, y, z, sgn, t, ob[k], expect_v[t]);
        end
      end
    end
  endtask

  task automatic run_many(int k, int count);
    int n;
    longint unsigned m;
    n = NW[k];
    m = (64'd1 << n) - 1;
    // corner cases
    do_op(k, 64'd1 << (n - 1), 64'd1 << (n - 1), 64'd1 << (n - 1), 1'b1);
    do_op(k, m, m, m, 1'b0);
    do_op(k, m, m, m, 1'b1);
    do_op(k, 0, 0, 0, 1'b1);
    for (int i = 0; i < count; i++) begin
      do_op(k, {$urandom, $urandom} & m, {$urandom, $urandom} & m, {$urandom, $urandom} & m,
            1'($urandom));
      if ($urandom_range(0, 9) == 0) begin
        run[k] = 1'b0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
    end
    run[k] = 1'b0;
  endtask

  initial begin
    run = '0; xb = '0; yb = '0; zb = '0;
    @(negedge clk);
    @(negedge clk);
    run_many(0, 400);
    run_many(1, 300);
    // every operand combination at N=3, signed and unsigned, back to back
    for (int sg = 0; sg < 2; sg++)
      for (int v = 0; v < 512; v++)
        do_op(2, v & 7, (v >> 3) & 7, (v >> 6) & 7, 1'(sg));
    run[2] = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
