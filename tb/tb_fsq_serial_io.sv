// tb_fsq_serial_io: checks the word-level front end driving a straight processor (N=8).
//
// Operations are issued with random operands and signedness. Most of them are issued
// back to back: start is held high so that it is taken in the last cycle of the
// running operation. Others follow an idle gap. For every operation the testbench
// checks:
//  - the result word against x*y+z computed here, as 2N bits;
//  - done arriving exactly 2N+1 clock edges after the edge that takes start;
//  - run being high for exactly 2N clocks, with the bits driven on x_bit/z_bit matching
//    the operand and its sign (or zero) extension;
//  - back-to-back operations completing 2N+1 clocks apart.
module tb_fsq_serial_io;

  localparam int N = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, is_signed, ready, done;
  logic [N-1:0] x, y, z;
  logic [2*N-1:0] result;
  logic run, x_bit, y_bit, z_bit, out_bit;

  fsq_serial_io #(.N(N)) dut (.clk, .rst_n, .start, .is_signed, .x, .y, .z, .ready, .done,
                              .result, .run, .x_bit, .y_bit, .z_bit, .out_bit);
  fsq_straight_squad #(.N(N)) u_proc (.clk, .run, .x_bit, .y_bit, .z_bit, .out_bit);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected operations, in issue order
  typedef struct {
    logic [2*N-1:0] value;
    logic [2*N-1:0] xext, zext;
    longint         issued;
  } op_t;
  op_t q[$];
  int  b2b = 0;
  longint last_done = -1;

  function automatic logic [2*N-1:0] ext(logic [N-1:0] v, bit sgn);
    return sgn ? {{N{v[N-1]}}, v} : {{N{1'b0}}, v};
  endfunction

  // monitor the serial side: collect what is driven during run
  logic [2*N-1:0] xs, zs;
  int             nrun = 0;
  always @(posedge clk) begin
    if (rst_n && run) begin
      xs[nrun] <= x_bit;
      zs[nrun] <= z_bit;
      nrun     <= nrun + 1;
    end
  end

  always @(negedge clk) begin
    if (rst_n && done) begin
      op_t o;
      o = q.pop_front();
      checks += 4;
      if (result !== o.value) begin
        failures++;
        $display("result %0h, expected %0h", result, o.value);
      end
      if (cyc - o.issued != 2 * N + 1) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - o.issued, 2 * N + 1);
      end
      if (nrun != 2 * N || xs !== o.xext || zs !== o.zext) begin
        failures++;
        $display("serial stream: %0d run clocks, x %0h (exp %0h), z %0h (exp %0h)",
                 nrun, xs, o.xext, zs, o.zext);
      end
      if (last_done >= 0 && cyc - last_done < 2 * N + 1) begin
        failures++;
        $display("operations only %0d clocks apart", cyc - last_done);
      end else if (last_done >= 0 && cyc - last_done == 2 * N + 1) b2b++;
      last_done = cyc;
      nrun = 0;
    end
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; is_signed = 1'b0; x = '0; y = '0; z = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      op_t o;
      longint sx, sy, sz;
      x = N'($urandom); y = N'($urandom); z = N'($urandom); is_signed = 1'($urandom);
      if (i == 0) begin x = {1'b1, {(N-1){1'b0}}}; y = x; z = x; is_signed = 1'b1; end
      start = 1'b1;
      while (!ready) @(negedge clk);
      sx = is_signed ? longint'($signed(x)) : longint'(x);
      sy = is_signed ? longint'($signed(y)) : longint'(y);
      sz = is_signed ? longint'($signed(z)) : longint'(z);
      o.value  = (2*N)'(sx * sy + sz);
      o.xext   = ext(x, is_signed);
      o.zext   = ext(z, is_signed);
      o.issued = cyc + 1;   // accepted at the coming edge
      q.push_back(o);
      @(negedge clk);
      start = 1'b0;
      if ($urandom_range(0, 3) == 0) begin
        while (!ready) @(negedge clk);
        repeat ($urandom_range(1, 5)) @(negedge clk);
      end
    end
    start = 1'b0;
    while (q.size() != 0) @(negedge clk);
    checks++;
    if (b2b == 0) begin
      failures++;
      $display("no back-to-back operation was seen");
    end
    $display("back-to-back operations: %0d", b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
