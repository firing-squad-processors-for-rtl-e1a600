// tb_fsq_matrix_mac: checks C = A*B + D on the matrix unit at N=5, K=2 and at the
// defaults N=16, K=4.
//
// Random matrices, signed and unsigned, are issued through the start/ready handshake.
// Most are issued back to back (start held high into the last count), some after a gap.
// Every element of C is compared with A*B + D computed here, modulo 2^(2N). The
// testbench also checks that done follows the accepting edge by exactly 2N+K clocks
// and that back-to-back operations complete 2N+K clocks apart.
module tb_fsq_matrix_mac;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int N0 = 5, K0 = 2;
  localparam int N1 = 16, K1 = 4;

  logic rst_n;
  logic start0, sg0, ready0, done0;
  logic [K0-1:0][K0-1:0][N0-1:0] a0, b0, d0;
  logic [K0-1:0][K0-1:0][2*N0-1:0] c0;
  logic start1, sg1, ready1, done1;
  logic [K1-1:0][K1-1:0][N1-1:0] a1, b1, d1;
  logic [K1-1:0][K1-1:0][2*N1-1:0] c1;

  fsq_matrix_mac #(.N(N0), .K(K0)) dut0 (.clk, .rst_n, .start(start0), .is_signed(sg0),
      .a(a0), .b(b0), .d(d0), .ready(ready0), .done(done0), .c(c0));
  fsq_matrix_mac dut1 (.clk, .rst_n, .start(start1), .is_signed(sg1),
      .a(a1), .b(b1), .d(d1), .ready(ready1), .done(done1), .c(c1));

  function automatic longint sval(longint unsigned w, int n, bit sgn);
    return sgn ? (longint'(w << (64 - n)) >>> (64 - n)) : longint'(w);
  endfunction

  typedef struct {
    longint unsigned cexp [4][4];
    longint          issued;
  } op_t;
  op_t q0[$], q1[$];
  int  b2b = 0;
  longint last0 = -1, last1 = -1;

  task automatic check_done(int which, ref op_t qq[$], ref longint last);
    op_t o;
    int n, k;
    n = which ? N1 : N0;
    k = which ? K1 : K0;
    o = qq.pop_front();
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        longint unsigned got;
        got = which ? longint'(c1[i][j]) : longint'(c0[i][j]);
        checks++;
        if (got != o.cexp[i][j]) begin
          failures++;
          if (failures < 10) $display("N=%0d K=%0d c[%0d][%0d]=%0h, expected %0h",
                                      n, k, i, j, got, o.cexp[i][j]);
        end
      end
    checks++;
    if (cyc - o.issued != 2 * n + k) begin
      failures++;
      $display("latency %0d, expected %0d", cyc - o.issued, 2 * n + k);
    end
    if (last >= 0) begin
      checks++;
      if (cyc - last < 2 * n + k) begin
        failures++;
        $display("operations %0d clocks apart", cyc - last);
      end
      if (cyc - last == 2 * n + k) b2b++;
    end
    last = cyc;
  endtask

  always @(negedge clk) begin
    if (rst_n && done0) check_done(0, q0, last0);
    if (rst_n && done1) check_done(1, q1, last1);
  end

  task automatic issue(int which);
    int n, k;
    longint unsigned m;
    longint unsigned am [4][4], bm [4][4], dm [4][4];
    bit sg;
    op_t o;
    n = which ? N1 : N0;
    k = which ? K1 : K0;
    m = (64'd1 << n) - 1;
    sg = 1'($urandom);
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        am[i][j] = {$urandom, $urandom} & m;
        bm[i][j] = {$urandom, $urandom} & m;
        dm[i][j] = {$urandom, $urandom} & m;
      end
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        longint acc;
        acc = sval(dm[i][j], n, sg);
        for (int l = 0; l < k; l++) acc += sval(am[i][l], n, sg) * sval(bm[l][j], n, sg);
        o.cexp[i][j] = longint'(acc) & ((64'd1 << (2 * n)) - 1);
      end
    if (which) begin
      for (int i = 0; i < k; i++)
        for (int j = 0; j < k; j++) begin
          a1[i][j] = N1'(am[i][j]); b1[i][j] = N1'(bm[i][j]); d1[i][j] = N1'(dm[i][j]);
        end
      sg1 = sg; start1 = 1'b1;
      while (!ready1) @(negedge clk);
      o.issued = cyc + 1;
      q1.push_back(o);
      @(negedge clk);
      start1 = 1'b0;
    end else begin
      for (int i = 0; i < k; i++)
        for (int j = 0; j < k; j++) begin
          a0[i][j] = N0'(am[i][j]); b0[i][j] = N0'(bm[i][j]); d0[i][j] = N0'(dm[i][j]);
        end
      sg0 = sg; start0 = 1'b1;
      while (!ready0) @(negedge clk);
      o.issued = cyc + 1;
      q0.push_back(o);
      @(negedge clk);
      start0 = 1'b0;
    end
    if ($urandom_range(0, 4) == 0) begin
      while (!(which ? ready1 : ready0)) @(negedge clk);
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    start0 = 0; sg0 = 0; a0 = '0; b0 = '0; d0 = '0;
    start1 = 0; sg1 = 0; a1 = '0; b1 = '0; d1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 150; i++) issue(0);
    for (int i = 0; i < 60; i++) issue(1);
    while (q0.size() != 0 || q1.size() != 0) @(negedge clk);
    checks++;
    if (b2b == 0) begin
      failures++;
      $display("no back-to-back operation was seen");
    end
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
