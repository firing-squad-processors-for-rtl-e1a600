// tb_fsq_dot_product: checks the chained scalar-product unit at N=6, K=3 and at the
// defaults N=16, K=4.
//
// A schedule of operations is laid out in time. Most follow each other every 2N+1
// clocks, which is the earliest the first processor is free again, so consecutive
// operations overlap inside the chain. Some have idle gaps. In every clock the
// testbench drives each lane with the bit of whichever operation occupies it (lane l is
// skewed by l clocks) and drives z. It then checks out_bit against the expected
// z + sum x_l*y_l, modulo 2^(2N), for the operation whose result is due: bit t at clock
// start+K+t, so a scalar product takes 2N+K clocks.
module tb_fsq_dot_product;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NOPS = 60;

  // ---------------- instance 0: N=6, K=3 ----------------
  localparam int N0 = 6, K0 = 3;
  logic rst_n;
  logic run0;
  logic [K0-1:0] xb0, yb0;
  logic zb0, ob0;
  fsq_dot_product #(.N(N0), .K(K0)) dut0 (.clk, .rst_n, .run(run0), .x_bit(xb0), .y_bit(yb0),
                                         .z_bit(zb0), .out_bit(ob0));

  // ---------------- instance 1: defaults ----------------
  localparam int N1 = 16, K1 = 4;
  logic run1;
  logic [K1-1:0] xb1, yb1;
  logic zb1, ob1;
  fsq_dot_product dut1 (.clk, .rst_n, .run(run1), .x_bit(xb1), .y_bit(yb1), .z_bit(zb1),
                        .out_bit(ob1));

  function automatic logic sbit(longint unsigned w, int n, int t, bit sgn);
    if (t < n) return w[t];
    return sgn ? w[n-1] : 1'b0;
  endfunction

  function automatic longint sval(longint unsigned w, int n, bit sgn);
    return sgn ? (longint'(w << (64 - n)) >>> (64 - n)) : longint'(w);
  endfunction

  // operation table shared by both instances (operands masked per instance)
  longint unsigned ox [NOPS][4], oy [NOPS][4], oz [NOPS];
  bit              osg [NOPS];
  int              ost [NOPS];

  task automatic run_inst(int which);
    int n, k, last;
    longint unsigned m, expect_v [NOPS];
    n = which ? N1 : N0;
    k = which ? K1 : K0;
    m = (64'd1 << n) - 1;
    // schedule
    ost[0] = 0;
    for (int i = 1; i < NOPS; i++)
      ost[i] = ost[i-1] + 2 * n + 1 + (($urandom_range(0, 4) == 0) ? $urandom_range(1, 6) : 0);
    for (int i = 0; i < NOPS; i++) begin
      longint acc;
      osg[i] = 1'($urandom);
      oz[i]  = {$urandom, $urandom} & m;
      acc    = sval(oz[i], n, osg[i]);
      for (int l = 0; l < k; l++) begin
        ox[i][l] = {$urandom, $urandom} & m;
        oy[i][l] = {$urandom, $urandom} & m;
        if (i == 0) begin ox[i][l] = 64'd1 << (n - 1); oy[i][l] = ox[i][l]; osg[i] = 1'b1; end
        acc += sval(ox[i][l], n, osg[i]) * sval(oy[i][l], n, osg[i]);
      end
      expect_v[i] = longint'(acc) & ((64'd1 << (2 * n)) - 1);
    end
    last = ost[NOPS-1] + 2 * n + k + 2;
    for (int c = 0; c <= last; c++) begin
      logic r;
      logic [3:0] xv, yv;
      logic zv, ov;
      r = 0; xv = '0; yv = '0; zv = 0;
      for (int i = 0; i < NOPS; i++) begin
        if (c >= ost[i] && c < ost[i] + 2 * n) begin
          r  = 1'b1;
          zv = sbit(oz[i], n, c - ost[i], osg[i]);
        end
        for (int l = 0; l < k; l++)
          if (c >= ost[i] + l && c < ost[i] + l + 2 * n) begin
            xv[l] = sbit(ox[i][l], n, c - ost[i] - l, osg[i]);
            yv[l] = sbit(oy[i][l], n, c - ost[i] - l, osg[i]);
          end
      end
      if (which) begin run1 = r; xb1 = xv; yb1 = yv; zb1 = zv; ov = ob1; end
      else       begin run0 = r; xb0 = xv[K0-1:0]; yb0 = yv[K0-1:0]; zb0 = zv; ov = ob0; end
      for (int i = 0; i < NOPS; i++)
        if (c >= ost[i] + k && c < ost[i] + k + 2 * n) begin
          checks++;
          if (ov != expect_v[i][c - ost[i] - k]) begin
            failures++;
            if (failures < 10)
              $display("N=%0d K=%0d op %0d: bit %0d is %0b, expected %0b", n, k, i,
                       c - ost[i] - k, ov, expect_v[i][c - ost[i] - k]);
          end
        end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    run0 = 0; xb0 = '0; yb0 = '0; zb0 = 0;
    run1 = 0; xb1 = '0; yb1 = '0; zb1 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (K1 + 1) @(negedge clk);   // let the reset reach every processor
    run_inst(0);
    run_inst(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
