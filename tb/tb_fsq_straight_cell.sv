// tb_fsq_straight_cell: checks one straight-version machine against a reference written
// case by case.
//
// Random left-neighbour and right-neighbour bits are applied every clock, with the
// left switch value biased towards 3 so that the machine walks through all of its
// switch values. The reference keeps its own copy of the machine state. It applies
// the resets, the data transfers for s=0, 1 and >=2, and the accumulator sum as
// separate per-switch terms. The outputs (p, q, r2, s, r0) are compared after every
// clock. The number of times each switch value was visited is also checked.
module tb_fsq_straight_cell;
  import fsq_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  straight_link_t left, right;
  logic r0_right, r0;

  fsq_straight_cell dut (.clk, .left, .r0_right, .right, .r0);

  int checks = 0, failures = 0;
  int unsigned visits [4];

  // reference state
  int ms, mp0, mq0, mp1, mq1, mp, mq, mr;

  task automatic ref_step(input straight_link_t l, input logic rr);
    int acc;
    int ns, np0, nq0, np1, nq1, np, nq;
    if (l.s == 2'd0) begin
      ms = 0; mp0 = 0; mq0 = 0; mp1 = 0; mq1 = 0; mp = 0; mq = 0; mr = 0;
      return;
    end
    ns = ms; np0 = mp0; nq0 = mq0; np1 = mp1; nq1 = mq1; np = mp; nq = mq;
    case (ms)
      0: begin
        acc = ((mr >> 1) & 1) + l.r2 + (l.p & l.q) + (l.p & mq0) + (mp1 & mq) + (mp & mq1);
        np0 = l.p; nq0 = l.q;
      end
      1: begin
        acc = ((mr >> 1) & 1) + l.r2 + (mp0 & l.q) + (l.p & mq0) + (mp1 & mq) + (mp & mq1);
        np1 = l.p; nq1 = l.q; np = l.p;
      end
      default: begin
        acc = (ms >= 2 ? rr : 0) + ((mr >> 1) & 1) + l.r2 + (mp0 & l.q) + (l.p & mq0)
            + (mp1 & mq) + (mp & mq1);
        np = l.p; nq = l.q;
      end
    endcase
    if (l.s == 2'd3) ns = (ms == 3) ? 3 : ms + 1;
    else             ns = 0;
    ms = ns; mp0 = np0; mq0 = nq0; mp1 = np1; mq1 = nq1; mp = np; mq = nq; mr = acc;
  endtask

  initial begin
    left = '0; r0_right = 1'b0;
    ms = 0; mp0 = 0; mq0 = 0; mp1 = 0; mq1 = 0; mp = 0; mq = 0; mr = 0;
    @(negedge clk);           // left.s = 0 during the first edge: reset
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      int u;
      u = $urandom_range(0, 99);
      left.s  = (u < 4) ? 2'd0 : (u < 10) ? 2'($urandom_range(1, 2)) : 2'd3;
      left.p  = 1'($urandom);
      left.q  = 1'($urandom);
      left.r2 = 1'($urandom);
      r0_right = 1'($urandom);
      visits[ms]++;
      ref_step(left, r0_right);
      @(negedge clk);
      checks++;
      if (right.s != 2'(ms) || right.p != 1'(mp) || right.q != 1'(mq) ||
          right.r2 != 1'(mr >> 2) || r0 != 1'(mr)) begin
        failures++;
        if (failures < 10)
          $display("mismatch at step %0d: dut s=%0d p=%0b q=%0b r2=%0b r0=%0b, ref s=%0d p=%0d q=%0d r=%0d",
                   i, right.s, right.p, right.q, right.r2, r0, ms, mp, mq, mr);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (visits[k] == 0) begin
        failures++;
        $display("switch value %0d never visited", k);
      end
    end
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
