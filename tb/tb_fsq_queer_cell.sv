// tb_fsq_queer_cell: checks one queer-version machine against a reference model.
//
// Random rail bits, left-neighbour bits and right-neighbour r0 are applied every clock.
// The left switch is mostly 1 and sometimes 0 (reset). The reference applies the three
// cases separately: reset, start (store the rail and add r2_left + p*q) and running
// (add r0_right + r1 + r2_left + p0*q + p*q0). The outputs s, r2 and r0 are compared
// after every clock.
module tb_fsq_queer_cell;
  import fsq_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  queer_link_t left, right;
  logic rail_p, rail_q, r0_right, r0;

  fsq_queer_cell dut (.clk, .left, .rail_p, .rail_q, .r0_right, .right, .r0);

  int checks = 0, failures = 0;
  int starts = 0, resets = 0;
  int ms, mp0, mq0, mr;

  initial begin
    left = '0; rail_p = 0; rail_q = 0; r0_right = 0;
    ms = 0; mp0 = 0; mq0 = 0; mr = 0;
    @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 4000; i++) begin
      left.s   = ($urandom_range(0, 99) >= 8);
      left.r2  = 1'($urandom);
      rail_p   = 1'($urandom);
      rail_q   = 1'($urandom);
      r0_right = 1'($urandom);
      if (!left.s) begin
        ms = 0; mp0 = 0; mq0 = 0; mr = 0; resets++;
      end else if (ms == 0) begin
        mr = left.r2 + (rail_p & rail_q);
        ms = 1; mp0 = rail_p; mq0 = rail_q; starts++;
      end else begin
        mr = r0_right + ((mr >> 1) & 1) + left.r2 + (mp0 & rail_q) + (rail_p & mq0);
      end
      @(negedge clk);
      checks++;
      if (right.s != 1'(ms) || right.r2 != 1'(mr >> 2) || r0 != 1'(mr)) begin
        failures++;
        if (failures < 10)
          $display("mismatch at step %0d: dut s=%0b r2=%0b r0=%0b, ref s=%0d r=%0d",
                   i, right.s, right.r2, r0, ms, mr);
      end
    end
    checks++;
    if (starts == 0 || resets == 0) begin
      failures++;
      $display("start or reset never exercised");
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
