// tb_fsq_top: end-to-end test of the whole design at its default sizes (N=16, K=4).
//
// Three streams of work run at the same time:
//  - the straight and queer processors get the same random multiply-adds, so their
//    results must agree with each other and with x*y+z computed here;
//  - the matrix unit gets random 4x4 multiply-adds, C = A*B + D.
// Operations are signed and unsigned, with most-negative and all-ones corner operands.
// They are mostly issued back to back and sometimes after an idle gap. Each
// result and each latency is checked: 2N+1 clocks per multiply-add and 2N+K per matrix.
// The test also counts how often each mechanism occurred and fails if one never did:
// back-to-back issue (reset on the last clock) and issue after an idle reset, for each
// unit; signed and unsigned operation; negative operands (sign replicas); and results
// wider than N bits.
module tb_fsq_top;

  localparam int N = 16, K = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic s_start, s_signed, s_ready, s_done;
  logic [N-1:0] s_x, s_y, s_z;
  logic [2*N-1:0] s_result;
  logic q_start, q_signed, q_ready, q_done;
  logic [N-1:0] q_x, q_y, q_z;
  logic [2*N-1:0] q_result;
  logic m_start, m_signed, m_ready, m_done;
  logic [K-1:0][K-1:0][N-1:0] m_a, m_b, m_d;
  logic [K-1:0][K-1:0][2*N-1:0] m_c;

  fsq_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_b2b [3], n_gap [3];
  int n_signed = 0, n_unsigned = 0, n_negative = 0, n_wide = 0;

  function automatic longint sval(longint unsigned w, int n, bit sgn);
    return sgn ? (longint'(w << (64 - n)) >>> (64 - n)) : longint'(w);
  endfunction

  typedef struct {
    logic [2*N-1:0] value;
    longint         issued;
  } sop_t;
  typedef struct {
    logic [K-1:0][K-1:0][2*N-1:0] value;
    longint                       issued;
  } mop_t;
  sop_t sq[$], qq[$];
  mop_t mq[$];
  longint last [3] = '{-1, -1, -1};

  task automatic note_gap(int u, longint prev_done, longint now);
    if (prev_done < 0) return;
    if (now - prev_done == ((u == 2) ? 2 * N + K : 2 * N + 1)) n_b2b[u]++;
    else n_gap[u]++;
  endtask

  always @(negedge clk) begin
    if (rst_n && s_done) begin
      sop_t o;
      o = sq.pop_front();
      checks += 2;
      if (s_result !== o.value) begin
        failures++; $display("straight: %0h, expected %0h", s_result, o.value);
      end
      if (cyc - o.issued != 2 * N + 1) begin
        failures++; $display("straight latency %0d", cyc - o.issued);
      end
      note_gap(0, last[0], cyc); last[0] = cyc;
    end
    if (rst_n && q_done) begin
      sop_t o;
      o = qq.pop_front();
      checks += 2;
      if (q_result !== o.value) begin
        failures++; $display("queer: %0h, expected %0h", q_result, o.value);
      end
      if (cyc - o.issued != 2 * N + 1) begin
        failures++; $display("queer latency %0d", cyc - o.issued);
      end
      note_gap(1, last[1], cyc); last[1] = cyc;
    end
    if (rst_n && s_done && q_done) begin
      checks++;
      if (s_result !== q_result) begin
        failures++; $display("straight and queer disagree");
      end
    end
    if (rst_n && m_done) begin
      mop_t o;
      o = mq.pop_front();
      checks += 2;
      if (m_c !== o.value) begin
        failures++; $display("matrix result mismatch");
      end
      if (cyc - o.issued != 2 * N + K) begin
        failures++; $display("matrix latency %0d", cyc - o.issued);
      end
      note_gap(2, last[2], cyc); last[2] = cyc;
    end
  end

  task automatic scalar_ops(int count);
    for (int i = 0; i < count; i++) begin
      logic [N-1:0] x, y, z;
      bit sg;
      sop_t o;
      longint v;
      x = N'($urandom); y = N'($urandom); z = N'($urandom); sg = 1'($urandom);
      case (i)
        0: begin x = {1'b1, {(N-1){1'b0}}}; y = x; z = x; sg = 1'b1; end
        1: begin x = '1; y = '1; z = '1; sg = 1'b0; end
        2: begin x = '1; y = '1; z = '1; sg = 1'b1; end
        default: ;
      endcase
      v = sval(x, N, sg) * sval(y, N, sg) + sval(z, N, sg);
      o.value = (2*N)'(v);
      if (sg) n_signed++; else n_unsigned++;
      if (sg && (x[N-1] || y[N-1] || z[N-1])) n_negative++;
      if (o.value[2*N-1:N] != '0 && o.value[2*N-1:N] != '1) n_wide++;
      s_x = x; s_y = y; s_z = z; s_signed = sg;
      q_x = x; q_y = y; q_z = z; q_signed = sg;
      s_start = 1'b1; q_start = 1'b1;
      while (!s_ready || !q_ready) @(negedge clk);
      o.issued = cyc + 1;
      sq.push_back(o);
      qq.push_back(o);
      @(negedge clk);
      s_start = 1'b0; q_start = 1'b0;
      if ($urandom_range(0, 4) == 0) begin
        while (!s_ready || !q_ready) @(negedge clk);
        repeat ($urandom_range(1, 5)) @(negedge clk);
      end
    end
  endtask

  task automatic matrix_ops(int count);
    for (int n = 0; n < count; n++) begin
      mop_t o;
      bit sg;
      sg = 1'($urandom);
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          m_a[i][j] = N'($urandom); m_b[i][j] = N'($urandom); m_d[i][j] = N'($urandom);
        end
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          longint acc;
          acc = sval(m_d[i][j], N, sg);
          for (int l = 0; l < K; l++) acc += sval(m_a[i][l], N, sg) * sval(m_b[l][j], N, sg);
          o.value[i][j] = (2*N)'(acc);
        end
      m_signed = sg;
      m_start = 1'b1;
      while (!m_ready) @(negedge clk);
      o.issued = cyc + 1;
      mq.push_back(o);
      @(negedge clk);
      m_start = 1'b0;
      if ($urandom_range(0, 4) == 0) begin
        while (!m_ready) @(negedge clk);
        repeat ($urandom_range(1, 5)) @(negedge clk);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    s_start = 0; s_signed = 0; s_x = '0; s_y = '0; s_z = '0;
    q_start = 0; q_signed = 0; q_x = '0; q_y = '0; q_z = '0;
    m_start = 0; m_signed = 0; m_a = '0; m_b = '0; m_d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      scalar_ops(200);
      matrix_ops(100);
    join
    while (sq.size() != 0 || qq.size() != 0 || mq.size() != 0) @(negedge clk);
    for (int u = 0; u < 3; u++) begin
      checks += 2;
      if (n_b2b[u] == 0) begin failures++; $display("unit %0d: no back-to-back issue", u); end
      if (n_gap[u] == 0) begin failures++; $display("unit %0d: no issue after a gap", u); end
    end
    checks += 4;
    if (n_signed == 0)   begin failures++; $display("no signed operation"); end
    if (n_unsigned == 0) begin failures++; $display("no unsigned operation"); end
    if (n_negative == 0) begin failures++; $display("no negative operand"); end
    if (n_wide == 0)     begin failures++; $display("no result wider than N bits"); end
    $display("back-to-back: straight %0d queer %0d matrix %0d; after gap: %0d %0d %0d",
             n_b2b[0], n_b2b[1], n_b2b[2], n_gap[0], n_gap[1], n_gap[2]);
    $display("signed %0d unsigned %0d negative %0d wide %0d",
             n_signed, n_unsigned, n_negative, n_wide);
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
