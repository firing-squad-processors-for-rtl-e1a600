// fsq_top: the two firing-squad multiply-add processors and the matrix unit built
// from them, side by side. They share clock and reset and nothing else.
//
//  - Straight processor: fsq_serial_io feeding an fsq_straight_squad of floor(N/2)+1
//    machines. It computes s_result = s_x*s_y + s_z (2N bits), one operation per 2N+1
//    clocks.
//  - Queer processor: fsq_serial_io feeding an fsq_queer_squad of N machines on a
//    broadcast rail. Same function and timing, on the q_* ports.
//  - Matrix unit: fsq_matrix_mac. It computes m_c = m_a*m_b + m_d for K x K matrices of
//    N-bit elements in 2N+K clocks, with K*K chains of K straight processors.
// Each unit has a start/ready/done handshake. See the individual modules for the exact
// timing. The default sizes N=16 and K=4 are this design's choices.
module fsq_top #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // straight processor
  input  logic                          s_start,
  input  logic                          s_signed,
  input  logic [N-1:0]                  s_x,
  input  logic [N-1:0]                  s_y,
  input  logic [N-1:0]                  s_z,
  output logic                          s_ready,
  output logic                          s_done,
  output logic [2*N-1:0]                s_result,
  // queer processor
  input  logic                          q_start,
  input  logic                          q_signed,
  input  logic [N-1:0]                  q_x,
  input  logic [N-1:0]                  q_y,
  input  logic [N-1:0]                  q_z,
  output logic                          q_ready,
  output logic                          q_done,
  output logic [2*N-1:0]                q_result,
  // matrix multiply-add
  input  logic                          m_start,
  input  logic                          m_signed,
  input  logic [K-1:0][K-1:0][N-1:0]    m_a,
  input  logic [K-1:0][K-1:0][N-1:0]    m_b,
  input  logic [K-1:0][K-1:0][N-1:0]    m_d,
  output logic                          m_ready,
  output logic                          m_done,
  output logic [K-1:0][K-1:0][2*N-1:0]  m_c
);

  logic s_run, s_xb, s_yb, s_zb, s_ob;
  logic q_run, q_xb, q_yb, q_zb, q_ob;

  fsq_serial_io #(.N(N)) u_s_io (
    .clk, .rst_n,
    .start (s_start), .is_signed (s_signed), .x (s_x), .y (s_y), .z (s_z),
    .ready (s_ready), .done (s_done), .result (s_result),
    .run (s_run), .x_bit (s_xb), .y_bit (s_yb), .z_bit (s_zb), .out_bit (s_ob)
  );

  fsq_straight_squad #(.N(N)) u_straight (
    .clk, .run (s_run), .x_bit (s_xb), .y_bit (s_yb), .z_bit (s_zb), .out_bit (s_ob)
  );

  fsq_serial_io #(.N(N)) u_q_io (
    .clk, .rst_n,
    .start (q_start), .is_signed (q_signed), .x (q_x), .y (q_y), .z (q_z),
    .ready (q_ready), .done (q_done), .result (q_result),
    .run (q_run), .x_bit (q_xb), .y_bit (q_yb), .z_bit (q_zb), .out_bit (q_ob)
  );

  fsq_queer_squad #(.N(N)) u_queer (
    .clk, .run (q_run), .x_bit (q_xb), .y_bit (q_yb), .z_bit (q_zb), .out_bit (q_ob)
  );

  fsq_matrix_mac #(.N(N), .K(K)) u_matrix (
    .clk, .rst_n,
    .start (m_start), .is_signed (m_signed), .a (m_a), .b (m_b), .d (m_d),
    .ready (m_ready), .done (m_done), .c (m_c)
  );

endmodule
