// fsq_matrix_mac: K x K matrix multiply-add, C = A*B + D, built from K*K scalar-product
// units (fsq_dot_product). All of them work in parallel, so the whole matrix takes the
// same 2N+K clocks as a single scalar product.
//
// Unit (i,j) computes D[i][j] + sum_l A[i][l]*B[l][j]. The sequencer counts 0..2N+K-1.
// In count c it drives bit c-l of A[i][l] and of B[l][j] on lane l: the lane skew is
// made from the count, so no delay lines are needed. From bit N on it drives sign
// replicas (signed) or zeros (unsigned). It drives bit c of D[i][j] as the addend
// stream. Result bit t of every unit appears in count t+K and is collected.
// Handshake: `start` is accepted while `ready`. The words are latched at the start
// edge, and `done` pulses one clock after the last count with all of C valid. A start
// in the last count begins the next operation at once, so the issue interval is 2N+K.
// Results are modulo 2^(2N).
// The K*K parallel units follow the matrix remark for these processors. The word
// interface, the lane-skew generation and the handshake are this design's own.
module fsq_matrix_mac
  import fsq_pkg::*;
#(
  parameter int unsigned N = 16,  // element width
  parameter int unsigned K = 4    // matrix dimension
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic                              is_signed,
  input  logic [K-1:0][K-1:0][N-1:0]        a,       // a[i][l]
  input  logic [K-1:0][K-1:0][N-1:0]        b,       // b[l][j]
  input  logic [K-1:0][K-1:0][N-1:0]        d,       // d[i][j]
  output logic                              ready,
  output logic                              done,
  output logic [K-1:0][K-1:0][2*N-1:0]      c        // c[i][j]
);

  localparam int unsigned LAST = 2 * N + K - 1;
  localparam int unsigned CW   = $clog2(LAST + 1);

  logic                        active;
  logic [CW-1:0]               cnt;
  logic                        sgn;
  logic [K-1:0][K-1:0][N-1:0]  ar, br, dr;
  logic [K-1:0][K-1:0][2*N-2:0] res;  // result bits 0..2N-2 while they arrive

  logic                        run0;
  logic [K-1:0][K-1:0]         a_bit;   // a_bit[i][l]: lane l stream of row i
  logic [K-1:0][K-1:0]         b_bit;   // b_bit[l][j]: lane l stream of column j
  logic [K-1:0][K-1:0]         d_bit;
  logic [K-1:0][K-1:0]         o_bit;

  assign ready = !active || (cnt == CW'(LAST));
  assign run0  = active && (cnt < CW'(2 * N));

  always_comb begin
    for (int i = 0; i < K; i++) begin
      for (int l = 0; l < K; l++) begin
        a_bit[i][l] = (cnt >= CW'(l)) ? stream_bit(MAX_W'(ar[i][l]), N, 32'(cnt) - l, sgn) : 1'b0;
        b_bit[i][l] = (cnt >= CW'(i)) ? stream_bit(MAX_W'(br[i][l]), N, 32'(cnt) - i, sgn) : 1'b0;
        d_bit[i][l] = stream_bit(MAX_W'(dr[i][l]), N, 32'(cnt), sgn);
      end
    end
  end

  for (genvar i = 0; i < K; i++) begin : g_row
    for (genvar j = 0; j < K; j++) begin : g_col
      logic [K-1:0] ycol;
      for (genvar l = 0; l < K; l++) begin : g_lane
        assign ycol[l] = b_bit[l][j];
      end
      fsq_dot_product #(.N(N), .K(K)) u_dot (
        .clk     (clk),
        .rst_n   (rst_n),
        .run     (run0),
        .x_bit   (a_bit[i]),
        .y_bit   (ycol),
        .z_bit   (d_bit[i][j]),
        .out_bit (o_bit[i][j])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      sgn    <= 1'b0;
      ar     <= '0;
      br     <= '0;
      dr     <= '0;
      res    <= '0;
      c      <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (active && cnt >= CW'(K) && cnt < CW'(LAST)) begin
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++)
            res[i][j][32'(cnt) - K] <= o_bit[i][j];
      end
      if (active && cnt == CW'(LAST)) begin
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++)
            c[i][j] <= {o_bit[i][j], res[i][j]};
        done <= 1'b1;
      end
      if (start && ready) begin
        active <= 1'b1;
        cnt    <= '0;
        sgn    <= is_signed;
        ar     <= a;
        br     <= b;
        dr     <= d;
      end else if (active) begin
        if (cnt == CW'(LAST)) active <= 1'b0;
        else                  cnt    <= cnt + 1'b1;
      end
    end
  end

endmodule
