// fsq_dot_product: scalar product plus addend, z + sum_l x_l*y_l, with K straight
// processors chained end to end.
//
// Processor l computes x_l*y_l + (output of processor l-1). Processor 0 adds the
// external z. A processor's result bits come out one clock after its inputs, so they
// can feed the next processor's z input directly. Each processor therefore runs one
// clock after the one to its left. The `run` signal passes through a chain of
// flip-flops, one clock per processor, so the caller supplies only the run (and reset)
// of processor 0.
// Timing for an operation starting at clock 0:
//  - lane l's x_bit[l]/y_bit[l] must carry bit t of x_l/y_l at clock t+l, with the same
//    sign (or zero) replicas as a single processor.
//  - z_bit carries bit t of z at clock t.
//  - out_bit carries result bit t at clock t+K, so the whole scalar product takes 2N+K
//    clocks. The result is modulo 2^(2N).
// Chaining with a one-clock delay per processor follows the scalar-product remark for
// this processor. The run delay chain, the reset and the wrap-around of the result are
// this design's choices.
module fsq_dot_product #(
  parameter int unsigned N = 16,  // operand width
  parameter int unsigned K = 4    // vector length
) (
  input  logic         clk,
  input  logic         rst_n,   // clears the run delay chain
  input  logic         run,     // run/reset of processor 0
  input  logic [K-1:0] x_bit,   // lane l skewed by l clocks
  input  logic [K-1:0] y_bit,
  input  logic         z_bit,
  output logic         out_bit
);

  logic [K-1:0] run_l;   // run of processor l
  logic [K:0]   chain;   // chain[l] is the z input of processor l

  assign run_l[0] = run;
  assign chain[0] = z_bit;

  for (genvar l = 1; l < K; l++) begin : g_run
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) run_l[l] <= 1'b0;
      else        run_l[l] <= run_l[l-1];
    end
  end

  for (genvar l = 0; l < K; l++) begin : g_proc
    fsq_straight_squad #(.N(N)) u_squad (
      .clk     (clk),
      .run     (run_l[l]),
      .x_bit   (x_bit[l]),
      .y_bit   (y_bit[l]),
      .z_bit   (chain[l]),
      .out_bit (chain[l+1])
    );
  end

  assign out_bit = chain[K];

endmodule
