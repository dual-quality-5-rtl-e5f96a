// dq_dadda_multiplier: N x N unsigned multiplier whose accuracy is chosen at
// run time, built from dual-quality 5:2 compressors.
//
// Datapath: pp_gen forms N AND-gate partial-product rows, dq_reduction_tree
// compresses them to two rows with dual-quality 5:2 compressors, and
// final_adder adds those two rows. With exact = 1 the product is a * b.
// With exact = 0 the compressors in the low APPROX_COLS columns run in their
// approximate mode: shorter logic paths and no carries between those columns,
// at the price of a product that may be smaller than a * b (never larger).
//
// Timing: the whole datapath is combinational and feeds one product register.
// a, b and exact sampled at a rising clk edge give p right after that edge:
// one product per cycle, latency one cycle. The mode can change every cycle.
// rst_n clears the register asynchronously.
//
// The datapath split (partial products, 5:2 reduction, final addition) and
// the 8 x 8 default follow the multiplier description. The output register,
// the reset and APPROX_COLS = N (approximation limited to the lower half of
// the product) are this design's own choices.
module dq_dadda_multiplier #(
  parameter int unsigned N           = 8,
  parameter int unsigned APPROX_COLS = N
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           exact,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [2*N-1:0] pp [N];
  logic [2*N-1:0] row_a, row_b, prod;

  pp_gen #(.N(N)) u_ppg (.a(a), .b(b), .pp(pp));

  dq_reduction_tree #(.N(N), .APPROX_COLS(APPROX_COLS)) u_tree (
    .pp(pp), .exact(exact), .row_a(row_a), .row_b(row_b)
  );

  final_adder #(.W(2*N)) u_cpa (.x(row_a), .y(row_b), .s(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= prod;
  end
endmodule
