// Operand stripes of the multiplier: the multiplicand stored serially, the
// multiplier stored bit-sliced.
//
// The multiplicand X sits in one stripe, bit after bit, so that its bits reach
// the read head one per shift, least significant first. The multiplier Y is
// spread over N stripes, stripe j holding bit j of successive multipliers, so
// that all bits of one multiplier sit under N read heads at once and every
// Booth group can be decoded in parallel. Each Y stripe has one read/write
// port; loading a new multiplier shifts older ones one domain further along
// (stripe j holds bit j of multiplier 0 in its port domain, of the previous
// multiplier in the next domain, and so on).
//
// Interface and timing: loading takes N cycles with `ld_en` high and `ld_idx`
// counting 0..N-1. In cycle k, X[k] is written and the X stripe shifts, so after
// the load X[0] sits under the X read head (domain N-1). The Y stripes shift and
// write once, in the cycle with `ld_idx` = 0. `x_shift` then moves X along by
// one bit per cycle; the X stripe has 2N domains, so bits that have passed the
// read head stay in the stripe. `x_bit` and `y_bits` are the read heads.
// The serial/bit-sliced organisation follows the design; head positions and
// stripe lengths are this design's choices (Y_DOMAINS defaults to the 64
// domains of a 128F racetrack with 2F domains).
module operand_store #(
  parameter int unsigned N         = 64,
  parameter int unsigned Y_DOMAINS = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ld_en,
  input  logic [$clog2(N)-1:0] ld_idx,
  input  logic [N-1:0]         x_val,
  input  logic [N-1:0]         y_val,
  input  logic                 x_shift,
  output logic                 x_bit,
  output logic [N-1:0]         y_bits
);

  logic [2*N-1:0] x_dom;

  rt_stripe #(.DOMAINS(2*N), .WR_POS(0), .RD_POS(N-1)) u_x (
    .clk    (clk),
    .rst_n  (rst_n),
    .shift  (ld_en | x_shift),
    .wr_en  (ld_en),
    .wr_bit (x_val[ld_idx]),
    .rd_bit (x_bit),
    .domains(x_dom)
  );

  logic y_wr;
  assign y_wr = ld_en && (ld_idx == '0);

  for (genvar j = 0; j < N; j++) begin : g_y
    logic [Y_DOMAINS-1:0] dom;
    rt_stripe #(.DOMAINS(Y_DOMAINS), .WR_POS(0), .RD_POS(0)) u_y (
      .clk    (clk),
      .rst_n  (rst_n),
      .shift  (y_wr),
      .wr_en  (y_wr),
      .wr_bit (y_val[j]),
      .rd_bit (y_bits[j]),
      .domains(dom)
    );
  end

endmodule
