// Partial-product write path (negation circuit and write driver) for one row.
//
// While the multiplicand X streams out of its stripe least significant bit
// first, this block turns each bit into the matching bit of one Booth partial
// product and drives the write head of that row's stripe:
//  * "negation": a 2-to-2 MUX selected by ne_one OR ne_two crosses the
//    bit/complement pair, so a negative row is written inverted;
//  * "plusing-one": the inverted row still needs +1 at its least significant
//    written position. A magnetic full adder with B = 0 and its initial carry
//    Ci set to the negate signal adds it while the row is written, turning the
//    inversion into an exact two's complement;
//  * "setting-to-zero": a zero row is never written; its stripe is only
//    shifted, and erased domains read as 0;
//  * "left-shifting" (x2 and the 4^i row weight) is done by extra shifts of the
//    row's stripe before data arrives, issued by the controller.
//
// Interface and timing: `data` is high for every cycle in which this row takes
// one bit, `first` on the first of them. `wr_en`/`wr_bit` go to the row
// stripe's write head in the same cycle. The carry is held in a register that
// stands for the adder's carry domain.
// The MUX selected by ne_one|ne_two, the zero-by-not-writing and the
// shift-based doubling follow the design description. Applying the +1 through
// a per-row serial increment, rather than in the partial-product adders, is
// this design's choice: the adder tree offers one initial carry per adder but a
// multiplier has one more row than the tree has adders.
module pp_writer (
  input  logic               clk,
  input  logic               rst_n,
  input  rm_pkg::booth_ctl_t ctl,
  input  logic               neg,
  input  logic               data,
  input  logic               first,
  input  logic               x_bit,
  output logic               wr_en,
  output logic               wr_bit
);

  logic w, w_n;
  logic carry_q, ci;
  logic sum, sum_n, co, co_n;

  mux22 u_neg_mux (
    .sel(neg),
    .i  (x_bit),
    .i_n(~x_bit),
    .o  (w),
    .o_n(w_n)
  );

  assign ci = first ? neg : carry_q;

  mfa u_inc (
    .eval (data),
    .a    (w),
    .b    (1'b0),
    .ci   (ci),
    .sum  (sum),
    .sum_n(sum_n),
    .co   (co),
    .co_n (co_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    carry_q <= 1'b0;
    else if (data) carry_q <= co;
  end

  assign wr_en  = data & ~ctl.zero;
  assign wr_bit = sum;

  // Exactly one Booth control signal is active for a row being written.
  always_comb begin
    if (data) assert ($countones(ctl) == 1) else $error("pp_writer: Booth control not one-hot");
  end

endmodule
