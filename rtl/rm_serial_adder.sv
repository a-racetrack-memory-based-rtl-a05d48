// Bit-serial adder built from one magnetic full adder.
//
// The operands are shifted along their stripes to the adder's access ports,
// least significant bit first, one bit per cycle; the sum bit is written into
// a destination stripe in the same cycle. The carry out of each bit is kept for
// the next one in a carry register that stands for the adder's carry domain.
//
// Interface and timing: while `en` is high the adder takes `a` and `b`,
// presents `s` (and `co`) combinationally and stores the carry at the clock
// edge. On the cycle with `first` high the carry-in is `cin` instead of the
// stored carry, the "initial Ci" of the addition. With `en` low the sense
// amplifiers precharge and the carry holds.
// Serial operation on shifted operands follows the design description; the
// explicit first/cin handshake is this design's choice.
module rm_serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic first,
  input  logic cin,
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);

  logic carry_q, ci, s_n, co_n;

  assign ci = first ? cin : carry_q;

  mfa u_fa (
    .eval (en),
    .a    (a),
    .b    (b),
    .ci   (ci),
    .sum  (s),
    .sum_n(s_n),
    .co   (co),
    .co_n (co_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= co;
  end

endmodule
