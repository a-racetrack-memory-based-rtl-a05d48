// 2-to-2 multiplexer: passes a differential pair straight through when `sel`
// is 0 and crosses it over when `sel` is 1. It selects the true/complement
// output of the magnetic adder's sum stage and, in the partial-product write
// path, turns a stored bit into its negation.
module mux22 (
  input  logic sel,
  input  logic i,
  input  logic i_n,
  output logic o,
  output logic o_n
);

  always_comb begin
    o   = sel ? i_n : i;
    o_n = sel ? i   : i_n;
  end

endmodule
