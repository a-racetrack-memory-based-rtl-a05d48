// Pre-charge sense amplifier (PCSA), modelled at the logic level.
//
// The amplifier compares the resistance of its two discharge branches. While
// `eval` (the amplifier's CLK) is low both outputs are precharged to 1. When
// `eval` is high the branch with the lower resistance discharges first and
// pulls its own output to 0, which forces the opposite output to 1. So, while
// evaluating, `out` (the node above the left branch) is 1 exactly when the left
// branch has the higher resistance, and `out_n` is its complement.
//
// Resistances arrive as unsigned integers (units of R_L/2, see rm_pkg). The
// precharge/evaluate behaviour and the "lower resistance discharges first"
// rule follow the adder description; representing analog resistances as
// integers and the decision as a comparator is this model's choice. Equal
// resistances would leave a real amplifier undecided; the assertion flags them.
module pcsa #(
  parameter int unsigned RW = rm_pkg::RES_W
) (
  input  logic          eval,
  input  logic [RW-1:0] r_left,
  input  logic [RW-1:0] r_right,
  output logic          out,
  output logic          out_n
);

  always_comb begin
    if (!eval) begin
      out   = 1'b1;
      out_n = 1'b1;
    end else begin
      out   = (r_left > r_right);
      out_n = ~out;
    end
  end

  always_comb begin
    if (eval) assert (r_left != r_right) else $error("pcsa: balanced branches");
  end

endmodule
