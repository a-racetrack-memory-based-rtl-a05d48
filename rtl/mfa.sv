// Racetrack-memory based 1-bit magnetic full adder (MFA).
//
// The adder has two sense-amplifier stages that work on the resistance of
// magnetic elements holding the operands A, B and carry-in Ci:
//  * Carry stage: three MTJs in series (A, B, Ci) form the left branch; a
//    resistor of 2 R_H forms the right branch. A '1' bit is a high-resistance
//    (antiparallel) MTJ. With R_H = 2.5 R_L the left branch exceeds 2 R_H exactly
//    when two or more inputs are 1, so the amplifier output is the majority
//    function Co = AB + ACi + BCi.
//  * Sum stage: two stacked free-layer pairs, A over B and B over Ci, form the
//    left branch. A pair is high-resistance when its two bits differ. The right
//    branch is a resistor of R_H. The interim output Sum_in is therefore 0 only
//    when A = B = Ci. A 2-to-2 MUX selected by Co turns (Sum_in, ~Sum_in) into
//    (Sum, ~Sum): Sum = Co ? ~Sum_in : Sum_in, which is A xor B xor Ci.
//
// Interface and timing: combinational. `eval` is the sense amplifiers' CLK:
// low precharges every output to 1, high evaluates. The branch structure,
// resistor values and the MUX follow the adder's schematic and truth tables;
// the integer resistance model (units of R_L/2) is this design's choice.
module mfa (
  input  logic eval,
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic sum_n,
  output logic co,
  output logic co_n
);
  import rm_pkg::*;

  localparam logic [RES_W-1:0] RL = RES_W'(R_L);
  localparam logic [RES_W-1:0] RH = RES_W'(R_H);

  logic [RES_W-1:0] r_carry_left, r_carry_right;
  logic [RES_W-1:0] r_sum_left, r_sum_right;
  logic             sum_in, sum_in_n;

  // MTJ resistance: high (antiparallel) for a stored 1.
  function automatic logic [RES_W-1:0] mtj_r(input logic bit_v);
    return bit_v ? RH : RL;
  endfunction

  always_comb begin
    r_carry_left  = mtj_r(a) + mtj_r(b) + mtj_r(ci);
    r_carry_right = RES_W'(2 * R_H);
    // Stacked pair: high resistance when the two magnetisations differ.
    r_sum_left    = mtj_r(a ^ b) + mtj_r(b ^ ci);
    r_sum_right   = RH;
  end

  pcsa u_carry_sa (
    .eval   (eval),
    .r_left (r_carry_left),
    .r_right(r_carry_right),
    .out    (co),
    .out_n  (co_n)
  );

  pcsa u_sum_sa (
    .eval   (eval),
    .r_left (r_sum_left),
    .r_right(r_sum_right),
    .out    (sum_in),
    .out_n  (sum_in_n)
  );

  mux22 u_sum_mux (
    .sel(co),
    .i  (sum_in),
    .i_n(sum_in_n),
    .o  (sum),
    .o_n(sum_n)
  );

endmodule
