// Radix-4 Booth decoder/encoder for one multiplier group.
//
// A group is three overlapping multiplier bits {y(2i+1), y(2i), y(2i-1)}; the
// lowest group uses an appended 0 for y(-1). The group selects a partial product
// of 0, +1, +2, -1 or -2 times the multiplicand, and the encoder raises the one
// matching control signal:
//   zero   = all three bits equal
//   one    = 001 or 010          two    = 011
//   ne_two = 100                 ne_one = 101 or 110
// (bit strings written most significant first). `neg` is the select of the
// negation MUX in the write path, ne_one OR ne_two.
//
// Interface and timing: combinational; `grp[2]` is the group's most
// significant bit. The five equations follow the design's recoding table; the
// packed struct output is this design's choice.
module booth_encoder (
  input  logic [2:0]         grp,
  output rm_pkg::booth_ctl_t ctl,
  output logic               neg
);

  logic c1, c2, c3;  // group bits, most significant first

  always_comb begin
    c1 = grp[2];
    c2 = grp[1];
    c3 = grp[0];
    ctl.zero   = (c1 & c2 & c3) | (~c1 & ~c2 & ~c3);
    ctl.one    = (~c1 & ~c2 & c3) | (~c1 & c2 & ~c3);
    ctl.two    = ~c1 & c2 & c3;
    ctl.ne_two = c1 & ~c2 & ~c3;
    ctl.ne_one = (c1 & ~c2 & c3) | (c1 & c2 & ~c3);
    neg        = ctl.ne_one | ctl.ne_two;
  end

endmodule
