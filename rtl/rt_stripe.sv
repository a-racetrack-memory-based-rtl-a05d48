// Racetrack memory stripe (domain-wall shift register).
//
// A stripe is a row of magnetic domains, each holding one bit. A shift pulse
// moves every domain one position towards the high index; the domain at index
// 0 is refilled with 0, the stripe's erased state, and the bit in the last
// domain leaves the stripe. One write head (MTJ_W) sits at domain WR_POS and
// one read head (MTJ_R) at domain RD_POS. With WR_POS == RD_POS the two form a
// single read/write access port.
//
// Interface and timing: on a rising clock edge with `shift` high the stripe
// shifts; with `wr_en` high the domain under the write head takes `wr_bit`
// (after the shift of the same edge, so a write and a shift can be issued
// together to stream bits in). `rd_bit` senses the domain under the read head
// combinationally. `domains` exposes the whole stripe for observation only.
// One clock cycle stands for one shift/write step of the memory.
//
// Shift-register organisation, the two MTJ heads and the all-zero initial state
// follow the racetrack description; the head positions, the unidirectional
// shift and the asynchronous clear on reset are this design's choices.
module rt_stripe #(
  parameter int unsigned DOMAINS = 64,
  parameter int unsigned WR_POS  = 0,
  parameter int unsigned RD_POS  = DOMAINS - 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               shift,
  input  logic               wr_en,
  input  logic               wr_bit,
  output logic               rd_bit,
  output logic [DOMAINS-1:0] domains
);

  logic [DOMAINS-1:0] d, d_next;

  always_comb begin
    d_next = shift ? {d[DOMAINS-2:0], 1'b0} : d;
    if (wr_en) d_next[WR_POS] = wr_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d <= '0;
    else        d <= d_next;
  end

  assign rd_bit  = d[RD_POS];
  assign domains = d;

  initial begin
    assert (DOMAINS >= 2 && WR_POS < DOMAINS && RD_POS < DOMAINS)
      else $error("rt_stripe: head position outside the stripe");
  end

endmodule
