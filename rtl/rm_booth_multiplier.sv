// In-memory radix-4 Booth multiplier on racetrack memory (top level).
//
// Multiplies two N-bit two's complement numbers, the multiplicand X and the
// multiplier Y, into a 2N-bit product, using only racetrack stripes, magnetic
// full adders and a little CMOS logic:
//  1. X is written serially into one stripe and Y bit-sliced across N stripes
//     (operand_store).
//  2. K = N/2 Booth encoders read the overlapping 3-bit groups of Y from the
//     Y read heads in parallel (y(-1) = 0) and select 0, +-1 or +-2 times X.
//  3. X streams out of its stripe; K write paths (pp_writer) write the K
//     partial products, 2N bits each, into K row stripes in parallel. Shifts
//     issued before the data give each row its 4^i weight and the x2.
//  4. The rows stream through a tree of bit-serial magnetic adders whose
//     intermediate sums live in stripes (pp_adder_tree); the root writes the
//     product into the result stripe.
//
// Interface and timing: pulse `start` with `x_in`/`y_in` while `busy` is low;
// the operands are captured in a host write buffer at that edge. `done` pulses
// 6N + log2(N/2) - 1 clock edges after the start edge, and `product` (the
// result stripe read out in parallel) then holds X*Y until the next operation
// starts writing it. `res_bit`/`res_valid` show the product bit-serially, least
// significant first, as it is written. One clock cycle stands for one racetrack
// write/shift step.
// The data organisation, the Booth recoding, the negation/zero/shift
// transformations and the adder tree follow the design description; the
// sequencing, the write buffer, stripe lengths and the place where the
// negation's +1 is added are this design's choices (see the sub-modules).
module rm_booth_multiplier #(
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   x_in,
  input  logic [N-1:0]   y_in,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product,
  output logic           res_bit,
  output logic           res_valid
);
  import rm_pkg::*;

  localparam int unsigned K = N / 2;
  localparam int unsigned D = $clog2(K);

  // Host write buffer.
  logic [N-1:0] x_q, y_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else if (start && !busy) begin
      x_q <= x_in;
      y_q <= y_in;
    end
  end

  // Control.
  logic                 ld_en, x_shift, pp_first;
  logic [$clog2(N)-1:0] ld_idx;
  logic [K-1:0]         pp_shift, pp_data, two;
  logic [D-1:0]         lvl_en, lvl_first;

  rm_booth_ctrl #(.N(N)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .two      (two),
    .busy     (busy),
    .done     (done),
    .ld_en    (ld_en),
    .ld_idx   (ld_idx),
    .x_shift  (x_shift),
    .pp_shift (pp_shift),
    .pp_data  (pp_data),
    .pp_first (pp_first),
    .lvl_en   (lvl_en),
    .lvl_first(lvl_first)
  );

  // Operand stripes.
  logic         x_bit;
  logic [N-1:0] y_bits;

  operand_store #(.N(N)) u_store (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld_en  (ld_en),
    .ld_idx (ld_idx),
    .x_val  (x_q),
    .y_val  (y_q),
    .x_shift(x_shift),
    .x_bit  (x_bit),
    .y_bits (y_bits)
  );

  // Booth encoders, write paths and partial-product row stripes.
  logic [N:0]   y_ext;
  logic [K-1:0] pp_bit;
  assign y_ext = {y_bits, 1'b0};  // y(-1) = 0

  for (genvar i = 0; i < K; i++) begin : g_row
    booth_ctl_t     ctl;
    logic           neg, wr_en, wr_bit;
    logic [2*N-1:0] dom;

    booth_encoder u_enc (
      .grp(y_ext[2*i+2 -: 3]),
      .ctl(ctl),
      .neg(neg)
    );
    assign two[i] = ctl.two | ctl.ne_two;

    pp_writer u_wr (
      .clk   (clk),
      .rst_n (rst_n),
      .ctl   (ctl),
      .neg   (neg),
      .data  (pp_data[i]),
      .first (pp_first),
      .x_bit (x_bit),
      .wr_en (wr_en),
      .wr_bit(wr_bit)
    );

    rt_stripe #(.DOMAINS(2*N), .WR_POS(0), .RD_POS(2*N-1)) u_row (
      .clk    (clk),
      .rst_n  (rst_n),
      .shift  (pp_shift[i]),
      .wr_en  (wr_en),
      .wr_bit (wr_bit),
      .rd_bit (pp_bit[i]),
      .domains(dom)
    );
  end

  // Adder tree and result stripe.
  logic           sum_bit, res_rd;
  logic [2*N-1:0] res_dom;

  pp_adder_tree #(.N(N)) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .pp_bit   (pp_bit),
    .lvl_en   (lvl_en),
    .lvl_first(lvl_first),
    .sum_bit  (sum_bit)
  );

  assign res_valid = lvl_en[D-1];
  assign res_bit   = sum_bit;

  rt_stripe #(.DOMAINS(2*N), .WR_POS(0), .RD_POS(2*N-1)) u_result (
    .clk    (clk),
    .rst_n  (rst_n),
    .shift  (res_valid),
    .wr_en  (res_valid),
    .wr_bit (sum_bit),
    .rd_bit (res_rd),
    .domains(res_dom)
  );

  // After 2N writes, product bit p sits in domain 2N-1-p.
  always_comb begin
    for (int p = 0; p < 2 * N; p++) product[p] = res_dom[2*N-1-p];
  end

endmodule
