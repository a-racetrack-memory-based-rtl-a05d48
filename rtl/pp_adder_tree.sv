// Pipelined partial-product adder tree on racetrack stripes.
//
// K = N/2 partial products, each 2N bits, arrive bit-serially (least
// significant first, bit c of every row in the same cycle). Level 0 has K/2
// serial magnetic adders, each adding a pair of rows; every further level adds
// pairs of the previous level's sums, down to one root adder whose output is the
// product. Between levels each sum is written into a stripe through a
// combined read/write access port and read back by the next level one cycle
// later, so the stripes themselves are the pipeline registers. For N = 8 this
// is three adders: a left and a right adder on two rows each, and a middle adder
// that adds their sums.
//
// Interface and timing: `lvl_en[l]` is high for the 2N cycles in which level l
// handles bits 0..2N-1, starting l cycles after level 0; `lvl_first[l]` marks
// the first of them. `sum_bit` is the root's output, bit c of the product in
// the cycle c + D - 1 after level 0 started, D = log2(K) levels.
// The tree shape and the stripes as stage registers follow the design; using a
// separate stripe for each intermediate sum, rather than a second access port
// on the operand stripes, is this design's choice. K must be a power of two.
module pp_adder_tree #(
  parameter int unsigned N = 64
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N/2-1:0]                 pp_bit,
  input  logic [$clog2(N/2)-1:0]         lvl_en,
  input  logic [$clog2(N/2)-1:0]         lvl_first,
  output logic                           sum_bit
);

  localparam int unsigned K = N / 2;
  localparam int unsigned D = $clog2(K);

  // node[l][j]: bit presented to level l by input j of that level.
  logic [K-1:0] node [D];

  assign node[0] = pp_bit;

  for (genvar l = 0; l < D; l++) begin : g_level
    localparam int unsigned NA = K >> (l + 1);
    for (genvar j = 0; j < NA; j++) begin : g_add
      logic s, co;
      rm_serial_adder u_add (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (lvl_en[l]),
        .first(lvl_first[l]),
        .cin  (1'b0),
        .a    (node[l][2*j]),
        .b    (node[l][2*j+1]),
        .s    (s),
        .co   (co)
      );
      if (l == D - 1) begin : g_root
        assign sum_bit = s;
      end else begin : g_stage
        logic [2*N-1:0] dom;
        rt_stripe #(.DOMAINS(2*N), .WR_POS(0), .RD_POS(0)) u_stage (
          .clk    (clk),
          .rst_n  (rst_n),
          .shift  (lvl_en[l]),
          .wr_en  (lvl_en[l]),
          .wr_bit (s),
          .rd_bit (node[l+1][j]),
          .domains(dom)
        );
      end
    end
    if (l < D - 1) begin : g_unused
      assign node[l+1][K-1:NA] = '0;
    end
  end

  initial begin
    assert (K >= 2 && (K & (K - 1)) == 0)
      else $error("pp_adder_tree: N/2 must be a power of two of at least 2");
  end

endmodule
