// Sequencer of the racetrack Booth multiplier.
//
// It issues the shift and write pulses of every stripe for one multiplication,
// in four phases:
//  LOAD  N cycles       write X serially and Y bit-sliced into their stripes;
//  PRE   2K-1 cycles    "left-shift" each partial-product stripe: row i gets
//                       s_i = 2i (+1 if its Booth digit is +-2) zero shifts,
//                       placed at the end of the phase;
//  DATA  2N cycles      stream X out; row i takes 2N - s_i bits (X, then the
//                       repeated sign bit), so every row stripe ends up
//                       shifted exactly 2N times and all rows are aligned;
//  ADD   2N+D-1 cycles  stream the rows through the adder tree; level l
//                       runs for 2N cycles starting at cycle l.
// `done` is high for one cycle after the last ADD cycle. K = N/2 rows,
// D = log2(K) tree levels; `done` is first seen high 6N + D - 1 clock edges
// after the edge that accepts `start` (388 for N = 64).
//
// Interface: `start` is taken in IDLE only. `two[i]` is the Booth +-2 flag of
// row i, read during PRE. All outputs are decoded from the state and counter.
// The two-step order (generate all partial products, then add them in a
// pipeline) follows the design; the phase lengths, the sequencer itself and the
// single-operation-at-a-time schedule are this design's choices.
module rm_booth_ctrl #(
  parameter int unsigned N = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N/2-1:0]         two,
  output logic                   busy,
  output logic                   done,
  output logic                   ld_en,
  output logic [$clog2(N)-1:0]   ld_idx,
  output logic                   x_shift,
  output logic [N/2-1:0]         pp_shift,
  output logic [N/2-1:0]         pp_data,
  output logic                   pp_first,
  output logic [$clog2(N/2)-1:0] lvl_en,
  output logic [$clog2(N/2)-1:0] lvl_first
);

  localparam int unsigned K  = N / 2;
  localparam int unsigned D  = $clog2(K);
  localparam int unsigned S  = 2 * K - 1;
  localparam int unsigned CW = $clog2(2 * N + D + 1);

  typedef enum logic [2:0] {IDLE, LOAD, PRE, DATA, ADD, FIN} state_t;

  state_t        state;
  logic [CW-1:0] cnt;

  function automatic logic [CW-1:0] shift_of(input int unsigned i, input logic t);
    return CW'(2 * i) + CW'(t);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state <= LOAD;
          cnt   <= '0;
        end
        LOAD: if (cnt == CW'(N - 1)) begin
          state <= PRE;
          cnt   <= '0;
        end else cnt <= cnt + 1'b1;
        PRE: if (cnt == CW'(S - 1)) begin
          state <= DATA;
          cnt   <= '0;
        end else cnt <= cnt + 1'b1;
        DATA: if (cnt == CW'(2 * N - 1)) begin
          state <= ADD;
          cnt   <= '0;
        end else cnt <= cnt + 1'b1;
        ADD: if (cnt == CW'(2 * N + D - 2)) begin
          state <= FIN;
          cnt   <= '0;
        end else cnt <= cnt + 1'b1;
        FIN: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != IDLE);
    done      = (state == FIN);
    ld_en     = (state == LOAD);
    ld_idx    = ($clog2(N))'(cnt);
    x_shift   = (state == DATA) && (cnt < CW'(N - 1));
    pp_first  = (state == DATA) && (cnt == '0);
    pp_shift  = '0;
    pp_data   = '0;
    lvl_en    = '0;
    lvl_first = '0;
    for (int l = 0; l < D; l++) begin
      lvl_en[l]    = (state == ADD) && (cnt >= CW'(l)) && (cnt < CW'(l + 2 * N));
      lvl_first[l] = (state == ADD) && (cnt == CW'(l));
    end
    for (int i = 0; i < K; i++) begin
      unique case (state)
        PRE:  pp_shift[i] = (cnt >= CW'(S) - shift_of(i, two[i]));
        DATA: begin
          pp_data[i]  = (cnt < CW'(2 * N) - shift_of(i, two[i]));
          pp_shift[i] = pp_data[i];
        end
        ADD:  pp_shift[i] = lvl_en[0];
        default: pp_shift[i] = 1'b0;
      endcase
    end
  end

endmodule
