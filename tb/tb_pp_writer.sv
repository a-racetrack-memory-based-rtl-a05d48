// Self-checking test of the partial-product write path. A random multiplicand
// is streamed LSB first (its sign bit repeated after the top bit, as the X
// read head does) for each Booth control; the bits written, with unwritten
// cycles read as 0, must equal the low L bits of 0, +X or -X (the x2 is made by
// shifting the stripe, not by the writer).
module tb_pp_writer;
  import rm_pkg::*;
  localparam int unsigned NB = 8;   // multiplicand bits
  localparam int unsigned L  = 14;  // bits written for the row

  logic clk = 1'b0, rst_n = 1'b0;
  booth_ctl_t ctl;
  logic neg, data, first, x_bit, wr_en, wr_bit;
  int checks = 0, failures = 0;

  pp_writer dut (.clk, .rst_n, .ctl, .neg, .data, .first, .x_bit, .wr_en, .wr_bit);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl = '0; neg = 0; data = 0; first = 0; x_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      logic [NB-1:0] x;
      logic [L-1:0]  got, exp;
      int            sel;
      x   = NB'($urandom);
      sel = t % 5;
      ctl = '0;
      case (sel)
        0: ctl.zero   = 1'b1;
        1: ctl.one    = 1'b1;
        2: ctl.two    = 1'b1;
        3: ctl.ne_one = 1'b1;
        default: ctl.ne_two = 1'b1;
      endcase
      neg = ctl.ne_one | ctl.ne_two;
      case (sel)
        0: exp = '0;
        1, 2: exp = L'({{L{x[NB-1]}}, x});
        default: exp = L'(-{{L{x[NB-1]}}, x});
      endcase
      // Leave junk in the carry register from a preceding idle cycle.
      for (int k = 0; k < L; k++) begin
        @(negedge clk);
        data  = 1'b1;
        first = (k == 0);
        x_bit = (k < NB) ? x[k] : x[NB-1];
        #1;
        got[k] = wr_en ? wr_bit : 1'b0;
        checks++;
        if (wr_en !== ~ctl.zero) begin
          failures++;
          $display("FAIL wr_en %b for zero=%b", wr_en, ctl.zero);
        end
      end
      @(negedge clk);
      data = 1'b0;
      first = 1'b0;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("FAIL sel %0d x=%h: wrote %h expected %h", sel, x, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
