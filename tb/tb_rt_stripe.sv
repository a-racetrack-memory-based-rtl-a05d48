// Self-checking test of the racetrack stripe: random shift/write sequences are
// compared with a reference shift register kept as a queue-free bit vector in
// the bench, for a stripe with separate heads and for one with a W/R port.
module tb_rt_stripe;
  localparam int unsigned L = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic shift, wr_en, wr_bit;
  logic rd_a, rd_b;
  logic [L-1:0] dom_a, dom_b;
  logic [L-1:0] ref_a, ref_b;
  int checks = 0, failures = 0;

  rt_stripe #(.DOMAINS(L), .WR_POS(0), .RD_POS(L-1)) dut_a (
    .clk, .rst_n, .shift, .wr_en, .wr_bit, .rd_bit(rd_a), .domains(dom_a));
  rt_stripe #(.DOMAINS(L), .WR_POS(3), .RD_POS(3)) dut_b (
    .clk, .rst_n, .shift, .wr_en, .wr_bit, .rd_bit(rd_b), .domains(dom_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    shift = 0; wr_en = 0; wr_bit = 0;
    ref_a = '0; ref_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check("reset a", |dom_a, 1'b0);
    check("reset b", |dom_b, 1'b0);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      shift  = 1'($urandom);
      wr_en  = ($urandom % 3) == 0;
      wr_bit = 1'($urandom);
      // reference next state
      if (shift) begin
        ref_a = {ref_a[L-2:0], 1'b0};
        ref_b = {ref_b[L-2:0], 1'b0};
      end
      if (wr_en) begin
        ref_a[0] = wr_bit;
        ref_b[3] = wr_bit;
      end
      @(posedge clk);
      #1;
      check("read head a", rd_a, ref_a[L-1]);
      check("read port b", rd_b, ref_b[3]);
      checks++;
      if (dom_a !== ref_a || dom_b !== ref_b) begin
        failures++;
        $display("FAIL contents %h/%h expected %h/%h", dom_a, dom_b, ref_a, ref_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
