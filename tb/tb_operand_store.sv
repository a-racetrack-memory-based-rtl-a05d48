// Self-checking test of the operand stripes: after an N-cycle load the Y read
// heads must show the multiplier and X must come out LSB first, one bit per
// x_shift, holding its sign bit once shifting stops. A second load must not
// disturb the read-out of the new operands.
module tb_operand_store;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_en, x_shift, x_bit;
  logic [$clog2(N)-1:0] ld_idx;
  logic [N-1:0] x_val, y_val, y_bits;
  int checks = 0, failures = 0;

  operand_store #(.N(N)) dut (.clk, .rst_n, .ld_en, .ld_idx, .x_val, .y_val, .x_shift, .x_bit, .y_bits);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_en = 0; x_shift = 0; ld_idx = '0; x_val = '0; y_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      logic [N-1:0] x, y;
      x = N'($urandom); y = N'($urandom);
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        ld_en = 1'b1; ld_idx = ($clog2(N))'(k); x_val = x; y_val = y;
      end
      @(negedge clk);
      ld_en = 1'b0; x_val = ~x; y_val = ~y;
      #1;
      checks++;
      if (y_bits !== y) begin
        failures++;
        $display("FAIL y heads %h expected %h", y_bits, y);
      end
      for (int u = 0; u < N + 3; u++) begin
        #1;
        checks++;
        if (x_bit !== x[(u < N) ? u : N - 1]) begin
          failures++;
          $display("FAIL x bit %0d: %b", u, x_bit);
        end
        x_shift = (u < N - 1);
        @(negedge clk);
      end
      x_shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
