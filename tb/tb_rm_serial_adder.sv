// Self-checking test of the bit-serial magnetic adder: random 24-bit operands
// and initial carries are streamed LSB first; the collected sum bits and the
// final carry must equal a + b + cin. Idle cycles between operations must not
// disturb the next one.
module tb_rm_serial_adder;
  localparam int unsigned W = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, first, cin, a, b, s, co;
  int checks = 0, failures = 0;

  rm_serial_adder dut (.clk, .rst_n, .en, .first, .cin, .a, .b, .s, .co);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; first = 0; cin = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      logic [W-1:0] x, y, got;
      logic         c0, last_co;
      logic [W:0]   exp;
      x  = W'($urandom);
      y  = W'($urandom);
      c0 = 1'($urandom);
      if (t % 7 == 0) begin x = '1; y = '0; c0 = 1'b1; end  // full carry ripple
      exp = {1'b0, x} + {1'b0, y} + (W+1)'(c0);
      for (int k = 0; k < W; k++) begin
        @(negedge clk);
        en = 1'b1; first = (k == 0); cin = c0; a = x[k]; b = y[k];
        #1;
        got[k]  = s;
        last_co = co;
      end
      @(negedge clk);
      en = 1'b0; first = 1'b0; a = 1'b1; b = 1'b1;
      repeat ($urandom % 3) @(negedge clk);
      checks++;
      if ({last_co, got} !== exp) begin
        failures++;
        $display("FAIL %h + %h + %b = %h, got %h", x, y, c0, exp, {last_co, got});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
