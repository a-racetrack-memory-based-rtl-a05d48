// Runs the multiplier at the operand widths of the energy/area evaluation,
// 8, 16 and 32 bits (the 64-bit case is the default-size bench), side by side:
// random signed products checked against integer arithmetic, latency
// 6N + log2(N/2) - 1 cycles per operation, every Booth digit exercised.
module tb_rm_booth_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int  checks [3];
  int  failures [3];
  logic fin [3];

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int unsigned N = 8 << g;
    logic           rst_n, start, busy, done, res_bit, res_valid;
    logic [N-1:0]   x_in, y_in;
    logic [2*N-1:0] product;

    rm_booth_multiplier #(.N(N)) dut (.clk, .rst_n, .start, .x_in, .y_in, .busy, .done,
                                      .product, .res_bit, .res_valid);
    rm_mul_driver #(.N(N), .NRAND(100)) drv (.clk, .rst_n, .start, .x_in, .y_in, .busy,
      .done, .product, .res_bit, .res_valid, .checks(checks[g]), .failures(failures[g]),
      .fin(fin[g]));
  end

  initial begin : watchdog
    repeat (200 * 400) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end
endmodule
