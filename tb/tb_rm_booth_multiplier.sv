// End-to-end test of the racetrack Booth multiplier at its default size
// (64-bit operands, 128-bit product): the worked example 52 x 107 = 5564, corner
// values and random signed operands, each product compared with integer
// arithmetic, the latency of every operation checked, and every Booth digit
// (0, +-1, +-2) and a negative multiplicand required to occur at least once.
module tb_rm_booth_multiplier;
  localparam int unsigned N   = 64;  // the multiplier's default width
  localparam int unsigned LAT = 6 * N + $clog2(N / 2) - 1;

  logic           clk = 1'b0;
  logic           rst_n, start, busy, done, res_bit, res_valid, fin;
  logic [N-1:0]   x_in, y_in;
  logic [2*N-1:0] product;
  int             checks, failures;

  rm_booth_multiplier dut (.clk, .rst_n, .start, .x_in, .y_in, .busy, .done,
                           .product, .res_bit, .res_valid);

  rm_mul_driver #(.N(N), .NRAND(200)) drv (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400 * (LAT + 4)) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
