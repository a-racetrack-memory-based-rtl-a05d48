// Stimulus and checker for one racetrack Booth multiplier instance.
//
// Multiplies the worked example 52 x 107 = 5564, the corner values and random
// signed operands, and compares every 2N-bit product with X*Y computed here in
// plain integer arithmetic. It also checks the latency (6N + log2(N/2) - 1 edges
// from start to done), the bit-serial result stream against the parallel
// product, and counts how often each Booth digit (0, +1, +2, -1, -2) and the
// sign-extension path (negative multiplicand) occurred; a digit or path that
// never occurred counts as a failure. N must match the multiplier it drives;
// `fin` rises when all operations are done, with the counts on `checks` and
// `failures`.
module rm_mul_driver #(
  parameter int unsigned N     = 8,
  parameter int unsigned NRAND = 200
) (
  input  logic           clk,
  output logic           rst_n,
  output logic           start,
  output logic [N-1:0]   x_in,
  output logic [N-1:0]   y_in,
  input  logic           busy,
  input  logic           done,
  input  logic [2*N-1:0] product,
  input  logic           res_bit,
  input  logic           res_valid,
  output int             checks,
  output int             failures,
  output logic           fin
);

  localparam int unsigned K   = N / 2;
  localparam int unsigned D   = $clog2(K);
  localparam int unsigned LAT = 6 * N + D - 1;

  int digit_cnt [5];  // 0, +1, +2, -1, -2
  int neg_x_cnt = 0;

  // Serial result capture.
  logic [2*N-1:0] ser;
  int             ser_n;
  always @(posedge clk) if (res_valid) begin
    ser[ser_n] <= res_bit;
    ser_n      <= ser_n + 1;
  end

  function automatic logic [2*N-1:0] ref_mul(input logic [N-1:0] x, input logic [N-1:0] y);
    logic signed [2*N-1:0] xs, ys;
    xs = {{N{x[N-1]}}, x};
    ys = {{N{y[N-1]}}, y};
    return xs * ys;
  endfunction

  task automatic count_digits(input logic [N-1:0] y);
    logic [N:0] ye;
    ye = {y, 1'b0};
    for (int i = 0; i < K; i++) begin
      case (ye[2*i +: 3])
        3'b000, 3'b111: digit_cnt[0]++;
        3'b001, 3'b010: digit_cnt[1]++;
        3'b011:         digit_cnt[2]++;
        3'b101, 3'b110: digit_cnt[3]++;
        3'b100:         digit_cnt[4]++;
        default: ;
      endcase
    end
  endtask

  task automatic run(input logic [N-1:0] x, input logic [N-1:0] y);
    int cyc;
    logic [2*N-1:0] exp;
    exp = ref_mul(x, y);
    @(negedge clk);
    x_in  = x;
    y_in  = y;
    start = 1'b1;
    @(posedge clk);
    ser_n = 0;
    @(negedge clk);
    start = 1'b0;
    x_in  = ~x;  // operands must be captured at the start edge
    y_in  = ~y;
    cyc   = 1;
    while (!done) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (product !== exp) begin
      failures++;
      $display("FAIL N=%0d %0d x %0d: product %h expected %h", N, $signed(x), $signed(y), product, exp);
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, LAT);
    end
    checks++;
    if (ser_n != 2 * N || ser !== exp) begin
      failures++;
      $display("FAIL serial stream %h (%0d bits) expected %h", ser, ser_n, exp);
    end
    count_digits(y);
    if (x[N-1]) neg_x_cnt++;
  endtask

  initial begin
    checks = 0; failures = 0; fin = 1'b0;
    rst_n = 1'b0; start = 1'b0; x_in = '0; y_in = '0; ser = '0; ser_n = 0;
    foreach (digit_cnt[i]) digit_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Worked example (8-bit values, sign-extended to N).
    run(N'(52), N'(107));
    checks++;
    if (N >= 8 && product !== (2*N)'(5564)) begin
      failures++;
      $display("FAIL worked example gave %0d", product);
    end
    run('0, '0);
    run('1, '1);                         // -1 x -1
    run({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});  // most negative squared
    run({1'b0, {(N-1){1'b1}}}, {1'b1, {(N-1){1'b0}}});
    run(N'(3), {N/2{2'b10}});            // every digit -2 ... pattern
    run(N'(5), {N/2{2'b01}});
    for (int t = 0; t < NRAND; t++) begin
      logic [N-1:0] x, y;
      for (int b = 0; b < N; b++) begin
        x[b] = 1'($urandom);
        y[b] = 1'($urandom);
      end
      run(x, y);
    end
    $display("N=%0d Booth digits seen: 0:%0d +1:%0d +2:%0d -1:%0d -2:%0d, negative multiplicands:%0d",
             N, digit_cnt[0], digit_cnt[1], digit_cnt[2], digit_cnt[3], digit_cnt[4], neg_x_cnt);
    foreach (digit_cnt[i]) begin
      checks++;
      if (digit_cnt[i] == 0) begin
        failures++;
        $display("FAIL Booth digit class %0d never exercised", i);
      end
    end
    checks++;
    if (neg_x_cnt == 0) failures++;
    fin = 1'b1;
  end
endmodule
