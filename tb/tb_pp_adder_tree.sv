// Self-checking test of the pipelined adder tree for N = 8 (four rows, left,
// right and middle adder) and N = 16 (eight rows, three levels). Random 2N-bit
// rows are presented bit-serially, level l is enabled l cycles after level 0,
// and the root's output bits must form the sum of the rows modulo 2^(2N),
// arriving D-1 cycles after level 0 took bit 0.
module tb_pp_adder_tree;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // N = 8
  logic [3:0] pp8;  logic [1:0] en8, fi8;  logic s8;
  pp_adder_tree #(.N(8)) dut8 (.clk, .rst_n, .pp_bit(pp8), .lvl_en(en8), .lvl_first(fi8), .sum_bit(s8));
  // N = 16
  logic [7:0] pp16; logic [2:0] en16, fi16; logic s16;
  pp_adder_tree #(.N(16)) dut16 (.clk, .rst_n, .pp_bit(pp16), .lvl_en(en16), .lvl_first(fi16), .sum_bit(s16));

  task automatic run8;
    logic [15:0] rows [4];
    logic [15:0] exp, got;
    exp = '0;
    foreach (rows[i]) begin rows[i] = 16'($urandom); exp += rows[i]; end
    for (int c = 0; c < 16 + 1; c++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) pp8[i] = (c < 16) ? rows[i][c] : 1'b0;
      for (int l = 0; l < 2; l++) begin
        en8[l] = (c >= l) && (c < l + 16);
        fi8[l] = (c == l);
      end
      #1;
      if (en8[1]) got[c-1] = s8;
    end
    @(negedge clk);
    en8 = '0; fi8 = '0; pp8 = '1;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=8 sum %h expected %h", got, exp);
    end
  endtask

  task automatic run16;
    logic [31:0] rows [8];
    logic [31:0] exp, got;
    exp = '0;
    foreach (rows[i]) begin rows[i] = $urandom; exp += rows[i]; end
    for (int c = 0; c < 32 + 2; c++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) pp16[i] = (c < 32) ? rows[i][c] : 1'b0;
      for (int l = 0; l < 3; l++) begin
        en16[l] = (c >= l) && (c < l + 32);
        fi16[l] = (c == l);
      end
      #1;
      if (en16[2]) got[c-2] = s16;
    end
    @(negedge clk);
    en16 = '0; fi16 = '0; pp16 = '1;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=16 sum %h expected %h", got, exp);
    end
  endtask

  initial begin
    pp8 = '0; en8 = '0; fi8 = '0; pp16 = '0; en16 = '0; fi16 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      run8();
      run16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
