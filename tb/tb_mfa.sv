// Self-checking test of the magnetic full adder against the full-adder
// equations Sum = A^B^Ci and Co = majority(A,B,Ci), for all eight input
// patterns, plus the complementary outputs and the precharge state. It also
// derives Sum and Co a second way, from the adder's truth tables of branch
// resistances, written here in units of R_L/2 (R_L = 2, R_H = 5):
//   carry left branch  3R_L, 2R_L+R_H, ..., 3R_H   right branch 2R_H
//   sum left branch    2R_L, R_L+R_H or 2R_H       right branch R_H
module tb_mfa;
  logic eval, a, b, ci;
  logic sum, sum_n, co, co_n;
  int checks = 0, failures = 0;

  mfa dut (.eval, .a, .b, .ci, .sum, .sum_n, .co, .co_n);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Truth-table rows indexed by {A,B,Ci}.
  localparam int RL = 2, RH = 5;
  localparam int CARRY_LEFT [8] = '{3*RL, 2*RL+RH, 2*RL+RH, RL+2*RH, 2*RL+RH, RL+2*RH, RL+2*RH, 3*RH};
  localparam int SUM_LEFT   [8] = '{2*RL, RL+RH, 2*RH, RL+RH, RL+RH, 2*RH, RL+RH, 2*RL};
  localparam bit SUM_IN     [8] = '{0, 1, 1, 1, 1, 1, 1, 0};

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      eval = 1'b0; #1;
      checks++;
      if ({sum, sum_n, co, co_n} !== 4'b1111) begin
        failures++;
        $display("FAIL precharge pattern %03b", v[2:0]);
      end
      eval = 1'b1; #1;
      checks++;
      if (sum !== (a ^ b ^ ci) || sum_n !== ~(a ^ b ^ ci)) begin
        failures++;
        $display("FAIL sum for %03b: %b", v[2:0], sum);
      end
      checks++;
      if (co !== ((a & b) | (a & ci) | (b & ci)) || co_n !== ~co) begin
        failures++;
        $display("FAIL carry for %03b: %b", v[2:0], co);
      end
      // Expected outputs derived from the truth tables alone: the higher
      // resistance side of each sense amplifier reads 1, and the MUX inverts
      // the interim sum when the carry is 1.
      checks++;
      if (co !== (CARRY_LEFT[v] > 2 * RH) || sum !== (SUM_IN[v] ^ (CARRY_LEFT[v] > 2 * RH))) begin
        failures++;
        $display("FAIL truth-table row %03b: sum %b co %b", v[2:0], sum, co);
      end
      checks++;
      if (SUM_IN[v] != (SUM_LEFT[v] > RH)) begin
        failures++;
        $display("FAIL table consistency row %03b", v[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
