// Self-checking test of the sense amplifier model: precharge drives both
// outputs high; evaluation makes the higher-resistance side 1 and the other 0,
// over every unequal pair of small resistances.
module tb_pcsa;
  logic       eval;
  logic [5:0] rl, rr;
  logic       out, out_n;
  int checks = 0, failures = 0;

  pcsa dut (.eval, .r_left(rl), .r_right(rr), .out, .out_n);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 40; a++) begin
      for (int b = 0; b < 40; b++) begin
        if (a == b) continue;
        rl = 6'(a); rr = 6'(b);
        eval = 1'b0; #1;
        checks++;
        if (out !== 1'b1 || out_n !== 1'b1) begin
          failures++;
          $display("FAIL precharge %0d/%0d", a, b);
        end
        eval = 1'b1; #1;
        checks++;
        if (out !== (a > b) || out_n !== (a < b)) begin
          failures++;
          $display("FAIL evaluate %0d/%0d -> %b%b", a, b, out, out_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
