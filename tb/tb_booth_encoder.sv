// Self-checking test of the radix-4 Booth encoder: for every 3-bit group the
// selected multiple (computed here as -2*y(2i+1) + y(2i) + y(2i-1)) must match
// the one control signal raised, and neg must be set for negative multiples.
module tb_booth_encoder;
  import rm_pkg::*;
  logic [2:0] grp;
  booth_ctl_t ctl;
  logic       neg;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp, .ctl, .neg);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int m;
      booth_ctl_t exp;
      grp = 3'(v);
      #1;
      m = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      exp = '0;
      case (m)
        0:  exp.zero   = 1'b1;
        1:  exp.one    = 1'b1;
        2:  exp.two    = 1'b1;
        -1: exp.ne_one = 1'b1;
        -2: exp.ne_two = 1'b1;
        default: ;
      endcase
      checks++;
      if (ctl !== exp) begin
        failures++;
        $display("FAIL group %03b: ctl %b expected %b", grp, ctl, exp);
      end
      checks++;
      if (neg !== (m < 0)) begin
        failures++;
        $display("FAIL group %03b: neg %b", grp, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
