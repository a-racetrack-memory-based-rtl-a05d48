// Self-checking test of the sequencer for N = 8 with random +-2 flags: it
// counts the pulses of every output during one operation and checks them with
// the schedule worked out here: N load cycles with indices 0..N-1, N-1 X
// shifts, exactly 2N pre-add shifts and 2N - s_i data cycles per row
// (s_i = 2i + two[i]), 2N enables per tree level starting at level offset l,
// and done after 6N + D - 1 edges.
module tb_rm_booth_ctrl;
  localparam int unsigned N = 8;
  localparam int unsigned K = N / 2;
  localparam int unsigned D = $clog2(K);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K-1:0] two;
  logic busy, done, ld_en, x_shift, pp_first;
  logic [$clog2(N)-1:0] ld_idx;
  logic [K-1:0] pp_shift, pp_data;
  logic [D-1:0] lvl_en, lvl_first;
  int checks = 0, failures = 0;

  rm_booth_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      int n_ld, n_xs, n_first, cyc, idx_err, pre_shift, first_cyc;
      int n_sh [K];
      int n_dat [K];
      int n_lvl [D];
      int lvl_start [D];
      bit in_add;
      n_ld = 0; n_xs = 0; n_first = 0; cyc = 0; idx_err = 0; first_cyc = -1; in_add = 0;
      foreach (n_sh[i]) begin n_sh[i] = 0; n_dat[i] = 0; end
      foreach (n_lvl[l]) begin n_lvl[l] = 0; lvl_start[l] = -1; end
      @(negedge clk);
      two = K'($urandom);
      start = 1'b1;
      @(posedge clk);
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin
        if (ld_en) begin
          if (ld_idx != ($clog2(N))'(n_ld)) idx_err++;
          n_ld++;
        end
        if (x_shift) n_xs++;
        if (pp_first) begin n_first++; first_cyc = cyc; end
        for (int i = 0; i < K; i++) begin
          if (pp_shift[i] && lvl_en == '0) n_sh[i]++;
          if (pp_data[i]) n_dat[i]++;
        end
        for (int l = 0; l < D; l++) begin
          if (lvl_en[l]) begin
            n_lvl[l]++;
            if (lvl_start[l] < 0) lvl_start[l] = cyc;
          end
        end
        @(posedge clk);
        cyc++;
        @(negedge clk);
      end
      expect_eq("load cycles", n_ld, N);
      expect_eq("load index errors", idx_err, 0);
      expect_eq("x shifts", n_xs, N - 1);
      expect_eq("first pulses", n_first, 1);
      expect_eq("first cycle", first_cyc, N + 2 * K);
      for (int i = 0; i < K; i++) begin
        expect_eq("row shifts before add", n_sh[i], 2 * N);
        expect_eq("row data cycles", n_dat[i], 2 * N - (2 * i + int'(two[i])));
      end
      for (int l = 0; l < D; l++) begin
        expect_eq("level enables", n_lvl[l], 2 * N);
        expect_eq("level start", lvl_start[l], lvl_start[0] + l);
      end
      expect_eq("latency", cyc, 6 * N + D - 1);
      @(negedge clk);
      expect_eq("idle after done", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
