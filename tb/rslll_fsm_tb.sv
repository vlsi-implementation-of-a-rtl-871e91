// rslll_fsm_tb: self-checking test of the RS-LLL controller on its own.
// The Siegel decisions are random (drawn whenever the controller asks for a
// check) and the CORDIC is replaced by its timing: vec_done six cycles after
// vec_start. An independent model of Alg. 1 (k, swap counter S, early
// termination at SMAX) predicts, cycle by cycle, which operation and index the
// controller must issue; any deviation, a wrong swap count, a wrong
// early-termination flag or a wrong latency counts as a failure. SMAX is
// reduced to 5 so that early termination happens often.
module rslll_fsm_tb;
  import rslll_pkg::*;

  localparam int MT = 4, MR = 4, SMAX = 5, SW = $clog2(SMAX + 2);
  logic clk = 0, rst_n = 0, start = 0;
  logic ready, busy, done, early_term, mem_swap, t_init, t_mac_swap, div_start, vec_start, w_load;
  logic [SW-1:0] swaps;
  logic [MT-2:0] siegel_ok = '0;
  logic vec_done = 0;
  op_e  op;
  idx_t kk, j;
  int checks = 0, failures = 0, n_et = 0, n_reg = 0, n_skip = 0;

  always #5 clk = ~clk;

  rslll_fsm #(.MT(MT), .MR(MR), .SMAX(SMAX)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (op=%s kk=%0d j=%0d)", what, op.name(), kk, j); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 400; run++) begin
      int k, S;
      bit fin;
      @(negedge clk);
      chk(ready && !busy, "ready in idle");
      start = 1;
      #1;
      chk(mem_swap, "bank swap on start");
      @(negedge clk);
      start = 0;
      chk(t_init && busy, "T init");
      k = MT - 1; S = 0; fin = 0;
      while (!fin) begin
        int found;
        @(negedge clk);
        chk(op == OP_SIEGEL, "Siegel check");
        siegel_ok = (MT-1)'($urandom) & (MT-1)'($urandom);
        found = 0;
        for (int m = 0; m < MT - 1; m++) if (siegel_ok[m] && m + 1 <= k) found = m + 1;
        if (S == SMAX || found == 0) begin
          @(negedge clk);
          chk(done, "done pulse");
          chk(int'(swaps) == S, "swap count");
          chk(early_term == (S == SMAX), "early termination flag");
          if (S == SMAX) n_et++; else n_reg++;
          fin = 1;
        end else begin
          if (found < k) n_skip++;
          k = found;
          @(negedge clk);
          chk(div_start && int'(kk) == k, "divide");
          @(negedge clk);
          chk(op == OP_SRED && t_mac_swap && vec_start && int'(kk) == k, "size reduction");
          repeat (6) begin
            @(negedge clk);
            chk(op == OP_NONE && !w_load, "waiting for CORDIC");
          end
          @(negedge clk);
          vec_done = 1;
          #1;
          chk(op == OP_PHASOR && w_load, "phasor");
          @(negedge clk);
          vec_done = 0;
          chk(op == OP_ROT_KK && int'(kk) == k, "rotate pair");
          for (int jj = k + 1; jj < MT; jj++) begin
            @(negedge clk);
            chk(op == OP_ROT_R && int'(j) == jj, "rotate R");
          end
          for (int jj = 0; jj < MR; jj++) begin
            @(negedge clk);
            chk(op == OP_ROT_Q && int'(j) == jj, "rotate Q");
          end
          S++;
          k = (k + 1 < MT - 1) ? k + 1 : MT - 1;
        end
      end
    end
    checks++;
    if (n_et == 0 || n_reg == 0 || n_skip == 0) begin
      failures++; $display("coverage: early %0d regular %0d skips %0d", n_et, n_reg, n_skip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
