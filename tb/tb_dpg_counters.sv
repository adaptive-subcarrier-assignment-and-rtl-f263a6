// Self-checking testbench of the CT_k / CT_t / CT_j counters.  For several
// (K, tmax, jmax) settings it starts a run and checks, clock by clock, that
// k, t and j follow the nested loops, that k_last / t_last / k_first mark
// the branch clocks, that run lasts exactly K*tmax*jmax clocks (the
// document's run time) and that conv pulses once, in the clock after.
module tb_dpg_counters;
  localparam int K = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, cfg_we = 0, start = 0;
  logic [15:0] cfg_tmax = 0, cfg_jmax = 0, t, j;
  logic run, k_first, k_last, t_last, conv;
  logic [1:0] k_idx;
  int checks = 0, failures = 0;
  dpg_counters #(.K(K)) dut (.*);
  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("%s", what); end
  endtask
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int cycles, convs;
    @(negedge clk); rst_n = 1;
    for (int cfg = 0; cfg < 3; cfg++) begin
      int tm, jm;
      tm = 2 + cfg * 3; jm = 1 + cfg;
      @(negedge clk); cfg_we = 1; cfg_tmax = 16'(tm); cfg_jmax = 16'(jm);
      @(negedge clk); cfg_we = 0; start = 1;
      @(negedge clk); start = 0;
      cycles = 0; convs = 0;
      for (int jj = 1; jj <= jm; jj++)
        for (int tt = 1; tt <= tm; tt++)
          for (int kk = 1; kk <= K; kk++) begin
            chk(run && int'(k_idx) == kk - 1 && int'(t) == tt && int'(j) == jj,
                $sformatf("loop state k=%0d t=%0d j=%0d, expected %0d %0d %0d", k_idx + 1, t, j, kk, tt, jj));
            chk(k_first == (kk == 1) && k_last == (kk == K) && t_last == (tt == tm), "branch flags");
            chk(!conv, "conv early");
            cycles++;
            @(negedge clk);
          end
      chk(!run, "run still high after K*tmax*jmax clocks");
      chk(conv, "conv missing");
      chk(cycles == K * tm * jm, "cycle count");
      @(negedge clk);
      chk(!conv, "conv longer than one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
