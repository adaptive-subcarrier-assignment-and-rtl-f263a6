// Self-checking testbench of PE2 (Step 3, projection onto
// {0 <= rho <= 1, 0 <= r <= M rho}).  Random and hand-picked points from
// every case of the projection table are compared with a floating-point
// projection; each case must be exercised at least once.
module tb_dpg_pe2;
  import dpg_pkg::*;
  localparam int M = 6;
  fx_t r_t = 0, rho_t = 0;
  rr_t hat;
  int checks = 0, failures = 0;
  int hits [6];

  dpg_pe2 #(.M(M)) dut (.*);

  function automatic real q(input fx_t v); return real'(v) / 256.0; endfunction

  task automatic check_one(input fx_t rv, input fx_t pv);
    real r, p, er, ep, s;
    int cs;
    r_t = rv; rho_t = pv; #1;
    r = q(rv); p = q(pv);
    if (p < 0)                         begin er = 0; ep = 0; cs = 0; end
    else if (p >= 1 && r >= M)         begin er = M; ep = 1; cs = 1; end
    else if (p >= 1)                   begin er = r; ep = 1; cs = 2; end
    else if (r >= 0 && r <= M * p)     begin er = r; ep = p; cs = 3; end
    else if (r >= M + 1.0/M - p/M)     begin er = M; ep = 1; cs = 4; end
    else begin s = (M * r + p) / (M * M + 1); er = M * s; ep = s; cs = 5; end
    hits[cs]++;
    checks++;
    if (q(hat.r) - er > 0.05 || er - q(hat.r) > 0.05 ||
        q(hat.rho) - ep > 0.02 || ep - q(hat.rho) > 0.02) begin
      failures++;
      $display("case %0d (r=%f rho=%f): got (%f,%f) exp (%f,%f)", cs, r, p,
               q(hat.r), q(hat.rho), er, ep);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check_one(16'sd100, -16'sd10);          // rho < 0
    check_one(16'sd2000, 16'sd300);         // (M,1)
    check_one(16'sd500, 16'sd300);          // (r,1)
    check_one(16'sd300, 16'sd128);          // inside
    check_one(16'sd1570, 16'sd250);         // beyond corner
    check_one(16'sd1000, 16'sd100);         // perpendicular foot
    for (int i = 0; i < 2000; i++)
      check_one(fx_t'($urandom_range(2500)), fx_t'(int'($urandom_range(400)) - 60));
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (hits[c] == 0) begin failures++; $display("case %0d never hit", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
