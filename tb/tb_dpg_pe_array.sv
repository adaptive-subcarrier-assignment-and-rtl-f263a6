// Self-checking testbench of one PE array (subcarrier n) with K = 3 users.
// The testbench plays the role of the shared parts: it drives CT_k's k,
// lambda_k^r and sigma.  Every clock it checks (r_hat, rho_hat) against a
// floating-point evaluation of Steps 2 and 3; at every k = K it checks that
// lambda_n^p moved by beta * (sum of the K rho_hat delivered - 1), computed
// with integer arithmetic from the array's own outputs; at the end it reads
// the K banks back through rd_k and compares them with the last pairs.
module tb_dpg_pe_array;
  import dpg_pkg::*;
  localparam int K = 3, M = 6;
  localparam real B = 1.0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic init = 0, run = 0, k_first, k_last, cfg_alpha_we = 0, cfg_beta_we = 0;
  logic [1:0] k_idx = 0, cfg_k = 0, rd_k = 0;
  fx_t lam_r = 0, cfg_d0 = 0, cfg_d1 = 0, r_hat;
  sigma_t sig;
  rr_t hat, rd_q;
  rr_t last [K];
  real a2r [K];
  real ia2r [K];
  int checks = 0, failures = 0, beta = 128;
  dpg_pe_array #(.K(K), .M(M), .B_VAL(B)) dut (.*);

  assign k_first = (k_idx == 0);
  assign k_last  = (k_idx == 2'(K - 1));

  function automatic real q(input fx_t v); return real'(v) / 256.0; endfunction

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real x, c, g, rho, r, s, er, ep, tol;
    int acc, lp;
    sig.sigma = 16'sd256; sig.inv_sigma = 16'sd256;
    for (int i = 0; i < K; i++) begin
      @(negedge clk); cfg_alpha_we = 1; cfg_k = 2'(i);
      cfg_d0 = fx_t'(100 + 150 * i); cfg_d1 = fx_t'(65536 / (100 + 150 * i));
      a2r[i] = q(cfg_d0); ia2r[i] = q(cfg_d1);
    end
    @(negedge clk); cfg_alpha_we = 0; cfg_beta_we = 1; cfg_d0 = fx_t'(beta);
    @(negedge clk); cfg_beta_we = 0; init = 1;
    @(negedge clk); init = 0; run = 1;
    lp = 0;
    for (int t = 0; t < 40; t++) begin
      if (t == 20) begin sig.sigma = 16'sd128; sig.inv_sigma = 16'sd512; end
      acc = -256;
      for (int kk = 0; kk < K; kk++) begin
        k_idx = 2'(kk);
        lam_r = fx_t'($urandom_range(2500));
        #1;
        checks++;
        if (int'(dut.lam_p) != lp) begin failures++; $display("lambda_p got %0d exp %0d", dut.lam_p, lp); end
        x = q(lam_r) * a2r[kk];
        c = (x / (B * $ln(2.0)) > 1.0) ? $ln(x / (B * $ln(2.0))) / $ln(2.0) : 0.0;
        g = (c > 0.0) ? (B * ($pow(2.0, c) - 1.0) - x * c) : 0.0;
        rho = -(real'(lp) / 256.0 + g * ia2r[kk]) * q(sig.inv_sigma);
        r = rho * c;
        if (rho < 0)                      begin er = 0; ep = 0; end
        else if (rho >= 1 && r >= M)      begin er = M; ep = 1; end
        else if (rho >= 1)                begin er = r; ep = 1; end
        else if (r >= 0 && r <= M * rho)  begin er = r; ep = rho; end
        else if (r >= M + 1.0/M - rho/M)  begin er = M; ep = 1; end
        else begin s = (M * r + rho) / (M * M + 1); er = M * s; ep = s; end
        tol = 0.06 + 0.012 * x * ia2r[kk] * q(sig.inv_sigma) * (c + 1.0);
        checks += 2;
        if (q(hat.r) - er > tol || er - q(hat.r) > tol) begin
          failures++; $display("r_hat got %f exp %f", q(hat.r), er);
        end
        if (q(hat.rho) - ep > tol || ep - q(hat.rho) > tol) begin
          failures++; $display("rho_hat got %f exp %f", q(hat.rho), ep);
        end
        checks++;
        if (r_hat !== hat.r) begin failures++; $display("r_hat port"); end
        acc += int'(hat.rho);
        last[kk] = hat;
        @(negedge clk);
      end
      if (acc > 32767) acc = 32767;
      lp = lp + ((beta * acc) >>> 8);
    end
    run = 0;
    for (int kk = 0; kk < K; kk++) begin
      rd_k = 2'(kk); #1;
      checks++;
      if (rd_q !== last[kk]) begin failures++; $display("bank %0d read back wrong", kk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
