// Shared body of the end-to-end testbenches of dpg_top: stimulus, checks and
// mechanism counters.  Expects K, N, M, TMAX, JMAX, BETA, ETA, TOL_RHO,
// TOL_R, ABPS, STRICT (1: model agreement and convergence are checks,
// 0: they are only reported) and the DUT's port signals to be declared by the including module.
  int checks = 0, failures = 0, off_model = 0, unconverged = 0;
  int rate [K];
  real a2q [K][N];
  real ia2q [K][N];
  real mr [K][N];
  real mrho [K][N];
  rr_t last [K][N];
  rr_t got  [K][N];
  int n_lamp_wr = 0, n_sig_wr = 0, n_restart = 0, n_clamp = 0, n_busy = 0, n_done = 0;
  int n_case [6];

  function automatic real q(input fx_t v); return real'(v) / 256.0; endfunction
  function automatic fx_t fx(input real v); return fx_t'($rtoi(v * 256.0 + 0.5)); endfunction

  // which row of the projection table applies to (r~, rho~)
  function automatic int pcase(input fx_t r, input fx_t p);
    real rr, pp;
    rr = q(r); pp = q(p);
    if (pp < 0) return 0;
    if (pp >= 1 && rr >= M) return 1;
    if (pp >= 1) return 2;
    if (rr >= 0 && rr <= M * pp) return 3;
    if (rr >= M + 1.0 / M - pp / M) return 4;
    return 5;
  endfunction

  // floating-point model of Steps 0-12 (B = 1), run on the same quantised
  // constants; leaves the pairs of the last clock of every user in mr/mrho
  task automatic float_model();
    real lr [K];
    real lp [N];
    real acc [N];
    real sg, x, c, g, rho, r, s, rs, b, e;
    b = q(fx(BETA)); e = q(fx(ETA));
    for (int k = 0; k < K; k++) lr[k] = 0.0;
    for (int n = 0; n < N; n++) lp[n] = 0.0;
    sg = 1.0;
    for (int j = 0; j < JMAX; j++) begin
      for (int t = 0; t < TMAX; t++) begin
        for (int n = 0; n < N; n++) acc[n] = -1.0;
        for (int k = 0; k < K; k++) begin
          rs = 0.0;
          for (int n = 0; n < N; n++) begin
            x = lr[k] * a2q[k][n];
            c = (x / $ln(2.0) > 1.0) ? $ln(x / $ln(2.0)) / $ln(2.0) : 0.0;
            g = (c > 0.0) ? ($pow(2.0, c) - 1.0 - x * c) : 0.0;
            rho = -(lp[n] + g * ia2q[k][n]) / sg;
            r = rho * c;
            if (rho < 0)                          begin r = 0; rho = 0; end
            else if (rho >= 1 && r >= M)          begin r = M; rho = 1; end
            else if (rho >= 1)                    begin rho = 1; end
            else if (r >= 0 && r <= M * rho)      begin end
            else if (r >= M + 1.0 / M - rho / M)  begin r = M; rho = 1; end
            else begin s = (M * r + rho) / (M * M + 1); r = M * s; rho = s; end
            mr[k][n] = r; mrho[k][n] = rho;
            rs += r; acc[n] += rho;
          end
          lr[k] += b * (real'(rate[k]) - rs);
        end
        for (int n = 0; n < N; n++) lp[n] += b * acc[n];
      end
      sg = sg * e;
    end
  endtask

  task automatic cfg(input cfg_sel_t s, input int k, input int n, input fx_t d0, input fx_t d1);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_k = KW'(k); cfg_n = NW'(n); cfg_d0 = d0; cfg_d1 = d1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // watchdog
  initial begin
    repeat (K * TMAX * JMAX + 20 * K * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    if (!STRICT)
      $display("reported only: %0d pairs off the model, %0d unconverged sums", off_model, unconverged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // observe the run (at the falling edge, where the state is settled)
  always @(negedge clk) begin
    if (dut.run) begin
      n_busy++;
      if (dut.k_last) n_lamp_wr++;
      if (dut.k_last && dut.t_last) n_sig_wr++;
      if (dut.k_first) n_restart++;
      for (int n = 0; n < N; n++) last[dut.k_idx][n] = dut.hat[n];
    end
    if (done) n_done++;
  end

  for (genvar g = 0; g < N; g++) begin : g_obs
    always @(negedge clk) if (dut.run) begin
      n_case[pcase(dut.g_arr[g].u_arr.r_t, dut.g_arr[g].u_arr.rho_t)]++;
      if (dut.g_arr[g].u_arr.u_pe1.cstar == 0) n_clamp++;
    end
  end

  initial begin
    int beats, total, cyc;
    real a2, s, sr, ideal;
    @(negedge clk); rst_n = 1;
    // rate requests: ABPS bits per subcarrier on average
    total = 0;
    for (int k = 0; k < K; k++) begin
      rate[k] = 1 + int'($urandom_range(6));
      total += rate[k];
    end
    for (int k = 0; k < K; k++) rate[k] = (rate[k] * ABPS * N + total / 2) / total;
    for (int k = 0; k < K; k++) begin
      cfg(CFG_RATE, k, 0, fx_t'(rate[k] * 256), '0);
      for (int n = 0; n < N; n++) begin
        a2 = -$ln((real'($urandom_range(1000)) + 1.0) / 1002.0);
        if (a2 < 0.05) a2 = 0.05;
        if (a2 > 8.0) a2 = 8.0;
        cfg(CFG_ALPHA, k, n, fx(a2), fx(1.0 / a2));
        a2q[k][n] = q(fx(a2)); ia2q[k][n] = q(fx(1.0 / a2));
      end
    end
    cfg(CFG_BETA, 0, 0, fx(BETA), '0);
    cfg(CFG_ETA, 0, 0, fx(ETA), fx(1.0 / ETA));
    cfg(CFG_LOOPS, 0, 0, fx_t'(TMAX), fx_t'(JMAX));
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // run length
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (n_busy != K * TMAX * JMAX) begin
      failures++; $display("busy for %0d clocks, expected %0d", n_busy, K * TMAX * JMAX);
    end
    // unload
    beats = 0;
    for (int c = 0; c < K + 4; c++) begin
      if (out_valid) begin
        checks++;
        if (int'(out_k) != beats) begin failures++; $display("beat %0d carries user %0d", beats, out_k); end
        for (int n = 0; n < N; n++) got[out_k][n] = out_data[n];
        beats++;
      end
      @(negedge clk);
    end
    checks++;
    if (beats != K) begin failures++; $display("%0d beats, expected %0d", beats, K); end
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) begin
      checks += 2;
      if (got[k][n] !== last[k][n]) begin failures++; $display("buffer pair (%0d,%0d) differs", k, n); end
      if (got[k][n].rho < 0 || got[k][n].rho > 16'sd256 || got[k][n].r < 0 ||
          int'(got[k][n].r) > M * int'(got[k][n].rho) + 4) begin
        failures++; $display("pair (%0d,%0d) infeasible: r=%f rho=%f", k, n, q(got[k][n].r), q(got[k][n].rho));
      end
    end
    // agreement with the floating-point model
    float_model();
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) begin
      checks++;
      if (q(got[k][n].r) - mr[k][n] > TOL_R || mr[k][n] - q(got[k][n].r) > TOL_R ||
          q(got[k][n].rho) - mrho[k][n] > TOL_RHO || mrho[k][n] - q(got[k][n].rho) > TOL_RHO) begin
        if (STRICT) failures++; else off_model++;
        if (STRICT) $display("pair (%0d,%0d): (%f,%f), model (%f,%f)", k, n, q(got[k][n].r), q(got[k][n].rho),
                 mr[k][n], mrho[k][n]);
      end
    end
    // convergence of the dual iteration
    for (int n = 0; n < N; n++) begin
      s = 0.0;
      for (int k = 0; k < K; k++) s += q(got[k][n].rho);
      checks++;
      if (s > 1.0 + TOL_RHO || s < 1.0 - TOL_RHO) begin
        if (STRICT) begin failures++; $display("subcarrier %0d: sum rho = %f", n, s); end
        else unconverged++;
      end
    end
    for (int k = 0; k < K; k++) begin
      sr = 0.0;
      for (int n = 0; n < N; n++) sr += q(got[k][n].r);
      checks++;
      if (sr > rate[k] + TOL_R * (1.0 + rate[k] / 16.0) || sr < rate[k] - TOL_R * (1.0 + rate[k] / 16.0)) begin
        if (STRICT) begin failures++; $display("user %0d: sum r = %f, R = %0d", k, sr, rate[k]); end
        else unconverged++;
      end
    end
    ideal = $pow(ETA, JMAX);
    checks++;
    if (q(dut.sig.sigma) > ideal + 0.05 || q(dut.sig.sigma) < ideal - 0.05) begin
      failures++; $display("final sigma %f, expected about %f", q(dut.sig.sigma), ideal);
    end
    // mechanisms
    checks += 5;
    if (n_lamp_wr != TMAX * JMAX) begin failures++; $display("lambda_p writes %0d", n_lamp_wr); end
    if (n_sig_wr != JMAX) begin failures++; $display("sigma writes %0d", n_sig_wr); end
    if (n_restart != TMAX * JMAX) begin failures++; $display("type-3 restarts %0d", n_restart); end
    if (n_done != 1) begin failures++; $display("done pulses %0d", n_done); end
    if (n_clamp == 0) begin failures++; $display("c* clamp never used"); end
    // rows 4 and 5 of the projection need c* > M together with rho~ < 1,
    // which the iteration does not produce at these loads (the unit test of
    // PE2 covers them); rows 0-3 must all occur
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (n_case[c] == 0) begin failures++; $display("projection case %0d never happened", c); end
    end
    $display("run: %0d clocks; lambda_p writes %0d, sigma writes %0d, restarts %0d, clamps %0d",
             n_busy, n_lamp_wr, n_sig_wr, n_restart, n_clamp);
    $display("projection cases: %0d %0d %0d %0d %0d %0d", n_case[0], n_case[1], n_case[2],
             n_case[3], n_case[4], n_case[5]);
    if (!STRICT)
      $display("reported only: %0d pairs off the model, %0d unconverged sums", off_model, unconverged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
