// Self-checking testbench of PE6 (Step 5): running sum acc + rho_hat,
// saturated to 16 bits.  Random operands, compared with integer arithmetic.
module tb_dpg_pe6;
  import dpg_pkg::*;
  fx_t acc_in = 0, rho_hat = 0, acc_out;
  int checks = 0, failures = 0;
  dpg_pe6 dut (.*);
  initial begin
    int e;
    for (int i = 0; i < 1000; i++) begin
      acc_in = fx_t'($urandom); rho_hat = fx_t'($urandom_range(256));
      if (i % 2 == 0) acc_in = fx_t'(int'($urandom_range(2048)) - 1024);
      #1;
      e = int'(acc_in) + int'(rho_hat);
      if (e > 32767) e = 32767;
      checks++;
      if (int'(acc_out) != e) begin failures++; $display("got %0d exp %0d", acc_out, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
