// Self-checking testbench of the type-2 register (K banks, register
// indicator k).  While en is high every clock writes bank k; q shows bank k
// and rd_q shows bank rd_k.  init clears all banks.  A reference array is
// updated alongside and both read ports are compared every clock.
module tb_dpg_reg_type2;
  localparam int K = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic init = 0, en = 0;
  logic [2:0] k = 0, rd_k = 0;
  logic [15:0] d = 0, q, rd_q;
  logic [15:0] model [K];
  int checks = 0, failures = 0;
  dpg_reg_type2 #(.W(16), .K(K)) dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    for (int i = 0; i < K; i++) model[i] = '0;
    for (int i = 0; i < 600; i++) begin
      k = 3'(i % K); rd_k = 3'($urandom_range(K - 1));
      d = 16'($urandom); en = ($urandom_range(3) != 0);
      #1;
      checks += 2;
      if (q !== model[k]) begin failures++; $display("q bank %0d got %h exp %h", k, q, model[k]); end
      if (rd_q !== model[rd_k]) begin failures++; $display("rd_q bank %0d got %h exp %h", rd_k, rd_q, model[rd_k]); end
      @(posedge clk);
      if (en) model[k] = d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
