// Self-checking testbench of the type-1 register: init loads the Step 0
// value, a write needs every enable high, otherwise the value holds.
// Compared with a reference model over random stimulus (NE = 2, as for
// R(sigma)'s k = K and t = tmax enables).
module tb_dpg_reg_type1;
  logic clk = 0;
  always #5 clk = ~clk;
  logic init = 0;
  logic [15:0] init_val = 16'h0100, d = 0, q, model;
  logic [1:0] we = 0;
  int checks = 0, failures = 0, writes = 0;
  dpg_reg_type1 #(.W(16), .NE(2)) dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); init = 1; model = init_val;
    @(negedge clk); init = 0;
    for (int i = 0; i < 500; i++) begin
      checks++;
      if (q !== model) begin failures++; $display("got %h exp %h", q, model); end
      d = 16'($urandom); we = 2'($urandom); init = ($urandom_range(20) == 0);
      @(posedge clk);
      if (init) model = init_val;
      else if (we == 2'b11) begin model = d; writes++; end
      @(negedge clk); init = 0;
    end
    checks++;
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
