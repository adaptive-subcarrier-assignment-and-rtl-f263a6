// Self-checking testbench of the output buffer.  A behavioural K-bank store
// answers the buffer's rd_k; after act the buffer must deliver K beats,
// users 0..K-1 in order, each carrying that user's N pairs, and then stop.
module tb_dpg_buffer;
  import dpg_pkg::*;
  localparam int K = 4, N = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, act = 0, out_valid, busy;
  logic [1:0] rd_k, out_k;
  rr_t bank_q [N];
  rr_t out_data [N];
  rr_t store [K][N];
  int checks = 0, failures = 0;
  dpg_buffer #(.K(K), .N(N)) dut (.*);
  always_comb for (int n = 0; n < N; n++) bank_q[n] = store[rd_k][n];
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int beats;
    for (int k = 0; k < K; k++) for (int n = 0; n < N; n++) store[k][n] = rr_t'($urandom);
    @(negedge clk); rst_n = 1;
    repeat (2) begin
      @(negedge clk); act = 1;
      @(negedge clk); act = 0;
      beats = 0;
      for (int c = 0; c < K + 4; c++) begin
        if (out_valid) begin
          checks++;
          if (int'(out_k) != beats) begin failures++; $display("beat %0d has k=%0d", beats, out_k); end
          for (int n = 0; n < N; n++) begin
            checks++;
            if (out_data[n] !== store[beats][n]) begin failures++; $display("data k=%0d n=%0d", beats, n); end
          end
          beats++;
        end
        @(negedge clk);
      end
      checks++;
      if (beats != K) begin failures++; $display("%0d beats, expected %0d", beats, K); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
