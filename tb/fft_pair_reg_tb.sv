// fft_pair_reg_tb: checks that the pipeline register loads when enabled,
// holds when not, and clears its valid bit on reset, against a model
// register kept in the testbench.
module fft_pair_reg_tb;
  import fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst_n, en, d_valid, q_valid;
  sample_t d [2], q [2];
  logic    m_valid;
  sample_t m [2];
  int checks = 0, failures = 0;

  fft_pair_reg dut (.clk, .rst_n, .en, .d_valid, .d, .q_valid, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b1; d_valid = 1'b1; d[0] = '1; d[1] = '1;
    @(posedge clk); #1;
    checks++;
    if (q_valid) begin failures++; $display("FAIL: valid after reset"); end
    rst_n = 1'b1;
    m_valid = 1'b0; m[0] = '0; m[1] = '0;
    repeat (500) begin
      en = 1'($urandom);
      d_valid = 1'($urandom);
      d[0] = sample_t'({$urandom, $urandom});
      d[1] = sample_t'({$urandom, $urandom});
      @(posedge clk);
      if (en) begin m_valid = d_valid; m[0] = d[0]; m[1] = d[1]; end
      #1;
      checks++;
      if (q_valid != m_valid || q[0] != m[0] || q[1] != m[1]) begin
        failures++;
        if (failures < 10) $display("FAIL: register content differs from model (en=%0b)", en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
