// fft_shift_reg_tb: fills the operand shift register with a half-group and
// pops it, for depths 1 (single pushes) and 4 and 8 (pair pushes). The words
// must come out oldest first, in push order, with count tracking the number
// of waiting words; a queue in the testbench is the reference.
module fft_shift_reg_tb;
  import fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic    push1, pop1;
  sample_t d1 [2], tail1;
  logic [0:0] count1;
  logic    push4, pop4;
  sample_t d4 [2], tail4;
  logic [2:0] count4;
  logic    push8, pop8;
  sample_t d8 [2], tail8;
  logic [3:0] count8;

  fft_shift_reg #(.DEPTH(1)) dut1 (.clk, .rst_n, .push(push1), .push_two(1'b0), .d(d1),
                                   .pop(pop1), .tail(tail1), .count(count1));
  fft_shift_reg #(.DEPTH(4)) dut4 (.clk, .rst_n, .push(push4), .push_two(1'b1), .d(d4),
                                   .pop(pop4), .tail(tail4), .count(count4));
  fft_shift_reg #(.DEPTH(8)) dut8 (.clk, .rst_n, .push(push8), .push_two(1'b1), .d(d8),
                                   .pop(pop8), .tail(tail8), .count(count8));

  function automatic sample_t rnd_sample();
    return sample_t'({$urandom, $urandom});
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run1();
    sample_t q [$];
    q.push_back(rnd_sample());
    push1 = 1'b1; d1[0] = q[0]; d1[1] = '0;
    @(posedge clk); #1 push1 = 1'b0;
    chk(count1 == 1'b1, "depth 1: count after push");
    pop1 = 1'b1;
    chk(tail1 == q[0], "depth 1: tail");
    @(posedge clk); #1 pop1 = 1'b0;
    chk(count1 == 1'b0, "depth 1: count after pop");
  endtask

  task automatic run4();
    sample_t q [$];
    for (int b = 0; b < 2; b++) begin
      d4[0] = rnd_sample(); d4[1] = rnd_sample();
      q.push_back(d4[0]); q.push_back(d4[1]);
      push4 = 1'b1;
      @(posedge clk); #1 push4 = 1'b0;
    end
    chk(count4 == 3'd4, "depth 4: count full");
    for (int i = 0; i < 4; i++) begin
      pop4 = 1'b1;
      chk(tail4 == q[i], $sformatf("depth 4: word %0d out of order", i));
      @(posedge clk); #1 pop4 = 1'b0;
      if ($urandom_range(1)) @(posedge clk);
      #1;
    end
    chk(count4 == 3'd0, "depth 4: count empty");
  endtask

  task automatic run8();
    sample_t q [$];
    for (int b = 0; b < 4; b++) begin
      d8[0] = rnd_sample(); d8[1] = rnd_sample();
      q.push_back(d8[0]); q.push_back(d8[1]);
      push8 = 1'b1;
      @(posedge clk); #1 push8 = 1'b0;
      chk(count8 == 4'(2 * b + 2), "depth 8: count while filling");
    end
    for (int i = 0; i < 8; i++) begin
      pop8 = 1'b1;
      chk(tail8 == q[i], $sformatf("depth 8: word %0d out of order", i));
      @(posedge clk); #1 pop8 = 1'b0;
    end
    chk(count8 == 4'd0, "depth 8: count empty");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    push1 = 0; pop1 = 0; push4 = 0; pop4 = 0; push8 = 0; pop8 = 0;
    d1[0] = '0; d1[1] = '0; d4[0] = '0; d4[1] = '0; d8[0] = '0; d8[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(count1 == 0 && count4 == 0 && count8 == 0, "count after reset");
    repeat (20) begin
      run1();
      run4();
      run8();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
