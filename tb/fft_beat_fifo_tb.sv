// fft_beat_fifo_tb: pushes random beats through the inter-stage buffer
// (depth 2 and depth 5) with random valid and ready, and checks that every
// beat comes out once, in order, against a testbench queue, and that the
// buffer reports full and empty at the right occupancy.
module fft_beat_fifo_tb;
  import fft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;
  int n_full = 0;

  logic    iv2, ir2, ov2, or2, iv5, ir5, ov5, or5;
  sample_t id2 [2], od2 [2], id5 [2], od5 [2];

  fft_beat_fifo #(.DEPTH(2)) dut2 (.clk, .rst_n, .in_valid(iv2), .in_ready(ir2), .in_data(id2),
                                   .out_valid(ov2), .out_ready(or2), .out_data(od2));
  fft_beat_fifo #(.DEPTH(5)) dut5 (.clk, .rst_n, .in_valid(iv5), .in_ready(ir5), .in_data(id5),
                                   .out_valid(ov5), .out_ready(or5), .out_data(od5));

  sample_t q2 [$][2];
  sample_t q5 [$][2];

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (ir2 != (q2.size() < 2) || ov2 != (q2.size() > 0) ||
          ir5 != (q5.size() < 5) || ov5 != (q5.size() > 0)) begin
        failures++;
        $display("FAIL: full/empty flags wrong");
      end
      if (ov2 && or2) begin
        checks++;
        if (q2.size() == 0 || od2 != q2[0]) begin failures++; $display("FAIL: depth 2 order"); end
        else void'(q2.pop_front());
      end
      if (ov5 && or5) begin
        checks++;
        if (q5.size() == 0 || od5 != q5[0]) begin failures++; $display("FAIL: depth 5 order"); end
        else void'(q5.pop_front());
      end
      if (iv2 && ir2) q2.push_back(id2);
      if (iv5 && ir5) q5.push_back(id5);
      if (!ir2 || !ir5) n_full++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    iv2 = 0; or2 = 0; iv5 = 0; or5 = 0;
    id2[0] = '0; id2[1] = '0; id5[0] = '0; id5[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3000) begin
      @(posedge clk); #2;
      iv2 = 1'($urandom); or2 = ($urandom_range(3) == 0);
      iv5 = 1'($urandom); or5 = ($urandom_range(2) != 0);
      id2[0] = sample_t'({$urandom, $urandom}); id2[1] = sample_t'({$urandom, $urandom});
      id5[0] = sample_t'({$urandom, $urandom}); id5[1] = sample_t'({$urandom, $urandom});
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: buffers never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
