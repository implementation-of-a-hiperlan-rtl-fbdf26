// Testbench for prefix_removal: a stream of numbered samples (four 80-sample symbols,
// then a new frame) with random valid gaps and downstream stalls; checks that exactly
// samples 16..79 of every symbol come out, in order.
module tb_prefix_removal;
  import hl2_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, frame_start = 0, in_valid = 0, in_ready, out_valid, out_ready = 0, dropping;
  cplx_t in_data = '0, out_data;

  prefix_removal dut (.clk, .rst_n, .frame_start, .in_valid, .in_ready, .in_data,
                      .out_valid, .out_ready, .out_data, .dropping);
  always #5 clk = ~clk;

  int exp_q [$];
  int drops = 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    out_ready <= 1'($urandom_range(0, 3) != 0);
    if (in_valid && in_ready && dropping) drops++;
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || int'(out_data.re) != exp_q[0]) begin
        failures++;
        $display("got sample %0d", out_data.re);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  task automatic send_frame(input int nsym, input int tag);
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int s = 0; s < nsym; s++) begin
      for (int n = 0; n < 80; n++) begin
        in_data.re = 16'(tag + s * 100 + n);
        in_data.im = 16'(n);
        if (n >= 16) exp_q.push_back(tag + s * 100 + n);
        in_valid = 1;
        do @(posedge clk); while (!in_ready);
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    send_frame(4, 0);
    send_frame(1, 5000);
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || drops != 5 * 16) begin
      failures++;
      $display("left %0d expected samples, %0d drops", exp_q.size(), drops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
