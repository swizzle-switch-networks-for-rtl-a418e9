// Self-checking testbench of ssn_pipe: random valid/payload, q must equal
// the previous cycle's d when valid, hold otherwise, and reset clears valid.
module tb_ssn_pipe;

  localparam int WD = 12;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          d_valid, q_valid;
  logic [WD-1:0] d, q, exp_q;
  logic          exp_v;

  ssn_pipe #(.WIDTH(WD)) dut (.clk, .rst_n, .d_valid, .d, .q_valid, .q);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_valid = 1'b1; d = '1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q_valid !== 1'b0 || q !== '0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1'b1;
    exp_v = 1'b0; exp_q = '0;
    for (int i = 0; i < 1000; i++) begin
      d_valid = 1'($urandom);
      d = WD'($urandom);
      @(negedge clk);
      if (d_valid) exp_q = d;
      exp_v = d_valid;
      checks++;
      if (q_valid !== exp_v || q !== exp_q) begin
        failures++;
        $display("FAIL: cycle %0d q=%h exp %h", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
