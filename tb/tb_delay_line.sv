// tb_delay_line: a 5-bit, 3-deep delay line and a zero-depth one against a
// record of the inputs; checks the reset value too.
module tb_delay_line;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] d, q3, q0;
  logic [4:0] hist [$];

  delay_line #(.WIDTH(5), .DEPTH(3)) dut3 (.clk, .rst_n, .d, .q(q3));
  delay_line #(.WIDTH(5), .DEPTH(0)) dut0 (.clk, .rst_n, .d, .q(q0));

  always #5 clk = ~clk;

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q3 !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      d = 5'($urandom);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("FAIL depth 0"); end
      @(posedge clk);
      hist.push_back(d);
      #1;
      if (hist.size() >= 3) begin
        checks++;
        if (q3 !== hist[hist.size()-3]) begin
          failures++; $display("FAIL t=%0d q3=%h", t, q3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
