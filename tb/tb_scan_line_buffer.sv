// tb_scan_line_buffer: line buffers of depth 13 and 1 must return each bit
// exactly DEPTH cycles after it was written.
module tb_scan_line_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic d, q13, q1;
  logic hist [$];

  scan_line_buffer #(.DEPTH(13)) dut13 (.clk, .rst_n, .d, .q(q13));
  scan_line_buffer #(.DEPTH(1))  dut1  (.clk, .rst_n, .d, .q(q1));

  always #5 clk = ~clk;

  initial begin
    d = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      d = 1'($urandom);
      hist.push_back(d);
      #1;
      if (hist.size() > 13) begin
        checks++;
        if (q13 !== hist[hist.size()-1-13]) begin
          failures++; $display("FAIL depth 13 t=%0d", t);
        end
      end
      if (hist.size() > 1) begin
        checks++;
        if (q1 !== hist[hist.size()-2]) begin
          failures++; $display("FAIL depth 1 t=%0d", t);
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
