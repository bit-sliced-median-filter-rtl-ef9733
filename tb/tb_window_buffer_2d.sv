// tb_window_buffer_2d: with 7-pixel lines, every window bit must be the
// bit of pixel p - r*7 - c for the newest pixel p, position 3(2-r)+(2-c).
module tb_window_buffer_2d;
  localparam int L = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic d;
  logic [8:0] win;
  logic hist [$];

  window_buffer_2d #(.LINE_WIDTH(L)) dut (.clk, .rst_n, .d, .win);

  always #5 clk = ~clk;

  initial begin
    int p;
    d = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      d = 1'($urandom);
      @(posedge clk);
      hist.push_back(d);
      #1;
      p = hist.size() - 1;
      if (p >= 2 * L + 2) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            checks++;
            if (win[3*(2-r) + (2-c)] !== hist[p - r*L - c]) begin
              failures++;
              $display("FAIL t=%0d r=%0d c=%0d", t, r, c);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
