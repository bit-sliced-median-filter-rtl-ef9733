// tb_median_filter_1d: the 9-tap, 4-bit filter (the worked example's size)
// and a 5-tap, 8-bit one on random and impulse-noise sequences. Each output
// must be the sorted-reference median of the last W samples exactly N
// cycles after the newest of them went in (one result per clock).
module tb_median_filter_1d;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic [3:0] xa, ya;  // N=4, W=9
  logic [7:0] xb, yb;  // N=8, W=5

  median_filter_1d                  dut_a (.clk, .rst_n, .x_in(xa), .y_out(ya));
  median_filter_1d #(.N(8), .W(5))  dut_b (.clk, .rst_n, .x_in(xb), .y_out(yb));

  always #5 clk = ~clk;

  int ha [$], hb [$];

  function automatic int med(input int h[$], input int last, input int w);
    int t[$];
    for (int i = last - w + 1; i <= last; i++) t.push_back(h[i]);
    t.sort();
    return t[w/2];
  endfunction

  initial begin
    int ex[9] = '{6, 11, 13, 8, 5, 3, 7, 14, 2};
    xa = 0; xb = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      // first the worked example's nine values, then noise
      if (t < 9)            xa = 4'(ex[t]);
      else if (t % 4 == 0)  xa = ($urandom_range(1)) ? 4'hF : 4'h0;
      else                  xa = 4'($urandom);
      xb = (t % 5 == 0) ? (($urandom_range(1)) ? 8'hFF : 8'h00) : 8'($urandom_range(90, 160));
      @(posedge clk);
      ha.push_back(int'(xa));
      hb.push_back(int'(xb));
      #1;
      if (t - 4 >= 8) begin
        checks++;
        if (int'(ya) != med(ha, t - 4, 9)) begin
          failures++; $display("FAIL a t=%0d got %0d exp %0d", t, ya, med(ha, t - 4, 9));
        end
      end
      if (t == 4 + 8) begin
        checks++;
        if (ya != 4'd7) begin failures++; $display("FAIL worked example %0d", ya); end
      end
      if (t - 8 >= 4) begin
        checks++;
        if (int'(yb) != med(hb, t - 8, 5)) begin
          failures++; $display("FAIL b t=%0d got %0d exp %0d", t, yb, med(hb, t - 8, 5));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
