// tb_c_scan_reg: two chained 9-bit scan path registers. Checks that they
// are transparent outside test mode, capture the C bits, shift them out in
// order, and drive the majority-gate inputs with a shifted-in pattern.
module tb_c_scan_reg;
  localparam int W = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic test_mode, scan_en, scan_in, mid, scan_out;
  logic [W-1:0] ca, cb, xa, xb;

  c_scan_reg #(.W(W)) dut_a (.clk, .rst_n, .test_mode, .scan_en, .scan_in,
                             .c(ca), .x(xa), .scan_out(mid));
  c_scan_reg #(.W(W)) dut_b (.clk, .rst_n, .test_mode, .scan_en, .scan_in(mid),
                             .c(cb), .x(xb), .scan_out);

  always #5 clk = ~clk;

  initial begin
    logic [W-1:0] cap_a, cap_b, pat_a, pat_b;
    logic [2*W-1:0] stream;
    test_mode = 0; scan_en = 0; scan_in = 0; ca = '0; cb = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      // normal mode: transparent
      test_mode = 0; scan_en = 0;
      ca = W'($urandom); cb = W'($urandom);
      #1;
      checks += 2;
      if (xa !== ca || xb !== cb) begin failures++; $display("FAIL transparent"); end
      cap_a = ca; cap_b = cb;
      @(posedge clk);  // capture
      #1;
      ca = W'($urandom); cb = W'($urandom);  // must not disturb what was captured
      // unload 2W bits: b's bits W-1..0, then a's; load a new pattern meanwhile
      pat_a = W'($urandom); pat_b = W'($urandom);
      stream = {pat_b, pat_a};  // first bit in ends up in b[W-1]
      scan_en = 1; test_mode = 1;
      for (int i = 0; i < 2 * W; i++) begin
        scan_in = stream[2*W-1-i];
        #1;
        checks++;
        if (scan_out !== ((i < W) ? cap_b[W-1-i] : cap_a[2*W-1-i])) begin
          failures++; $display("FAIL unload round=%0d bit=%0d", round, i);
        end
        @(posedge clk);
        #1;
      end
      // test mode: the gate inputs are the loaded pattern
      checks += 2;
      if (xa !== pat_a) begin failures++; $display("FAIL pattern a"); end
      if (xb !== pat_b) begin failures++; $display("FAIL pattern b"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
