// tb_median_filter_2d: an 8-bit image filter with 16-pixel lines on noisy
// images. Window shape and shaping mode change at random from pixel to
// pixel; every output is compared, exactly N cycles after its newest pixel,
// with the median of only the pixels the shape uses (no forcing), taken
// from the four shape drawings; some windows are given through arbitrary
// custom M_1/S_1 vectors, whose reference is the median of the nine pixels
// with the excluded ones replaced by 0 or 2^N-1. Then the scan path through the C bits is
// exercised: captured C bits are unloaded, and majority gates are driven
// from loaded patterns.
module tb_median_filter_2d;
  import bsmf_pkg::*;
  localparam int N = 8, L = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] pix_in, pix_out;
  shape_e shape;
  logic by_ms;
  logic custom;
  logic [8:0] m1, s1;
  logic [8:0] hm1 [$], hs1 [$];
  int hcu [$];
  logic test_mode = 0, scan_en = 0, scan_in = 0, scan_out;
  int n_scan_cap = 0, n_scan_drv = 0;

  median_filter_2d #(.N(N), .LINE_WIDTH(L)) dut (.*);

  always #5 clk = ~clk;

  string pic [4] = '{"*********", "1*1***0*0", "*1*1*0*0*", "1111*0000"};
  int hp [$], hs [$];

  function automatic int ref_med(input int p);
    int t[$];
    if (hcu[p]) begin
      for (int i = 0; i < 9; i++)
        t.push_back(hm1[p][i] ? hp[p - (2 - i / 3) * L - (2 - i % 3)] : (hs1[p][i] ? (1 << N) - 1 : 0));
      t.sort();
      return t[4];
    end
    for (int i = 0; i < 9; i++)
      if (pic[hs[p]][i] == "*") t.push_back(hp[p - (2 - i / 3) * L - (2 - i % 3)]);
    t.sort();
    return t[t.size() / 2];
  endfunction


  // Scan path, capture: after a flat image of value v, every slice's C bits
  // equal that slice's bit of v; unload them (slice N first, bit 8 first).
  task automatic scan_capture(input logic [N-1:0] v);
    test_mode = 0; scan_en = 0; scan_in = 0; custom = 0;
    pix_in = v; shape = SHAPE_SQUARE; by_ms = 0;
    repeat (2 * L + N + 6) @(posedge clk);
    #1 scan_en = 1;
    for (int k = N; k >= 1; k--)
      for (int i = 8; i >= 0; i--) begin
        checks++;
        if (scan_out !== v[N-k]) begin
          failures++; $display("FAIL scan capture slice %0d bit %0d", k, i);
        end
        @(posedge clk);
        #1;
      end
    scan_en = 0;
    n_scan_cap++;
  endtask

  // Scan path, control: load a pattern into every slice's register, apply
  // it in test mode for one cycle, and see each slice's majority on its
  // output bit after that slice's deskew delay.
  task automatic scan_drive();
    logic [8:0] pat [N+1];
    logic       exp_u [N+1];
    int         cnt;
    for (int k = 1; k <= N; k++) begin
      pat[k] = 9'($urandom);
      cnt = 0;
      for (int i = 0; i < 9; i++) cnt += pat[k][i];
      exp_u[k] = (cnt >= 5);
    end
    test_mode = 1; scan_en = 1;
    for (int k = N; k >= 1; k--)
      for (int i = 8; i >= 0; i--) begin
        scan_in = pat[k][i];
        @(posedge clk);
        #1;
      end
    scan_en = 0;  // the gates now see the patterns for one cycle
    for (int e = 1; e <= N; e++) begin
      @(posedge clk);
      #1;
      // slice k's bit reaches the output e = N-k+1 edges after the apply cycle
      checks++;
      if (pix_out[e-1] !== exp_u[N-e+1]) begin
        failures++; $display("FAIL scan drive slice %0d", N - e + 1);
      end
    end
    test_mode = 0;
    n_scan_drv++;
  endtask

  initial begin
    int p, e;
    pix_in = 0; shape = SHAPE_SQUARE; by_ms = 0; custom = 0; m1 = '1; s1 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < L * 60; t++) begin
      case ($urandom_range(9))
        0:       pix_in = 8'hFF;
        1:       pix_in = 8'h00;
        default: pix_in = 8'($urandom_range(40, 200));
      endcase
      if (t % 7 == 0) begin
        shape = shape_e'($urandom_range(3));
        by_ms = 1'($urandom);
        custom = ($urandom_range(3) == 0);
      end
      m1 = 9'($urandom);
      s1 = 9'($urandom);
      @(posedge clk);
      hp.push_back(int'(pix_in));
      hs.push_back(int'(shape));
      hcu.push_back(int'(custom));
      hm1.push_back(m1);
      hs1.push_back(s1);
      #1;
      p = t - N;
      if (p >= 2 * L + 2) begin
        e = ref_med(p);
        checks++;
        if (int'(pix_out) != e) begin
          failures++;
          $display("FAIL p=%0d custom=%0d shape=%0d got %0d exp %0d", p, hcu[p], hs[p], pix_out, e);
        end
      end
    end
    scan_capture(8'hA5);
    scan_capture(8'h3C);
    for (int r = 0; r < 30; r++) scan_drive();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (L * 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
