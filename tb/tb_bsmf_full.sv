// tb_bsmf_full: one complete 512 x 512 frame through the top level at its
// default sizes (8-bit pixels, 512-pixel lines, 9-tap 4-bit signal filter).
// The frame is a synthetic gradient with about 5 % salt-and-pepper noise;
// the window shape steps through square, cross, X and dot every 128 lines
// and the shaping mode alternates line by line. Every image output with a
// complete window, and every signal output, is compared with a sorted
// reference median N cycles after its newest input.
module tb_bsmf_full;
  import bsmf_pkg::*;
  localparam int N2 = 8, L = 512, ROWS = 512, N1 = 4, W1 = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic [N2-1:0] img_pix_in, img_pix_out;
  shape_e        img_shape;
  logic          img_by_ms;
  logic          img_custom = 0;
  logic [8:0]    img_m1 = '1, img_s1 = '0;
  logic [N1-1:0] sig_x_in, sig_y_out;
  logic          img_test_mode = 0, img_scan_en = 0, img_scan_in = 0, img_scan_out;

  bsmf_top dut (.*);

  always #5 clk = ~clk;

  string pic [4] = '{"*********", "1*1***0*0", "*1*1*0*0*", "1111*0000"};
  int hp [], hs [], hx [];

  function automatic int ref_med2d(input int p);
    int t[$];
    for (int i = 0; i < 9; i++)
      if (pic[hs[p]][i] == "*") t.push_back(hp[p - (2 - i / 3) * L - (2 - i % 3)]);
    t.sort();
    return t[t.size() / 2];
  endfunction

  function automatic int ref_med1d(input int last);
    int t[$];
    for (int i = last - W1 + 1; i <= last; i++) t.push_back(hx[i]);
    t.sort();
    return t[W1 / 2];
  endfunction

  initial begin
    int p, e, x, y, fails_shown = 0;
    hp = new[L * ROWS];
    hs = new[L * ROWS];
    hx = new[L * ROWS];
    img_pix_in = 0; img_shape = SHAPE_SQUARE; img_by_ms = 0; sig_x_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < L * ROWS + N2; t++) begin
      if (t < L * ROWS) begin
        x = t % L;
        y = t / L;
        img_pix_in = ($urandom_range(19) == 0) ? (($urandom_range(1)) ? 8'hFF : 8'h00)
                                               : 8'((x + y) / 4);
        img_shape  = shape_e'(y / 128);
        img_by_ms  = 1'(y % 2);
        sig_x_in   = 4'($urandom);
      end
      @(posedge clk);
      if (t < L * ROWS) begin
        hp[t] = int'(img_pix_in);
        hs[t] = int'(img_shape);
        hx[t] = int'(sig_x_in);
      end
      #1;
      p = t - N2;
      if (p >= 2 * L + 2) begin
        e = ref_med2d(p);
        checks++;
        if (int'(img_pix_out) != e) begin
          failures++;
          if (fails_shown++ < 10) $display("FAIL img p=%0d got %0d exp %0d", p, img_pix_out, e);
        end
      end
      p = t - N1;
      if (p >= W1 - 1 && p < L * ROWS) begin
        e = ref_med1d(p);
        checks++;
        if (int'(sig_y_out) != e) begin
          failures++;
          if (fails_shown++ < 10) $display("FAIL sig p=%0d got %0d exp %0d", p, sig_y_out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (L * ROWS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
