// tb_bsmf_top: end-to-end run of both filters in the top level. The image
// filter (8-bit pixels, lines shortened to 12 pixels) gets a noisy image
// with salt-and-pepper impulses while the window shape and the shaping mode
// are switched, and some windows are given as custom M_1/S_1 vectors; the signal filter (9 taps, 4 bits) gets an impulse-noise
// sequence. Every output is compared with a sorted reference median at
// the expected latency. It also counts how often each mechanism occurred:
// each of the four window shapes, custom windows, both shaping modes (shapers / initial
// M_1,S_1 vectors), a shape switch, and impulses removed by each filter;
// the scan path (capture of the C bits and majority gates driven from
// loaded patterns); one that never occurred counts as a failure.
module tb_bsmf_top;
  import bsmf_pkg::*;
  localparam int N2 = 8, L = 12, N1 = 4, W1 = 9;
  localparam int N = N2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic [N2-1:0] img_pix_in, img_pix_out;
  shape_e        img_shape;
  logic          img_by_ms;
  logic          img_custom;
  logic [8:0]    img_m1, img_s1;
  logic [8:0]    hm1 [$], hs1 [$];
  int            hcu [$];
  int            n_custom = 0;
  logic [N1-1:0] sig_x_in, sig_y_out;
  logic          img_test_mode = 0, img_scan_en = 0, img_scan_in = 0, img_scan_out;
  int n_scan_cap = 0, n_scan_drv = 0;

  bsmf_top #(.LINE_WIDTH(L)) dut (.*);

  always #5 clk = ~clk;

  string pic [4] = '{"*********", "1*1***0*0", "*1*1*0*0*", "1111*0000"};
  int hp [$], hs [$], hm [$], hx [$];
  int n_shape [4] = '{0, 0, 0, 0};
  int n_mode [2] = '{0, 0};
  int n_switch = 0, n_imp2d = 0, n_imp1d = 0;

  function automatic int ref_med2d(input int p);
    int t[$];
    if (hcu[p]) begin
      for (int i = 0; i < 9; i++)
        t.push_back(hm1[p][i] ? hp[p - (2 - i / 3) * L - (2 - i % 3)] : (hs1[p][i] ? 255 : 0));
      t.sort();
      return t[4];
    end
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


  // Scan path, capture: after a flat image of value v, every slice's C bits
  // equal that slice's bit of v; unload them (slice N first, bit 8 first).
  task automatic scan_capture(input logic [N-1:0] v);
    img_test_mode = 0; img_scan_en = 0; img_scan_in = 0; img_custom = 0;
    img_pix_in = v; img_shape = SHAPE_SQUARE; img_by_ms = 0;
    repeat (2 * L + N + 6) @(posedge clk);
    #1 img_scan_en = 1;
    for (int k = N; k >= 1; k--)
      for (int i = 8; i >= 0; i--) begin
        checks++;
        if (img_scan_out !== v[N-k]) begin
          failures++; $display("FAIL scan capture slice %0d bit %0d", k, i);
        end
        @(posedge clk);
        #1;
      end
    img_scan_en = 0;
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
    img_test_mode = 1; img_scan_en = 1;
    for (int k = N; k >= 1; k--)
      for (int i = 8; i >= 0; i--) begin
        img_scan_in = pat[k][i];
        @(posedge clk);
        #1;
      end
    img_scan_en = 0;  // the gates now see the patterns for one cycle
    for (int e = 1; e <= N; e++) begin
      @(posedge clk);
      #1;
      // slice k's bit reaches the output e = N-k+1 edges after the apply cycle
      checks++;
      if (img_pix_out[e-1] !== exp_u[N-e+1]) begin
        failures++; $display("FAIL scan drive slice %0d", N - e + 1);
      end
    end
    img_test_mode = 0;
    n_scan_drv++;
  endtask

  initial begin
    int p, e, ctr, j;
    img_pix_in = 0; img_shape = SHAPE_SQUARE; img_by_ms = 0; sig_x_in = 0;
    img_custom = 0; img_m1 = '1; img_s1 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < L * 80; t++) begin
      // smooth ramp with sparse impulses
      img_pix_in = ($urandom_range(19) == 0) ? (($urandom_range(1)) ? 8'hFF : 8'h00)
                                             : 8'(60 + (t % L) * 8 + $urandom_range(6));
      sig_x_in   = ($urandom_range(7) == 0) ? 4'hF : 4'(5 + $urandom_range(2));
      if (t % L == 5 && $urandom_range(2) == 0) begin
        img_shape = shape_e'($urandom_range(3));
        img_by_ms = 1'($urandom);
        img_custom = ($urandom_range(3) == 0);
        // a custom window: five used positions, two forced high, two low
        img_m1 = 9'b0;
        while ($countones(img_m1) < 5) img_m1[$urandom_range(8)] = 1'b1;
        img_s1 = 9'b0;
        while ($countones(img_s1) < 2) begin
          j = $urandom_range(8);
          if (!img_m1[j]) img_s1[j] = 1'b1;
        end
      end
      @(posedge clk);
      hp.push_back(int'(img_pix_in));
      hs.push_back(int'(img_shape));
      hm.push_back(int'(img_by_ms));
      hcu.push_back(int'(img_custom));
      hm1.push_back(img_m1);
      hs1.push_back(img_s1);
      hx.push_back(int'(sig_x_in));
      #1;
      p = t - N2;
      if (p >= 2 * L + 2) begin
        e = ref_med2d(p);
        checks++;
        if (int'(img_pix_out) != e) begin
          failures++;
          $display("FAIL img p=%0d got %0d exp %0d", p, img_pix_out, e);
        end else begin
          if (hcu[p]) n_custom++;
          else begin
            n_shape[hs[p]]++;
            n_mode[hm[p]]++;
          end
          if (hs[p] != hs[p-1] || hm[p] != hm[p-1] || hcu[p] != hcu[p-1]) n_switch++;
          ctr = hp[p - L - 1];  // centre pixel of the window
          if ((ctr == 255 || ctr == 0) && int'(img_pix_out) != ctr) n_imp2d++;
        end
      end
      p = t - N1;
      if (p >= W1 - 1) begin
        e = ref_med1d(p);
        checks++;
        if (int'(sig_y_out) != e) begin
          failures++;
          $display("FAIL sig p=%0d got %0d exp %0d", p, sig_y_out, e);
        end else if (hx[p - W1 / 2] == 15 && int'(sig_y_out) != 15) n_imp1d++;
      end
    end
    scan_capture(8'h96);
    scan_drive();
    $display("scan capture runs=%0d scan drive runs=%0d", n_scan_cap, n_scan_drv);
    checks += 2;
    if (n_scan_cap == 0) begin failures++; $display("FAIL no scan capture"); end
    if (n_scan_drv == 0) begin failures++; $display("FAIL no scan drive"); end
    $display("shapes square=%0d cross=%0d X=%0d dot=%0d, shaper mode=%0d M1/S1 mode=%0d",
             n_shape[0], n_shape[1], n_shape[2], n_shape[3], n_mode[0], n_mode[1]);
    $display("custom windows=%0d", n_custom);
    $display("shape switches=%0d impulses removed image=%0d signal=%0d",
             n_switch, n_imp2d, n_imp1d);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_shape[i] == 0) begin failures++; $display("FAIL shape %0d never used", i); end
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end
    end
    checks += 4;
    if (n_custom == 0) begin failures++; $display("FAIL no custom window"); end
    if (n_switch == 0) begin failures++; $display("FAIL no shape switch"); end
    if (n_imp2d == 0)  begin failures++; $display("FAIL no image impulse removed"); end
    if (n_imp1d == 0)  begin failures++; $display("FAIL no signal impulse removed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (L * 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
