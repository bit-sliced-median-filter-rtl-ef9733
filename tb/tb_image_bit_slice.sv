// tb_image_bit_slice: the MSB slice and a middle slice of a 3-bit image
// filter with 6-pixel lines. The tb keeps the input bit stream and drives
// random mask/set vectors into the middle slice; it checks the registered
// M/S outputs one cycle after each window and the median bit after the
// slice's deskew delay (custom M_1/S_1 vectors included), against the algorithm's equations applied to the
// window the slice should see after its skew delay.
module tb_image_bit_slice;
  import bsmf_pkg::*;
  localparam int N = 3, L = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic        b_in;
  shape_ctrl_t ctrl_in;
  logic [8:0]  m_in, s_in, m1, s1, m2, s2, m1_in, s1_in;
  logic        u1, u2;
  logic        test_mode = 0, scan_en = 0, so1, so2;


  image_bit_slice #(.N(N), .STAGE(1), .LINE_WIDTH(L)) dut1 (
    .clk, .rst_n, .b_in, .ctrl_in, .m_in(m1_in), .s_in(s1_in),
    .m_out(m1), .s_out(s1), .u_out(u1),
    .test_mode, .scan_en, .scan_in(1'b0), .scan_out(so1));
  image_bit_slice #(.N(N), .STAGE(2), .LINE_WIDTH(L)) dut2 (
    .clk, .rst_n, .b_in, .ctrl_in, .m_in, .s_in,
    .m_out(m2), .s_out(s2), .u_out(u2),
    .test_mode, .scan_en, .scan_in(so1), .scan_out(so2));

  always #5 clk = ~clk;

  string pic [4] = '{"*********", "1*1***0*0", "*1*1*0*0*", "1111*0000"};
  logic hb [$];
  shape_ctrl_t hc [$];
  logic [8:0] hm1 [$], hs1 [$];
  logic [8:0] em1 [$], es1 [$], em2 [$], es2 [$], ms1 [$], ms2 [$];
  logic eu1 [$], eu2 [$];

  // expected outputs of one slice for the window whose newest sample is q
  task automatic model(input int q, input logic [8:0] mk_in, input logic [8:0] sk_in,
                       input bit first, output logic u, output logic [8:0] mn,
                       output logic [8:0] sn, output logic [8:0] mused);
    logic [8:0] w, mk, sk, c, msk, stv;
    int cnt = 0;
    for (int i = 0; i < 9; i++) begin
      w[i] = hb[q - (2 - i / 3) * L - (2 - i % 3)];
      msk[i] = (pic[hc[q].shape][i] == "*");
      stv[i] = (pic[hc[q].shape][i] == "1");
    end
    if (!hc[q].by_ms && !hc[q].custom) w = (w & msk) | (stv & ~msk);
    if (first && hc[q].custom) begin
      mk = hm1[q];
      sk = hs1[q];
    end else begin
      mk = first ? (hc[q].by_ms ? msk : 9'h1FF) : mk_in;
      sk = first ? stv : sk_in;
    end
    for (int i = 0; i < 9; i++) begin
      c[i] = mk[i] ? w[i] : sk[i];
      cnt += c[i];
    end
    u = cnt > 4;
    for (int i = 0; i < 9; i++) begin
      mn[i] = mk[i] & (w[i] == u);
      sn[i] = (~mk[i] & sk[i]) | (mk[i] & ~u);
    end
    mused = mn;
  endtask

  function automatic void cmp_ms(input logic [8:0] got_m, input logic [8:0] got_s,
                                 input logic [8:0] exp_m, input logic [8:0] exp_s,
                                 input string tag);
    checks++;
    if (got_m !== exp_m) begin failures++; $display("FAIL %s M", tag); end
    // S only matters where the element is masked out
    checks++;
    if ((got_s & ~exp_m) !== (exp_s & ~exp_m)) begin failures++; $display("FAIL %s S", tag); end
  endfunction

  initial begin
    logic u; logic [8:0] mn, sn, mu;
    int q1, q2;
    b_in = 0; ctrl_in = '0; m1_in = '1; s1_in = '0; m_in = '1; s_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      b_in = 1'($urandom);
      if (t % 5 == 0) ctrl_in = shape_ctrl_t'($urandom_range(15));
      m1_in = 9'($urandom);
      s1_in = 9'($urandom);
      m_in = 9'($urandom);
      s_in = 9'($urandom);
      #1;
      // windows being worked on now: newest samples t-1 and t-2
      q1 = t - 1;
      q2 = t - 2;
      if (q2 - 2 * L - 2 >= 0) begin
        model(q1, '0, '0, 1'b1, u, mn, sn, mu);
        eu1.push_back(u); em1.push_back(mn); es1.push_back(sn);
        model(q2, m_in, s_in, 1'b0, u, mn, sn, mu);
        eu2.push_back(u); em2.push_back(mn); es2.push_back(sn);
      end
      @(posedge clk);
      hb.push_back(b_in);
      hc.push_back(ctrl_in);
      hm1.push_back(m1_in);
      hs1.push_back(s1_in);
      #1;
      if (em1.size() > 0) begin
        cmp_ms(m1, s1, em1[$], es1[$], "slice1");
        cmp_ms(m2, s2, em2[$], es2[$], "slice2");
      end
      // deskew: slice 1 holds u for N-1 = 2 edges, slice 2 for N-2 = 1 edge
      if (eu1.size() >= 2) begin
        checks++;
        if (u1 !== eu1[eu1.size()-2]) begin failures++; $display("FAIL u1 t=%0d", t); end
      end
      if (eu2.size() >= 1) begin
        checks++;
        if (u2 !== eu2[eu2.size()-1]) begin failures++; $display("FAIL u2 t=%0d", t); end
      end
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
