// tb_median_stage: one median selection stage, used bit-serially (its
// M_{k+1}, S_{k+1} fed back as M_k, S_k) to select medians. Checks the
// published 9-element, 4-bit example bit by bit, then random windows
// against a sorted reference, and every stage output against the
// algorithm's equations.
module tb_median_stage;
  localparam int W = 9;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic [W-1:0] b, m, s, m_next, s_next;
  logic         u;
  logic [W-1:0] c, x;

  assign x = c;  // no scan register: the gate sees the C bits

  median_stage #(.W(W)) dut (.*);

  function automatic int ref_median(input int v[W]);
    int t[W] = v;
    t.sort();
    return t[W/2];
  endfunction

  // runs the N (or nb) bit steps on one window, returns the median found
  task automatic run_window(input int v[W], input int nb, input int exp_bits[$]);
    int res = 0;
    int cnt;
    logic exp_u;
    m = '1;
    s = '0;
    for (int k = 1; k <= nb; k++) begin
      for (int i = 0; i < W; i++) b[i] = v[i][nb-k];
      #1;
      // equations (iii), (v), (vi)
      cnt = 0;
      for (int i = 0; i < W; i++) cnt += (m[i] & b[i]) | (~m[i] & s[i]);
      exp_u = (cnt > W / 2);
      checks++;
      if (u !== exp_u) begin failures++; $display("FAIL u k=%0d", k); end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (m_next[i] !== (m[i] & ~(exp_u ^ b[i]))) begin
          failures++; $display("FAIL m' k=%0d i=%0d", k, i);
        end
        if (!m_next[i]) begin
          checks++;
          if (s_next[i] !== ((~m[i] & s[i]) | (m[i] & ~exp_u))) begin
            failures++; $display("FAIL s' k=%0d i=%0d", k, i);
          end
        end
      end
      if (exp_bits.size() > 0) begin
        checks++;
        if (u !== 1'(exp_bits[k-1])) begin
          failures++; $display("FAIL example bit k=%0d", k);
        end
      end
      res = (res << 1) | int'(u);
      m = m_next;
      s = s_next;
    end
    checks++;
    if (res != ref_median(v)) begin
      failures++;
      $display("FAIL median got %0d exp %0d", res, ref_median(v));
    end
  endtask

  initial begin
    int v[W];
    int none[$];
    // worked example: a(1..9) = 6,11,13,8,5,3,7,14,2 -> median 7 = 0111
    v = '{6, 11, 13, 8, 5, 3, 7, 14, 2};
    run_window(v, 4, '{0, 1, 1, 1});
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < W; i++) begin
        v[i] = (t % 3 == 0) ? int'($urandom_range(3)) * 85 : int'($urandom_range(255));
      end
      run_window(v, N, none);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
