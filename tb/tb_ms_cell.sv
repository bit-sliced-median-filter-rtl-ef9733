// tb_ms_cell: the 16-pattern exhaustive test of the mask-and-set module,
// compared with the algorithm's step equations (iii), (v) and (vi).
module tb_ms_cell;
  int checks = 0, failures = 0;
  logic b, m, s, u, c, m_next, s_next;

  ms_cell dut (.*);

  initial begin
    for (int p = 0; p < 16; p++) begin
      {b, m, s, u} = p[3:0];
      #1;
      checks += 2;
      if (c !== ((m & b) | (~m & s))) begin
        failures++; $display("FAIL c p=%0d", p);
      end
      if (m_next !== (m & ((u & b) | (~u & ~b)))) begin
        failures++; $display("FAIL m' p=%0d", p);
      end
      // the setting value only matters once the element is masked out
      if (!m_next) begin
        checks++;
        if (s_next !== ((~m & s) | (m & ~u))) begin
          failures++; $display("FAIL s' p=%0d", p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
