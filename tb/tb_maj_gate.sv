// tb_maj_gate: exhaustive check of the 9-input majority gate and a random
// check of a 25-input one against a count of ones, plus a 9-input
// threshold gate with threshold 3.
module tb_maj_gate;
  int checks = 0, failures = 0;

  logic [8:0]  x9;
  logic        u9;
  logic [24:0] x25;
  logic        u25;
  logic        ut3;

  maj_gate #(.W(9))  dut9  (.x(x9),  .u(u9));
  maj_gate #(.W(25)) dut25 (.x(x25), .u(u25));
  maj_gate #(.W(9), .THRESHOLD(3)) dut_t3 (.x(x9), .u(ut3));

  function automatic logic ref_maj(input logic [31:0] v, input int w);
    int n = 0;
    for (int i = 0; i < w; i++) n += v[i];
    return n > w / 2;
  endfunction

  initial begin
    for (int p = 0; p < 512; p++) begin
      x9 = p[8:0];
      #1;
      checks++;
      if (u9 !== ref_maj(32'(p), 9)) begin
        failures++;
        $display("FAIL maj9 x=%b u=%b", x9, u9);
      end
      checks++;
      if (ut3 !== ($countones(x9) >= 3)) begin
        failures++;
        $display("FAIL threshold-3 x=%b u=%b", x9, ut3);
      end
    end
    for (int p = 0; p < 4000; p++) begin
      // bias towards counts near the threshold
      x25 = 25'($urandom);
      if (p % 2 == 0) begin
        x25 = '0;
        for (int i = 0; i < 12 + (p % 4) / 2; i++) x25[$urandom_range(24)] = 1'b1;
      end
      #1;
      checks++;
      if (u25 !== ref_maj({7'd0, x25}, 25)) begin
        failures++;
        $display("FAIL maj25 x=%b u=%b", x25, u25);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
