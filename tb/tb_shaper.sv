// tb_shaper: every window pattern under every shape, against the four
// shape drawings written out cell by cell ('*' used, '1'/'0' forced).
module tb_shaper;
  import bsmf_pkg::*;
  int checks = 0, failures = 0;

  logic [8:0] win_in, win_out;
  shape_e     shape;
  logic       enable;

  shaper dut (.*);

  // positions 1..9, row by row from the top left
  string pic [4] = '{"*********", "1*1***0*0", "*1*1*0*0*", "1111*0000"};

  initial begin
    logic exp_bit;
    for (int sh = 0; sh < 4; sh++)
      for (int p = 0; p < 512; p++) begin
        win_in = p[8:0];
        shape  = shape_e'(sh);
        enable = 1'b1;
        #1;
        for (int i = 0; i < 9; i++) begin
          case (pic[sh][i])
            "1":     exp_bit = 1'b1;
            "0":     exp_bit = 1'b0;
            default: exp_bit = win_in[i];
          endcase
          checks++;
          if (win_out[i] !== exp_bit) begin
            failures++; $display("FAIL shape=%0d win=%b i=%0d", sh, win_in, i);
          end
        end
        enable = 1'b0;
        #1;
        checks++;
        if (win_out !== win_in) begin
          failures++; $display("FAIL bypass shape=%0d", sh);
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
