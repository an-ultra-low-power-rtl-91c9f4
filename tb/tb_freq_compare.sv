// tb_freq_compare: random and boundary counts against a reference '>'.
module tb_freq_compare;
  timeunit 1ps; timeprecision 1fs;
  localparam int W = 16;
  logic [W-1:0] a, b;
  logic y;
  int checks = 0, failures = 0;

  freq_compare #(.W(W)) dut (.count_a(a), .count_b(b), .a_faster(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      logic exp;
      a = W'($urandom());
      case (k % 4)
        0: b = a;
        1: b = a + 1'b1;
        2: b = a - 1'b1;
        default: b = W'($urandom());
      endcase
      #5;
      exp = (int'(a) > int'(b));
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL a=%0d b=%0d y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
