// Testbench of phi: all 256 dither values against v + 32 (v < 0) or
// v - 32 (v >= 0), i.e. Delta/2 with Delta = 0.25 in Q8.
module tb_rdm_phi;
  logic signed [7:0] v_in, v_out;
  int checks = 0, failures = 0;

  rdm_phi dut (.v_in, .v_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = -128; i < 128; i++) begin
      v_in = 8'(i);
      #1;
      exp = (i < 0) ? i + 32 : i - 32;
      checks++;
      if (int'(v_out) != exp) begin
        failures++;
        $display("FAIL: phi(%0d) = %0d, expected %0d", i, v_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
