// Testbench of the v_k generation stage: random message bits, random steps;
// v must be the LFSR value for b = 0 and phi of it for b = 1.
module tb_rdm_vgen;
  import tb_rdm_model_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0, b = 0;
  logic [7:0] key = 8'hC3;
  logic signed [7:0] v;
  int checks = 0, failures = 0;
  int n_b0 = 0, n_b1 = 0;

  rdm_vgen dut (.clk, .rst_n, .load, .key, .step, .b, .v);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    s = 8'hC3;
    for (int i = 0; i < 2000; i++) begin
      b = 1'($urandom);
      step = 1'($urandom);
      #1;
      exp = b ? phi(as_signed8(s), 64) : as_signed8(s);
      checks++;
      if (int'(v) != exp) begin
        failures++;
        $display("FAIL: i=%0d b=%0d v=%0d exp=%0d", i, b, v, exp);
      end
      if (b) n_b1++; else n_b0++;
      @(negedge clk);
      if (step) s = lfsr_next(s);
    end
    checks++;
    if (n_b0 == 0 || n_b1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
