// Testbench of the dither LFSR: checks the sequence from a key against the
// polynomial, that the period is exactly 255, that a zero key is replaced by 1
// and that the register holds when not stepped.
module tb_rdm_lfsr;
  import tb_rdm_model_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [7:0] seed = 0;
  logic signed [7:0] value;
  int checks = 0, failures = 0;

  rdm_lfsr dut (.clk, .rst_n, .load, .seed, .step, .value);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model, first, period;
    bit seen[256];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed = 8'h5A; load = 1;
    @(negedge clk); load = 0;
    model = 8'h5A;
    check(value == 8'sh5A, "loaded seed");
    // hold without step
    @(negedge clk); check(value == 8'sh5A, "holds without step");
    step = 1;
    first = model; period = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      model = lfsr_next(model);
      check(int'($unsigned(value)) == model, $sformatf("step %0d value %0h exp %0h", i, value, model));
      if (period == 0 && model == first) period = i + 1;
    end
    check(period == 255, $sformatf("period %0d", period));
    // all 255 nonzero states visited
    model = 1;
    for (int i = 0; i < 255; i++) begin seen[model] = 1; model = lfsr_next(model); end
    for (int i = 1; i < 256; i++) check(seen[i], $sformatf("state %0d reachable", i));
    step = 0;
    seed = 0; load = 1;
    @(negedge clk); load = 0;
    check(value == 8'sh01, "zero key replaced by 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
