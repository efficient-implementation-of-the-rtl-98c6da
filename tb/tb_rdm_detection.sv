// Testbench of the detection stage at its default size: a model insertion
// stage with the same key watermarks random host samples with random bits;
// the detector receives them unchanged for 20 frames and must decode every
// bit, with the latency of 58 clocks. Each branch distance is also checked
// against the model of both re-quantisations (|z - z'_0|, |z - z'_1|).
module tb_rdm_detection;
  import tb_rdm_model_pkg::*;

  localparam int FL = 128, NF = 16, LAT = 58, KEY = 8'h2D;

  logic clk = 0, rst_n = 0, in_valid = 0, ready, out_valid, b_hat;
  logic [7:0] key = 8'(KEY);
  logic signed [24:0] z = 0;
  logic [24:0] dist0, dist1;
  int checks = 0, failures = 0, n_one = 0, n_zero = 0;

  rdm_detection dut (.*);

  always #5 clk = ~clk;

  int     exp_b[$], exp_t[$];
  longint exp_d0[$], exp_d1[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_b.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      int eb, t; longint e0, e1;
      eb = exp_b.pop_front(); t = exp_t.pop_front();
      e0 = exp_d0.pop_front(); e1 = exp_d1.pop_front();
      if (int'(b_hat) != eb || cyc - t != LAT || longint'(dist0) != e0 || longint'(dist1) != e1) begin
        failures++;
        if (failures < 10)
          $display("FAIL: b_hat=%0d exp=%0d d0=%0d/%0d d1=%0d/%0d latency=%0d",
                   b_hat, eb, dist0, e0, dist1, e1, cyc - t);
      end
      if (b_hat) n_one++; else n_zero++;
    end
  end

  initial begin
    ins_model ins, d0, d1;
    int n;
    longint xx, yy, q0, q1;
    bit bb;
    ins = new(FL, NF, KEY, 0);
    d0  = new(FL, NF, KEY, 1);
    d1  = new(FL, NF, KEY, 1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!ready) @(negedge clk);
    n = 0;
    while (n < 20 * FL) begin
      in_valid = ($urandom_range(0, 5) != 0);
      if (in_valid) begin
        xx = longint'($urandom_range(0, 102400)) - 51200;
        bb = 1'($urandom);
        yy = ins.step(xx, bb);
        q0 = d0.step(yy, 1'b0);
        q1 = d1.step(yy, 1'b1);
        z = 25'(yy);
        exp_b.push_back(int'(bb));
        exp_d0.push_back(absl(yy - q0));
        exp_d1.push_back(absl(yy - q1));
        exp_t.push_back(cyc);
        n++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (exp_b.size() != 0 || n_one == 0 || n_zero == 0) begin
      failures++; $display("FAIL: outputs missing or one value never decoded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
