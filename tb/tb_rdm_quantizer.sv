// Testbench of the quantifier: random samples, references and dithers with
// random gaps; each output must equal r * (round((x/r + v)/Delta)*Delta - v)
// computed with integers, carry its tag, and appear DIV_LATENCY + 2 = 56
// clocks after its input. Large references drive the product into
// saturation now and then.
module tb_rdm_quantizer;
  import tb_rdm_model_pkg::*;

  localparam int LAT = 56;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [24:0] x = 0, y;
  logic [24:0] r = 256;
  logic signed [7:0] v = 0;
  logic [7:0] tag = 0, tag_out;
  int checks = 0, failures = 0, n_sat = 0;

  rdm_quantizer dut (.*);

  always #5 clk = ~clk;

  longint exp_y[$];
  int     exp_tag[$], exp_t[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_y.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      longint e; int t, g;
      e = exp_y.pop_front(); t = exp_t.pop_front(); g = exp_tag.pop_front();
      if (longint'(y) != e || int'(tag_out) != g || cyc - t != LAT) begin
        failures++;
        $display("FAIL: y=%0d exp=%0d tag=%0d/%0d latency=%0d", y, e, tag_out, g, cyc - t);
      end
    end
  end

  initial begin
    longint xx, rr, e;
    int vv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      xx = longint'($urandom_range(0, 1 << 20)) - (1 << 19);
      if (i % 5 == 0) xx = longint'($urandom_range(0, (1 << 25) - 1)) - (1 << 24);
      case ($urandom_range(0, 3))
        0: rr = $urandom_range(1, 1023);
        1: rr = $urandom_range(1024, 1 << 16);
        2: rr = $urandom_range(1 << 20, (1 << 25) - 1);
        default: rr = 256;
      endcase
      vv = int'($urandom_range(0, 255)) - 128;
      x = 25'(xx); r = 25'(rr); v = 8'(vv); tag = 8'($urandom);
      if (in_valid) begin
        e = quant(xx, rr, vv, 64);
        if (e == YMAX || e == YMIN) n_sat++;
        exp_y.push_back(e); exp_tag.push_back(int'(tag)); exp_t.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_y.size() != 0) begin failures++; $display("FAIL: results missing"); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
