// Testbench of the pipelined divider: random signed 17Q8 dividends and
// positive divisors (small, large, and ones that make the quotient wrap),
// issued with random gaps; each result is checked against integer division
// and must appear exactly 54 clocks after its operands.
module tb_rdm_divider;
  import tb_rdm_model_pkg::*;

  localparam int LAT = 54;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [24:0] dividend = 0, quotient;
  logic [24:0] divisor = 1;
  logic out_valid;
  int checks = 0, failures = 0;

  rdm_divider dut (.clk, .rst_n, .in_valid, .dividend, .divisor, .out_valid, .quotient);

  always #5 clk = ~clk;

  longint exp_q[$];
  int     exp_t[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      longint e; int t;
      e = exp_q.pop_front(); t = exp_t.pop_front();
      if (longint'(quotient) != e || cyc - t != LAT) begin
        failures++;
        $display("FAIL: q=%0d exp=%0d latency=%0d", quotient, e, cyc - t);
      end
    end
  end

  initial begin
    longint x, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0: r = $urandom_range(1, 255);
        1: r = $urandom_range(256, 65535);
        2: r = $urandom_range(1, (1 << 25) - 1);
        default: r = 256;
      endcase
      x = longint'($urandom_range(0, (1 << 25) - 1)) - (1 << 24);
      if (i % 7 == 0) x = longint'($urandom_range(0, 20000)) - 10000;
      dividend = 25'(x);
      divisor  = 25'(r);
      if (in_valid) begin
        exp_q.push_back(div17q8(x, r));
        exp_t.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
