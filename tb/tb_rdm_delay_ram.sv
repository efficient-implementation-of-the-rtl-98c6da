// Testbench of the memory delay line: random words in, each must come out
// exactly DELAY (54) clocks later.
module tb_rdm_delay_ram;
  localparam int W = 20, D = 54;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] din = 0, dout;
  int checks = 0, failures = 0;

  rdm_delay_ram #(.WIDTH(W), .DELAY(D)) dut (.clk, .rst_n, .din, .dout);

  always #5 clk = ~clk;

  logic [W-1:0] hist[$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i >= D) begin
        checks++;
        if (dout != hist[i - D]) begin
          failures++;
          $display("FAIL: i=%0d dout=%0h exp=%0h", i, dout, hist[i - D]);
        end
      end
      din = W'($urandom);
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
