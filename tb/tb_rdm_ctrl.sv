// Testbench of the control unit with 8 positions x 4 frames: after reset it
// must sweep init addresses 0..31 with LFSR loading, then go ready, and its
// position / frame-slot counters must follow a model under random in_valid.
module tb_rdm_ctrl;
  localparam int FL = 8, NF = 4;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic ready, accept, init_we, lfsr_load;
  logic [4:0] init_addr;
  logic [2:0] pos;
  logic [1:0] slot;
  int checks = 0, failures = 0;

  rdm_ctrl #(.FRAME_LEN(FL), .NUM_FRAMES(NF)) dut (.*);

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
    int mp, ms, n_wrap;
    rst_n = 0;
    in_valid = 1;   // requests during init must not be accepted
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < FL*NF; a++) begin
      check(init_we && lfsr_load && !ready && !accept && init_addr == 5'(a),
            $sformatf("init cycle %0d addr %0d", a, init_addr));
      @(negedge clk);
    end
    check(ready && !init_we && !lfsr_load, "ready after init");
    mp = 0; ms = 0; n_wrap = 0;
    for (int i = 0; i < 500; i++) begin
      in_valid = 1'($urandom);
      #1;
      check(accept == in_valid, "accept");
      check(pos == 3'(mp) && slot == 2'(ms), $sformatf("pos %0d/%0d slot %0d/%0d", pos, mp, slot, ms));
      @(negedge clk);
      if (in_valid) begin
        mp++;
        if (mp == FL) begin mp = 0; ms = (ms + 1) % NF; if (ms == 0) n_wrap++; end
      end
    end
    check(n_wrap > 0, "slot counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
