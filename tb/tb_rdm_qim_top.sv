// End-to-end testbench of the RDM-QIM core at its default size (128
// positions, 16 frames, 54-cycle divider), insertion output wired through a
// channel model into the detection input, with the same key on both sides.
//
// Three runs, each from reset: no attack, a gain of 2 and a gain of 1/2 on the
// channel. Every watermarked sample is compared with the integer model and
// must leave 57 clocks after it entered; every decoded bit must leave 58
// clocks after its sample reached the detector. Without attack every bit must
// decode. Under a gain attack the detector's reference needs 16 frames of
// attacked samples to settle; after that at most 0.5 % errors are allowed
// (the design's claim is invariance to gain). The first half of each run is
// streamed at one sample per clock, the second with random gaps.
// Counts of each mechanism are printed, and one that never happened is a
// failure.
module tb_rdm_qim_top;
  import tb_rdm_model_pkg::*;

  localparam int FL = 128, NF = 16, FRAMES = 40, KEY = 8'hA7;
  localparam int LAT_INS = 57, LAT_DET = 58;

  logic clk = 0, rst_n = 0;
  logic [7:0] ins_key = 8'(KEY), det_key = 8'(KEY);
  logic ins_ready, ins_valid = 0, ins_b = 0, ins_out_valid;
  logic signed [24:0] ins_x = 0, ins_y;
  logic det_ready, det_valid, det_out_valid, det_b_hat;
  logic signed [24:0] det_z;
  logic [24:0] det_dist0, det_dist1;
  int checks = 0, failures = 0;

  rdm_qim_top dut (.*);

  always #5 clk = ~clk;

  // channel: 0 none, 1 gain 2, 2 gain 1/2
  int attack = 0;
  always_comb begin
    det_valid = ins_out_valid;
    case (attack)
      1:       det_z = ins_y <<< 1;
      2:       det_z = ins_y >>> 1;
      default: det_z = ins_y;
    endcase
  end

  longint exp_y[$];
  int     exp_t[$], exp_b[$], exp_frame[$], det_t[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_init = 0, n_b0 = 0, n_b1 = 0, n_phi_neg = 0, n_phi_pos = 0;
  int n_replace = 0, n_dec0 = 0, n_dec1 = 0, n_gap = 0, n_gain_ok = 0;
  int n_err_settled = 0, n_settled = 0, n_b2b = 0;

  task automatic fail(string what);
    failures++;
    if (failures < 12) $display("FAIL: %s", what);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // insertion monitor
  always @(posedge clk) if (rst_n && ins_out_valid) begin
    checks++;
    if (exp_y.size() == 0) fail("unexpected insertion output");
    else begin
      longint e; int t;
      e = exp_y.pop_front(); t = exp_t.pop_front();
      if (longint'(ins_y) != e || cyc - t != LAT_INS)
        fail($sformatf("y=%0d exp=%0d latency=%0d", ins_y, e, cyc - t));
      det_t.push_back(cyc);
    end
  end

  // detection monitor
  always @(posedge clk) if (rst_n && det_out_valid) begin
    checks++;
    if (exp_b.size() == 0 || det_t.size() == 0) fail("unexpected detection output");
    else begin
      int eb, t, f;
      eb = exp_b.pop_front(); f = exp_frame.pop_front(); t = det_t.pop_front();
      if (cyc - t != LAT_DET) fail($sformatf("detection latency %0d", cyc - t));
      if (det_b_hat) n_dec1++; else n_dec0++;
      if (attack == 0) begin
        if (int'(det_b_hat) != eb) fail($sformatf("bit error without attack, frame %0d", f));
      end else if (f >= NF + 1) begin
        n_settled++;
        if (int'(det_b_hat) != eb) n_err_settled++;
        else n_gain_ok++;
      end
    end
  end

  task automatic run(int atk);
    ins_model m;
    int n, t0, frame;
    longint xx;
    bit bb;
    attack = atk;
    ins_valid = 0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    m = new(FL, NF, KEY, 0);
    t0 = cyc;
    while (!ins_ready || !det_ready) @(negedge clk);
    checks++;
    if (cyc - t0 != FL * NF) fail($sformatf("init took %0d clocks", cyc - t0));
    n_init++;
    n = 0;
    while (n < FRAMES * FL) begin
      ins_valid = (n < FRAMES * FL / 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (ins_valid) begin
        xx = longint'($urandom_range(0, 102400)) - 51200;   // +-200.0
        bb = 1'($urandom);
        ins_x = 25'(xx);
        ins_b = bb;
        frame = n / FL;
        exp_y.push_back(m.step(xx, bb));
        exp_t.push_back(cyc);
        exp_b.push_back(int'(bb));
        exp_frame.push_back(frame);
        if (bb) begin
          n_b1++;
          if (m.last_v0 < 0) n_phi_neg++; else n_phi_pos++;
        end else n_b0++;
        if (frame >= NF) n_replace++;
        if (n < FRAMES * FL / 2) n_b2b++;
        n++;
      end else n_gap++;
      @(negedge clk);
    end
    ins_valid = 0;
    repeat (LAT_INS + LAT_DET + 10) @(negedge clk);
    checks++;
    if (exp_y.size() != 0 || exp_b.size() != 0) fail("outputs missing");
    exp_y.delete(); exp_t.delete(); exp_b.delete(); exp_frame.delete(); det_t.delete();
  endtask

  initial begin
    run(0);
    run(1);
    run(2);
    checks++;
    if (n_err_settled * 200 > n_settled)
      fail($sformatf("gain attack: %0d errors in %0d settled bits", n_err_settled, n_settled));
    $display("mechanisms: init=%0d b0=%0d b1=%0d phi(v<0)=%0d phi(v>=0)=%0d history_replace=%0d",
             n_init, n_b0, n_b1, n_phi_neg, n_phi_pos, n_replace);
    $display("mechanisms: decoded0=%0d decoded1=%0d gaps=%0d back_to_back=%0d gain_decoded=%0d gain_errors=%0d/%0d",
             n_dec0, n_dec1, n_gap, n_b2b, n_gain_ok, n_err_settled, n_settled);
    checks++; if (n_init != 3)     fail("init count");
    checks++; if (n_b0 == 0)       fail("b=0 never used");
    checks++; if (n_b1 == 0)       fail("b=1 never used");
    checks++; if (n_phi_neg == 0)  fail("phi branch v<0 never used");
    checks++; if (n_phi_pos == 0)  fail("phi branch v>=0 never used");
    checks++; if (n_replace == 0)  fail("history replacement never happened");
    checks++; if (n_dec0 == 0)     fail("0 never decoded");
    checks++; if (n_dec1 == 0)     fail("1 never decoded");
    checks++; if (n_gap == 0)      fail("input gap never happened");
    checks++; if (n_b2b == 0)      fail("back-to-back stream never happened");
    checks++; if (n_gain_ok == 0)  fail("gain attack never decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
