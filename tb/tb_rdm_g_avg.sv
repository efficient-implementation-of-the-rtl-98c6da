// Testbench of the g() reference memories with 8 positions x 16 frames:
// initialises every word to 1.0, then runs read / update traffic the way the
// insertion stage does (read at issue, update later with the values read),
// checking the returned mean and replaced value and the new mean against an
// integer model of mean = (16 mean + new - old) / 16. Includes updates that
// would make the mean negative, which must hold it at zero.
module tb_rdm_g_avg;
  import tb_rdm_model_pkg::*;

  localparam int FL = 8, NF = 16;

  logic clk = 0;
  logic init_we = 0;
  logic [6:0] init_addr = 0;
  logic rd_en = 0, up_en = 0;
  logic [2:0] rd_pos = 0, up_pos = 0;
  logic [3:0] rd_slot = 0, up_slot = 0;
  logic [24:0] rd_avg, rd_old, up_new = 0, up_avg_prev = 0, up_old = 0, up_avg_new;
  int checks = 0, failures = 0, n_clamp = 0;

  rdm_g_avg #(.FRAME_LEN(FL), .NUM_FRAMES(NF)) dut (.*);

  always #5 clk = ~clk;

  longint m_hist[FL*NF];
  longint m_mean[FL];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint nw, e;
    int slot, pos;
    for (int a = 0; a < FL*NF; a++) begin
      @(negedge clk); init_we = 1; init_addr = 7'(a);
    end
    @(negedge clk); init_we = 0;
    foreach (m_hist[i]) m_hist[i] = 256;
    foreach (m_mean[i]) m_mean[i] = 256;
    slot = 0;
    for (int f = 0; f < 60; f++) begin
      for (pos = 0; pos < FL; pos++) begin
        // read
        rd_en = 1; rd_pos = 3'(pos); rd_slot = 4'(slot);
        @(negedge clk); rd_en = 0;
        check(longint'(rd_avg) == m_mean[pos] && longint'(rd_old) == m_hist[slot*FL+pos],
              $sformatf("read f%0d p%0d avg=%0d/%0d old=%0d/%0d", f, pos, rd_avg,
                        m_mean[pos], rd_old, m_hist[slot*FL+pos]));
        // update with a new magnitude; late frames use small values after
        // large ones so that the clamp is exercised
        if (f < 30) nw = $urandom_range(0, 1 << 20);
        else if (f < 40) nw = $urandom_range(0, 1 << 24);
        else nw = $urandom_range(0, 3);
        up_en = 1; up_pos = 3'(pos); up_slot = 4'(slot);
        up_new = 25'(nw); up_avg_prev = rd_avg; up_old = rd_old;
        #1;
        e = mean_update(m_mean[pos], nw, m_hist[slot*FL+pos], NF);
        if ((m_mean[pos] * NF + nw - m_hist[slot*FL+pos]) < 0) n_clamp++;
        check(longint'(up_avg_new) == e, $sformatf("new mean %0d exp %0d", up_avg_new, e));
        @(negedge clk); up_en = 0;
        m_mean[pos] = e;
        m_hist[slot*FL+pos] = nw;
      end
      slot = (slot + 1) % NF;
    end
    // unchanged under no traffic: read back every mean once more
    for (pos = 0; pos < FL; pos++) begin
      rd_en = 1; rd_pos = 3'(pos); rd_slot = 4'(slot);
      @(negedge clk); rd_en = 0;
      check(longint'(rd_avg) == m_mean[pos], "final mean");
    end
    check(n_clamp > 0, "clamp at zero exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
