// Workload testbench: one 720 x 480 8-bit image, one hidden bit per pixel,
// through the core at its default size. Pixels enter the insertion stage
// back to back in raster order (pixel p as p * 1.0 in 17Q8); the watermarked
// pixels go straight into the detection stage with the same key.
//
// Checks: every hidden bit is recovered; the insertion side takes exactly one
// pixel per clock (the whole image passes in 345600 clocks plus the pipeline
// latency of 57), and so does detection (latency 58 more). Every tenth row is
// compared bit for bit with the integer model, which runs on all pixels to
// keep its state. The distortion is reported as a PSNR in 8-bit grey levels.
// At one pixel per clock, an image takes 345600 clocks: 245.4 images/s at
// 84.8 MHz.
module tb_rdm_video;
  import tb_rdm_model_pkg::*;

  localparam int W = 720, H = 480, NPIX = W * H, KEY = 8'h39;
  localparam int FL = 128, NF = 16, LAT_INS = 57, LAT_DET = 58;

  logic clk = 0, rst_n = 0;
  logic [7:0] ins_key = 8'(KEY), det_key = 8'(KEY);
  logic ins_ready, ins_valid = 0, ins_b = 0, ins_out_valid;
  logic signed [24:0] ins_x = 0, ins_y;
  logic det_ready, det_valid, det_out_valid, det_b_hat;
  logic signed [24:0] det_z;
  logic [24:0] det_dist0, det_dist1;
  int checks = 0, failures = 0;

  rdm_qim_top dut (.*);

  assign det_valid = ins_out_valid;
  assign det_z     = ins_y;

  always #5 clk = ~clk;

  bit     bits[NPIX];
  longint ymod[NPIX];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int     n_out = 0, n_dec = 0, n_err = 0, t_first_in = -1, t_last_ins = 0, t_last_det = 0;
  real    sq_err = 0.0;

  function automatic int pixel(int r, int c);
    int p;
    p = (r * 255) / H / 2 + (c * 255) / W / 2 + int'($urandom_range(0, 20)) - 10;
    if (p < 0) p = 0;
    if (p > 255) p = 255;
    return p;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xin[NPIX];

  always @(posedge clk) if (rst_n && ins_out_valid) begin
    real d;
    if ((n_out / W) % 10 == 0) begin
      checks++;
      if (longint'(ins_y) != ymod[n_out]) begin
        failures++;
        if (failures < 10) $display("FAIL: pixel %0d y=%0d exp=%0d", n_out, ins_y, ymod[n_out]);
      end
    end
    d = (real'(ins_y) - real'(xin[n_out] * 256)) / 256.0;
    sq_err += d * d;
    n_out++;
    t_last_ins = cyc;
  end

  always @(posedge clk) if (rst_n && det_out_valid) begin
    if (int'(det_b_hat) != int'(bits[n_dec])) n_err++;
    n_dec++;
    t_last_det = cyc;
  end

  initial begin
    ins_model m;
    real mse, psnr;
    m = new(FL, NF, KEY, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!ins_ready || !det_ready) @(negedge clk);
    for (int p = 0; p < NPIX; p++) begin
      xin[p]  = pixel(p / W, p % W);
      bits[p] = 1'($urandom);
      ymod[p] = m.step(longint'(xin[p]) * 256, bits[p]);
    end
    t_first_in = cyc;
    for (int p = 0; p < NPIX; p++) begin
      ins_valid = 1;
      ins_x = 25'(xin[p] * 256);
      ins_b = bits[p];
      @(negedge clk);
    end
    ins_valid = 0;
    repeat (LAT_INS + LAT_DET + 10) @(negedge clk);
    checks++;
    if (n_out != NPIX || n_dec != NPIX) begin
      failures++; $display("FAIL: %0d pixels out, %0d bits decoded", n_out, n_dec);
    end
    checks++;
    if (n_err != 0) begin failures++; $display("FAIL: %0d bit errors", n_err); end
    checks++;
    if (t_last_ins - t_first_in != NPIX - 1 + LAT_INS) begin
      failures++; $display("FAIL: insertion took %0d clocks", t_last_ins - t_first_in);
    end
    checks++;
    if (t_last_det - t_first_in != NPIX - 1 + LAT_INS + LAT_DET) begin
      failures++; $display("FAIL: detection finished after %0d clocks", t_last_det - t_first_in);
    end
    mse  = sq_err / NPIX;
    psnr = 10.0 * $log10(255.0 * 255.0 / mse);
    $display("image %0dx%0d: %0d clocks for insertion, %0d bit errors, PSNR %0.1f dB",
             W, H, t_last_ins - t_first_in, n_err, psnr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
