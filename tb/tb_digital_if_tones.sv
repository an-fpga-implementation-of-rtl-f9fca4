// tb_digital_if_tones: spectral test of the processor with tone inputs.
//
// Two stimuli are run, each 1024 input samples at Fs = 200 MHz (512 bus
// words), through three processors that differ only in the output width:
// 8, 10 and 12 bits (SHIFT 11, 9 and 7, so the gain is the same).
//
//  1. Two tones at 41 MHz and 52 MHz, the first twice the amplitude of the
//     second (6 dB), plus a little uniform noise, scaled to full 8-bit range.
//     FS/4 down, filtering and FS/4 up must move them to +16 MHz and +27 MHz
//     at the 100 MS/s output, keeping their 6 dB difference.
//  2. One near-full-scale tone at 29 MHz, which must come out at +4 MHz.
//
// For each output the testbench takes a Blackman-windowed DFT at single
// frequencies and checks: the tones are where expected and in the right
// ratio; the residual images of the tones (at 34 and 23 MHz for stimulus 1,
// 46 MHz for stimulus 2) and the whole negative half of the spectrum lie at
// least 30 dB below the strongest tone; and the 12-bit output is 16 times
// the 8-bit one. A fourth, 8-bit processor runs with fs4_up = 0; for
// stimulus 1 its tones must sit at -34 MHz and -23 MHz with the positive half
// of its spectrum 30 dB down. The first 40 outputs (filter fill) are dropped.
module tb_digital_if_tones;
  localparam int NX  = 1024;       // input samples per run
  localparam int NW  = NX / 2;     // bus words
  localparam int LAT = 6;
  localparam int SKIP = 40;
  localparam real PI = 3.14159265358979;

  logic clka = 1'b0;
  logic rst;
  logic signed [7:0] busa, busb;
  logic signed [7:0]  r8, i8;
  logic signed [9:0]  r10, i10;
  logic signed [11:0] r12, i12;
  logic signed [7:0]  rd, id;
  int checks = 0, failures = 0;

  always #5 clka = ~clka;

  digital_if #(.OUT_W(8))  dut8  (.clka, .rst, .fs4_up(1'b1), .busa, .busb, .real_o(r8),  .imag_o(i8));
  digital_if #(.OUT_W(10)) dut10 (.clka, .rst, .fs4_up(1'b1), .busa, .busb, .real_o(r10), .imag_o(i10));
  digital_if #(.OUT_W(12)) dut12 (.clka, .rst, .fs4_up(1'b1), .busa, .busb, .real_o(r12), .imag_o(i12));
  // FS/4 down in the output stage: the tones must appear at -34 and -23 MHz
  digital_if #(.OUT_W(8))  dutd  (.clka, .rst, .fs4_up(1'b0), .busa, .busb, .real_o(rd),  .imag_o(id));

  int  xq [NX + 1];               // xq[n+1] = x[n], n = -1 .. NX-1
  real yr [4][NW], yi [4][NW];    // outputs per width; [3] is FS/4 down

  initial begin
    repeat (4 * (NW + 100)) @(posedge clka);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Power (dB, relative units) of output w at frequency f (MHz, -50..50).
  function automatic real power_db(input int w, input real f);
    real sr = 0.0, si = 0.0, win, ph;
    int len = NW - SKIP;
    for (int m = 0; m < len; m++) begin
      win = 0.42 - 0.5 * $cos(2.0 * PI * m / (len - 1)) + 0.08 * $cos(4.0 * PI * m / (len - 1));
      ph = -2.0 * PI * f / 100.0 * m;
      // (yr + j yi) * exp(j ph)
      sr += win * (yr[w][m + SKIP] * $cos(ph) - yi[w][m + SKIP] * $sin(ph));
      si += win * (yr[w][m + SKIP] * $sin(ph) + yi[w][m + SKIP] * $cos(ph));
    end
    return 10.0 * $log10(sr * sr + si * si + 1.0e-12);
  endfunction

  task automatic make_input(input int kind);
    real xr [NX + 1];
    real mx = 0.0;
    for (int n = -1; n < NX; n++) begin
      real v;
      if (kind == 1)
        v = 2.0 * $sin(2.0 * PI * 41.0 / 200.0 * n) + 1.0 * $sin(2.0 * PI * 52.0 / 200.0 * n)
          + 0.1 * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);
      else
        v = 0.97 * $sin(2.0 * PI * 29.0 / 200.0 * n + 0.3);
      xr[n + 1] = v;
      if (v > mx) mx = v;
      if (-v > mx) mx = -v;
    end
    if (kind != 1) mx = 1.0;
    for (int n = 0; n <= NX; n++) xq[n] = $rtoi(127.0 * xr[n] / mx + ((xr[n] >= 0) ? 0.5 : -0.5));
  endtask

  task automatic run();
    rst = 1'b1; busa = '0; busb = '0;
    repeat (3) @(posedge clka);
    #1 rst = 1'b0;
    for (int n = 0; n < NW + LAT; n++) begin
      if (n < NW) begin
        busa = 8'(xq[2 * n + 1]);   // x[2n]
        busb = 8'(xq[2 * n]);       // x[2n-1]
      end else begin
        busa = '0; busb = '0;
      end
      @(posedge clka);
      #1;
      if (n - LAT >= 0 && n - LAT < NW) begin
        yr[0][n - LAT] = $itor(r8);  yi[0][n - LAT] = $itor(i8);
        yr[1][n - LAT] = $itor(r10); yi[1][n - LAT] = $itor(i10);
        yr[2][n - LAT] = $itor(r12); yi[2][n - LAT] = $itor(i12);
        yr[3][n - LAT] = $itor(rd);  yi[3][n - LAT] = $itor(id);
      end
    end
  endtask

  task automatic expect_le(input string what, input real v, input real limit);
    checks++;
    if (!(v <= limit)) begin
      failures++;
      $display("FAIL %s: %0.1f dB, limit %0.1f dB", what, v, limit);
    end
  endtask

  task automatic analyse(input int kind);
    real p0, p1, worst, pf, ratio;
    for (int w = 0; w < 3; w++) begin
      string tag;
      tag = $sformatf("%0d-bit", 8 + 2 * w);
      worst = -1000.0;
      for (real f = -49.0; f <= -1.0; f += 0.5) begin
        pf = power_db(w, f);
        if (pf > worst) worst = pf;
      end
      if (kind == 1) begin
        p0 = power_db(w, 16.0);
        p1 = power_db(w, 27.0);
        $display("%s two tones: 16 MHz %0.1f, 27 MHz %0.1f, 34 MHz %0.1f, 23 MHz %0.1f, worst negative %0.1f dB",
                 tag, p0, p1, power_db(w, 34.0), power_db(w, 23.0), worst);
        // the 41 MHz tone was 6 dB above the 52 MHz tone
        checks++;
        if (p0 - p1 < 4.5 || p0 - p1 > 7.5) begin
          failures++;
          $display("FAIL %s tone ratio %0.1f dB", tag, p0 - p1);
        end
        expect_le({tag, " image at 34 MHz"}, power_db(w, 34.0) - p0, -30.0);
        expect_le({tag, " image at 23 MHz"}, power_db(w, 23.0) - p0, -30.0);
        expect_le({tag, " leakage at 13 MHz"}, power_db(w, 13.0) - p0, -30.0);
        expect_le({tag, " negative band"}, worst - p0, -30.0);
      end else begin
        p0 = power_db(w, 4.0);
        $display("%s single tone: 4 MHz %0.1f, 46 MHz %0.1f, worst negative %0.1f dB",
                 tag, p0, power_db(w, 46.0), worst);
        expect_le({tag, " tone off 4 MHz (at 8 MHz)"}, power_db(w, 8.0) - p0, -30.0);
        expect_le({tag, " image at 46 MHz"}, power_db(w, 46.0) - p0, -30.0);
        expect_le({tag, " negative band"}, worst - p0, -30.0);
      end
    end
    if (kind == 1) begin
      // FS/4 down output: mirror image of the up-converted band
      p0 = power_db(3, -34.0);
      p1 = power_db(3, -23.0);
      worst = -1000.0;
      for (real f = 1.0; f <= 49.0; f += 0.5) begin
        pf = power_db(3, f);
        if (pf > worst) worst = pf;
      end
      $display("8-bit FS/4 down: -34 MHz %0.1f, -23 MHz %0.1f, worst positive %0.1f dB", p0, p1, worst);
      checks++;
      if (p0 - p1 < 4.5 || p0 - p1 > 7.5 || p0 < power_db(0, 16.0) - 1.0) begin
        failures++;
        $display("FAIL FS/4 down tones %0.1f / %0.1f dB", p0, p1);
      end
      expect_le("FS/4 down positive band", worst - p0, -30.0);
    end
    // same gain at every width: 12-bit output = 16 x 8-bit output (in dB, 24.1)
    ratio = (kind == 1) ? power_db(2, 16.0) - power_db(0, 16.0) : power_db(2, 4.0) - power_db(0, 4.0);
    checks++;
    if (ratio < 23.0 || ratio > 25.2) begin
      failures++;
      $display("FAIL 12-bit / 8-bit gain %0.2f dB", ratio);
    end
  endtask

  initial begin
    make_input(1);
    run();
    analyse(1);
    make_input(2);
    run();
    analyse(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
