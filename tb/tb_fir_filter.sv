// tb_fir_filter: checks both branch filters against a direct convolution.
//
// Four instances are tested side by side: the 32-tap real branch and the
// 31-tap imaginary branch with their default taps, each built both with
// symmetric folding (the default) and as a plain direct form. The testbench keeps its
// own history of accepted samples and computes
//   expected = (sum_k c[k] * x[n-k]) / 2^11     (integer division, toward zero)
// for every accepted sample. The result must appear right after the edge
// that accepts the sample (one-cycle latency), hold while clk_en is low, and
// done must follow clk_en by one cycle. Stimulus mixes random samples with
// runs that drive each filter to its largest positive and negative sums.
module tb_fir_filter;
  import dif_pkg::*;

  logic clka = 1'b0;
  logic rst, en;
  logic signed [7:0] din, rout, iout;
  logic rrdy, rdone, irdy, idone;
  logic signed [7:0] routd, ioutd;   // direct-form (SYMMETRIC = 0) instances
  logic rrdyd, rdoned, irdyd, idoned;
  int checks = 0, failures = 0;
  int n_stall = 0, n_extreme = 0;

  always #5 clka = ~clka;

  fir_filter #(.NTAPS(REAL_TAPS), .COEFS(REAL_COEFS)) dut_r (
    .clock(clka), .clk_en(en), .rst, .data_in(din), .fir_result(rout), .rdy_to_ld(rrdy), .done(rdone));
  fir_filter #(.NTAPS(IMAG_TAPS), .COEFS(IMAG_COEFS)) dut_i (
    .clock(clka), .clk_en(en), .rst, .data_in(din), .fir_result(iout), .rdy_to_ld(irdy), .done(idone));
  fir_filter #(.NTAPS(REAL_TAPS), .COEFS(REAL_COEFS), .SYMMETRIC(1'b0)) dut_rd (
    .clock(clka), .clk_en(en), .rst, .data_in(din), .fir_result(routd), .rdy_to_ld(rrdyd), .done(rdoned));
  fir_filter #(.NTAPS(IMAG_TAPS), .COEFS(IMAG_COEFS), .SYMMETRIC(1'b0)) dut_id (
    .clock(clka), .clk_en(en), .rst, .data_in(din), .fir_result(ioutd), .rdy_to_ld(irdyd), .done(idoned));

  int hist [$];   // newest first

  function automatic int conv(input bit is_real);
    longint acc = 0;
    int nt = is_real ? REAL_TAPS : IMAG_TAPS;
    for (int k = 0; k < nt && k < hist.size(); k++)
      acc += longint'(is_real ? REAL_COEFS[k] : IMAG_COEFS[k]) * hist[k];
    return int'(acc / 2048);
  endfunction

  initial begin
    repeat (5000) @(posedge clka);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er = 0, ei = 0, maxr = 0, minr = 0;
    rst = 1'b1; en = 1'b0; din = '0;
    repeat (3) @(posedge clka);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int seg, j;
      seg = n / 250;
      j = n % 250;
      en = ($urandom_range(0, 9) != 0);
      if (seg % 3 == 1 && j < 64) begin
        // drive sign(c[k]) * full scale so the sum peaks at the end of the run
        int k;
        k = (REAL_TAPS - 1) - (j % 32);
        en = 1'b1;
        din = (REAL_COEFS[k] >= 0) ^ (j >= 32) ? 8'sd127 : -8'sd128;
        n_extreme++;
      end else begin
        din = 8'($urandom);
      end
      if (!en) n_stall++;
      @(posedge clka);
      #1;
      if (en) begin
        hist.push_front(int'(din));
        if (hist.size() > 40) void'(hist.pop_back());
        er = conv(1'b1);
        ei = conv(1'b0);
        if (er > maxr) maxr = er;
        if (er < minr) minr = er;
      end
      checks++;
      if (int'(routd) != er || int'(ioutd) != ei || rdoned != en || idoned != en || !rrdyd || !irdyd) begin
        failures++;
        if (failures < 10)
          $display("FAIL direct form n=%0d real %0d exp %0d imag %0d exp %0d", n, routd, er, ioutd, ei);
      end
      checks++;
      if (int'(rout) != er || int'(iout) != ei || rdone != en || idone != en || !rrdy || !irdy) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d real %0d exp %0d imag %0d exp %0d done %b%b en %b",
                   n, rout, er, iout, ei, rdone, idone, en);
      end
    end
    // The extreme runs must have reached close to the largest sums (|112|).
    checks++;
    if (maxr < 100 || minr > -100 || n_stall == 0 || n_extreme == 0) begin
      failures++;
      $display("FAIL coverage max=%0d min=%0d stalls=%0d", maxr, minr, n_stall);
    end
    $display("real branch output range %0d .. %0d, %0d stalled cycles", minr, maxr, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
