// tb_digital_if: end-to-end test of the digital IF processor at its default
// sizes (8-bit input, 32 + 31 taps, 8-bit output).
//
// The expected output is computed from the input bus words alone, by the
// arithmetic the processor stands for rather than by copying its pipeline:
//   z_re[t] = s(t) * busa[t],  z_im[t] = s(t) * busb[t],   s(t) = -(-1)^t
//             (8-bit negation, so -(-128) stays -128)
//   y[t]    = (sum_i hr[i] z_re[t-i]) / 2^11 + j (sum_i hi[i] z_im[t-i]) / 2^11
//   out     = -(+j)^t * y[t] in FS/4 up mode, -(-j)^t * y[t] in FS/4 down mode
// with t counted from the first edge after reset. The output for word t must
// appear right after edge t+6 (seven register stages), every cycle.
//
// Stimulus: random full-scale words, runs of -128 (the negator wrap), and
// runs that drive the filters to their largest sums; the output mode is
// switched from up to down and back during the run (the three outputs that
// straddle each switch are not compared). Each mechanism is counted: the two
// FS/4 down signs, the four output rotations in each mode, the mode switches
// and the -128 wrap; one that never happened counts as a failure.
module tb_digital_if;
  import dif_pkg::*;

  localparam int N = 4000;
  localparam int LAT = 6;

  logic clka = 1'b0;
  logic rst, fs4_up;
  logic signed [7:0] busa, busb, real_o, imag_o;
  int checks = 0, failures = 0;

  always #5 clka = ~clka;

  digital_if dut (.clka, .rst, .fs4_up, .busa, .busb, .real_o, .imag_o);

  int za [N], zb [N];     // FS/4-down-converted words
  bit mode [N];           // fs4_up for the output of word t
  int rot_seen [2][4];
  int n_pos = 0, n_neg = 0, n_wrap = 0, n_switch = 0, n_nonzero = 0, skip_until = 0;

  function automatic int neg8(input int v);
    return (v == -128) ? v : -v;
  endfunction

  function automatic int conv(input bit is_real, input int t);
    longint acc = 0;
    int nt = is_real ? REAL_TAPS : IMAG_TAPS;
    for (int k = 0; k < nt && t - k >= 0; k++)
      acc += longint'(is_real ? REAL_COEFS[k] : IMAG_COEFS[k]) * (is_real ? za[t-k] : zb[t-k]);
    return int'(acc / 2048);
  endfunction

  initial begin
    repeat (N + 100) @(posedge clka);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int yr, yi, er, ei, t, q;
    rst = 1'b1; fs4_up = 1'b1; busa = '0; busb = '0;
    repeat (3) @(posedge clka);
    #1 rst = 1'b0;
    for (int n = 0; n < N; n++) begin
      int j;
      j = n % 400;
      if (n == 1500 || n == 2800) begin
        fs4_up = ~fs4_up;
        n_switch++;
        skip_until = n + LAT + 3;
      end
      if (j >= 100 && j < 108) begin
        busa = -8'sd128; busb = -8'sd128;
      end else if (j >= 200 && j < 264) begin
        // alternate the sign per word so that after FS/4 down the real
        // branch sees sign(hr) * full scale
        int k;
        bit pos;
        k = (REAL_TAPS - 1) - (j % 32);
        pos = ((REAL_COEFS[k] >= 0) ^ (j >= 232)) ^ n[0];
        busa = pos ? 8'sd127 : -8'sd127;
        busb = 8'($urandom);
      end else begin
        busa = 8'($urandom); busb = 8'($urandom);
      end
      if (n[0]) begin
        za[n] = int'(busa); zb[n] = int'(busb); n_pos++;
      end else begin
        za[n] = neg8(int'(busa)); zb[n] = neg8(int'(busb)); n_neg++;
      end
      if (busa == -8'sd128 || busb == -8'sd128) n_wrap++;
      mode[n] = fs4_up;
      @(posedge clka);
      #1;
      t = n - LAT;
      if (t >= 0 && n >= skip_until) begin
        yr = conv(1'b1, t);
        yi = conv(1'b0, t);
        q = t % 4;
        // -(j^q) for up, -((-j)^q) for down
        case (q)
          0: begin er = -yr; ei = -yi; end
          1: if (mode[t]) begin er = yi; ei = -yr; end else begin er = -yi; ei = yr; end
          2: begin er = yr; ei = yi; end
          default: if (mode[t]) begin er = -yi; ei = yr; end else begin er = yi; ei = -yr; end
        endcase
        rot_seen[mode[t]][q]++;
        if (er != 0 || ei != 0) n_nonzero++;
        checks++;
        if (int'(real_o) != er || int'(imag_o) != ei) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d mode=%0b out=(%0d,%0d) exp (%0d,%0d)", t, mode[t], real_o, imag_o, er, ei);
        end
      end
    end
    $display("coverage: down signs +%0d -%0d, wrap %0d, mode switches %0d, nonzero outputs %0d",
             n_pos, n_neg, n_wrap, n_switch, n_nonzero);
    for (int m = 0; m < 2; m++)
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (rot_seen[m][r] == 0) begin
          failures++;
          $display("FAIL rotation %0d in mode %0d never checked", r, m);
        end
      end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_wrap == 0 || n_switch < 2 || n_nonzero < N / 2) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
