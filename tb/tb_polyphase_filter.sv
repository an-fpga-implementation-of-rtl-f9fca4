// tb_polyphase_filter: checks the two-branch filter stage and its alignment.
//
// Random streams are applied to real_in and imag_in. real_f must equal the
// 32-tap convolution of the real stream two cycles after a sample is
// applied, and imag_f the 31-tap convolution of the imaginary stream three
// cycles after (one cycle more for its synchronising register). Expected
// values are computed here by direct convolution with division by 2^11
// rounded toward zero.
module tb_polyphase_filter;
  import dif_pkg::*;

  logic clka = 1'b0;
  logic rst;
  logic signed [7:0] rin, iin, rf, imf;
  int checks = 0, failures = 0;

  always #5 clka = ~clka;

  polyphase_filter dut (.clka, .rst, .real_in(rin), .imag_in(iin), .real_f(rf), .imag_f(imf));

  int hr [1200], hi [1200];

  function automatic int conv(input bit is_real, input int n);
    longint acc = 0;
    int nt = is_real ? REAL_TAPS : IMAG_TAPS;
    for (int k = 0; k < nt && n - k >= 0; k++)
      acc += longint'(is_real ? REAL_COEFS[k] : IMAG_COEFS[k]) * (is_real ? hr[n-k] : hi[n-k]);
    return int'(acc / 2048);
  endfunction

  initial begin
    repeat (3000) @(posedge clka);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rin = '0; iin = '0;
    repeat (3) @(posedge clka);
    #1 rst = 1'b0;
    for (int n = 0; n < 1200; n++) begin
      rin = 8'($urandom); iin = 8'($urandom);
      hr[n] = int'(rin); hi[n] = int'(iin);
      @(posedge clka);
      #1;
      checks++;
      if (n >= 1 && int'(rf) != conv(1'b1, n - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL real n=%0d got %0d exp %0d", n, rf, conv(1'b1, n - 1));
      end
      checks++;
      if (n >= 2 && int'(imf) != conv(1'b0, n - 2)) begin
        failures++;
        if (failures < 10) $display("FAIL imag n=%0d got %0d exp %0d", n, imf, conv(1'b0, n - 2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
