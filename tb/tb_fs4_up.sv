// tb_fs4_up: checks the output exchange and negation stage.
//
// Random complex samples and random control bits are applied. After the
// edge that samples (real_in, imag_in) with swap, and one edge later with
// negreal/negimag, the output must be the exchanged-then-negated value. All
// combinations of the three control bits, and the wrap of -2^(W-1), are
// covered. The stage is run at W = 12 as well as the default 8 bits.
module tb_fs4_up;
  logic clka = 1'b0;
  logic rst;
  int checks = 0, failures = 0;
  int combo_seen [8];

  always #5 clka = ~clka;

  logic signed [7:0]  ri8, ii8, ro8, io8;
  logic signed [11:0] ri12, ii12, ro12, io12;
  logic swap, negreal, negimag;

  fs4_up #(.W(8))  dut8  (.clka, .rst, .real_in(ri8),  .imag_in(ii8),  .swap, .negreal, .negimag,
                          .real_out(ro8),  .imag_out(io8));
  fs4_up #(.W(12)) dut12 (.clka, .rst, .real_in(ri12), .imag_in(ii12), .swap, .negreal, .negimag,
                          .real_out(ro12), .imag_out(io12));

  logic signed [7:0]  hr8 [600], hi8 [600];
  logic signed [11:0] hr12 [600], hi12 [600];
  logic hs [600], hnr [600], hni [600];

  function automatic int wneg(input int v, input int w);
    return (v == -(1 << (w - 1))) ? v : -v;
  endfunction

  initial begin
    repeat (2000) @(posedge clka);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ei, a, b;
    rst = 1'b1; ri8 = 0; ii8 = 0; ri12 = 0; ii12 = 0; swap = 0; negreal = 0; negimag = 0;
    repeat (3) @(posedge clka);
    #1 rst = 1'b0;
    for (int n = 0; n < 600; n++) begin
      ri8 = ($urandom_range(0, 15) == 0) ? -8'sd128 : 8'($urandom);
      ii8 = ($urandom_range(0, 15) == 0) ? -8'sd128 : 8'($urandom);
      ri12 = ($urandom_range(0, 15) == 0) ? -12'sd2048 : 12'($urandom);
      ii12 = 12'($urandom);
      {swap, negreal, negimag} = 3'($urandom);
      hr8[n] = ri8; hi8[n] = ii8; hr12[n] = ri12; hi12[n] = ii12;
      hs[n] = swap; hnr[n] = negreal; hni[n] = negimag;
      @(posedge clka);
      #1;
      if (n >= 1) begin
        // sample n-1 was swapped at edge n-1 and negated at edge n
        combo_seen[{hs[n-1], hnr[n], hni[n]}]++;
        a = hs[n-1] ? int'(hi8[n-1]) : int'(hr8[n-1]);
        b = hs[n-1] ? int'(hr8[n-1]) : int'(hi8[n-1]);
        er = hnr[n] ? wneg(a, 8) : a;
        ei = hni[n] ? wneg(b, 8) : b;
        checks++;
        if (int'(ro8) != er || int'(io8) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL8 n=%0d out=(%0d,%0d) exp (%0d,%0d)", n, ro8, io8, er, ei);
        end
        a = hs[n-1] ? int'(hi12[n-1]) : int'(hr12[n-1]);
        b = hs[n-1] ? int'(hr12[n-1]) : int'(hi12[n-1]);
        er = hnr[n] ? wneg(a, 12) : a;
        ei = hni[n] ? wneg(b, 12) : b;
        checks++;
        if (int'(ro12) != er || int'(io12) != ei) begin
          failures++;
          if (failures < 10) $display("FAIL12 n=%0d out=(%0d,%0d) exp (%0d,%0d)", n, ro12, io12, er, ei);
        end
      end
    end
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (combo_seen[c] == 0) begin
        failures++;
        $display("FAIL control combination %0d never applied", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
