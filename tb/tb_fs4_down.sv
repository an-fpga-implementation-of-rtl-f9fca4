// tb_fs4_down: checks the input registers and FS/4 down sign changes.
//
// The testbench toggles neginput itself, as the controller does, and feeds
// random bus words including -128 and 127. busa must arrive at real_d three
// cycles after it is sampled, busb at imag_d two cycles after, each negated
// (with 8-bit wrap) according to neginput at the cycle it crosses the
// multiplexer: busa one cycle before it reaches real_d, busb likewise.
module tb_fs4_down;
  logic clka = 1'b0;
  logic rst, neginput;
  logic signed [7:0] busa, busb, real_d, imag_d;
  int checks = 0, failures = 0;
  int n_negr = 0, n_negi = 0, n_wrap = 0;

  always #5 clka = ~clka;

  fs4_down #(.W(8)) dut (.clka, .rst, .busa, .busb, .neginput, .real_d, .imag_d);

  logic signed [7:0] ha [1000];
  logic signed [7:0] hb [1000];
  logic              hn [1000];   // neginput in the cycle ending at edge n

  function automatic logic signed [7:0] neg8(input logic signed [7:0] v);
    return (v == -8'sd128) ? v : -v;
  endfunction

  function automatic logic signed [7:0] pick();
    case ($urandom_range(0, 9))
      0: return -8'sd128;
      1: return 8'sd127;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    repeat (3000) @(posedge clka);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [7:0] er, ei;
    rst = 1'b1; neginput = 1'b0; busa = '0; busb = '0;
    repeat (3) @(posedge clka);
    #1 rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      busa = pick(); busb = pick();
      neginput = n[0];
      ha[n] = busa; hb[n] = busb; hn[n] = neginput;
      @(posedge clka);
      #1;
      // Value seen now: busa of word n-2 (crossed the mux at edge n),
      // busb of word n-1 (crossed the mux at edge n).
      if (n >= 2) begin
        er = hn[n] ? ha[n-2] : neg8(ha[n-2]);
        ei = hn[n] ? neg8(hb[n-1]) : hb[n-1];
        if (!hn[n]) n_negr++; else n_negi++;
        if (ha[n-2] == -8'sd128 || hb[n-1] == -8'sd128) n_wrap++;
        checks++;
        if (real_d !== er || imag_d !== ei) begin
          failures++;
          if (failures < 10)
            $display("FAIL n=%0d real=%0d exp %0d imag=%0d exp %0d", n, real_d, er, imag_d, ei);
        end
      end
    end
    checks++;
    if (n_negr == 0 || n_negi == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL coverage negr=%0d negi=%0d wrap=%0d", n_negr, n_negi, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
