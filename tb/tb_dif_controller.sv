// tb_dif_controller: checks the four-state control sequence.
//
// After reset the controller must step through the states 00, 01, 10, 11
// forever, and decode each into the control bits of the design's table. In
// FS/4 down mode (fs4_up = 0) negreal and negimag trade places. The
// expected table is written out here independently of the RTL. The mode is
// switched on the fly and the sequence must keep its phase.
module tb_dif_controller;
  import dif_pkg::*;

  logic clka = 1'b0;
  logic rst, fs4_up;
  phase_e phase;
  ctrl_t  ctrl;
  int checks = 0, failures = 0;

  always #5 clka = ~clka;

  dif_controller dut (.clka, .rst, .fs4_up, .phase, .ctrl);

  // Expected {neginput, swap, negimag, negreal} for FS/4 up, per state.
  localparam logic [3:0] EXP_UP [4] = '{4'b0100, 4'b1001, 4'b0111, 4'b1010};

  initial begin
    repeat (200) @(posedge clka);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int k, input bit up);
    logic [3:0] e;
    e = EXP_UP[k % 4];
    if (!up) e = {e[3], e[2], e[0], e[1]};
    checks++;
    if (phase != phase_e'(k % 4) || ctrl != ctrl_t'(e)) begin
      failures++;
      $display("FAIL k=%0d up=%0b phase=%0d ctrl=%b expected %b", k, up, phase, ctrl, e);
    end
  endtask

  initial begin
    rst = 1'b1;
    fs4_up = 1'b1;
    repeat (3) @(posedge clka);
    #1;
    check(0, 1'b1);     // reset holds state 00
    rst = 1'b0;
    for (int k = 1; k < 120; k++) begin
      @(posedge clka);
      #1;
      if (k == 40) fs4_up = 1'b0;
      if (k == 90) fs4_up = 1'b1;
      check(k, fs4_up);
    end
    // Reset in mid-sequence returns to 00.
    rst = 1'b1;
    @(posedge clka);
    #1;
    check(0, fs4_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
