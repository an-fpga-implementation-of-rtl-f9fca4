// dif_controller: the four-state sequencer that drives every sign change and
// swap of the digital IF processor.
//
// A 2-bit state register counts 00 -> 01 -> 10 -> 11 -> 00 on every rising
// clock edge, and four control bits are decoded from the current state:
//
//   state | neginput swap negimag negreal
//   ------+--------------------------------
//    00   |    0      1      0       0
//    01   |    1      0      0       1
//    10   |    0      1      1       1
//    11   |    1      0      1       0
//
// That table, and the free-running four-state counter, follow the design.
// neginput alternates each cycle (FS/4 down conversion of the two input
// branches). swap, negreal and negimag realise multiplication by
// exp(+j*pi*m/2) in the output stage; swap leads the negation bits by one
// cycle because the output stage registers the swapped data before negating
// it.
//
// The output stage can also shift down instead of up. With fs4_up = 0 the
// negreal and negimag columns are exchanged, which turns the rotation into
// exp(-j*pi*m/2). That input, and the synchronous active-high reset to state
// 00, are this design's own choices.
//
// Interface: clka, rst (synchronous, active high), fs4_up (1: FS/4 up).
// Timing: outputs are decoded from the state register, so they change right
// after each rising edge of clka.
module dif_controller
  import dif_pkg::*;
(
  input  logic  clka,
  input  logic  rst,
  input  logic  fs4_up,
  output phase_e phase,
  output ctrl_t ctrl
);

  phase_e state;

  always_ff @(posedge clka) begin
    if (rst) state <= PH0;
    else begin
      unique case (state)
        PH0: state <= PH1;
        PH1: state <= PH2;
        PH2: state <= PH3;
        PH3: state <= PH0;
      endcase
    end
  end

  always_comb begin
    ctrl = '0;
    unique case (state)
      PH0: ctrl = '{neginput: 1'b0, swap: 1'b1, negimag: 1'b0, negreal: 1'b0};
      PH1: ctrl = '{neginput: 1'b1, swap: 1'b0, negimag: 1'b0, negreal: 1'b1};
      PH2: ctrl = '{neginput: 1'b0, swap: 1'b1, negimag: 1'b1, negreal: 1'b1};
      PH3: ctrl = '{neginput: 1'b1, swap: 1'b0, negimag: 1'b1, negreal: 1'b0};
    endcase
    if (!fs4_up) {ctrl.negreal, ctrl.negimag} = {ctrl.negimag, ctrl.negreal};
  end

  assign phase = state;

endmodule
