// digital_if: digital IF processor for a 200 MS/s, 8-bit real IF signal.
//
// The input band is centred on Fs/4 = 50 MHz. The processor moves it to
// complex baseband (FS/4 down), removes the image with a 63-tap lowpass
// decimating by two, and moves the result up by a quarter of the output rate
// (25 MHz), giving a 100 MS/s complex output that holds 50 MHz of band.
// Every stage runs on one 100 MHz clock, clka:
//
//   busa, busb --> fs4_down --> polyphase_filter --> fs4_up --> real, imag
//                     ^          (32 + 31 taps)        ^
//                     +-------- dif_controller --------+
//
// busa carries the even input samples x[2m], busb the sample taken just
// before, x[2m-1]; both change once per clka cycle. Output real/imag carry
// one complex sample per cycle.
//
// Timing: a bus word sampled at clka edge t is seen at real_o/imag_o right
// after edge t+6; seven register stages (three in fs4_down, two in
// polyphase_filter, two in fs4_up) lie on every path. Counting t from the
// first edge at which rst is low, the output seen after edge t+6 is
//   -(+j)^t * y[t]    (fs4_up = 1)        -(-j)^t * y[t]    (fs4_up = 0)
// where y[t] is the filtered baseband sample for bus word t:
//   y_re[t] = trunc( sum_i hr[i] * s(t-i) * busa[t-i] / 2^11 )
//   y_im[t] = trunc( sum_i hi[i] * s(t-i) * busb[t-i] / 2^11 ),
//   s(t) = -(-1)^t, trunc() rounding toward zero.
// The constant leading minus sign comes from the controller phase at reset
// and does not change the spectrum.
//
// fs4_up selects FS/4 up (1) or FS/4 down (0) conversion in the output stage;
// it is meant to be static, and takes effect within two cycles of a change.
// rst is synchronous and active high.
module digital_if #(
  parameter int unsigned IN_W  = dif_pkg::IN_W,
  parameter int unsigned OUT_W = dif_pkg::OUT_W,
  // 11 for the 8-bit output path; one less per extra output bit keeps the
  // same gain.
  parameter int unsigned SHIFT = dif_pkg::OUT_SHIFT + dif_pkg::OUT_W - OUT_W
) (
  input  logic                    clka,
  input  logic                    rst,
  input  logic                    fs4_up,
  input  logic signed [IN_W-1:0]  busa,
  input  logic signed [IN_W-1:0]  busb,
  output logic signed [OUT_W-1:0] real_o,
  output logic signed [OUT_W-1:0] imag_o
);

  import dif_pkg::*;

  ctrl_t  ctrl;
  phase_e phase;

  logic signed [IN_W-1:0]  real_d, imag_d;
  logic signed [OUT_W-1:0] real_f, imag_f;

  dif_controller u_controller (
    .clka   (clka),
    .rst    (rst),
    .fs4_up (fs4_up),
    .phase  (phase),
    .ctrl   (ctrl)
  );

  fs4_down #(.W(IN_W)) u_fs4_down (
    .clka     (clka),
    .rst      (rst),
    .busa     (busa),
    .busb     (busb),
    .neginput (ctrl.neginput),
    .real_d   (real_d),
    .imag_d   (imag_d)
  );

  polyphase_filter #(
    .IN_W  (IN_W),
    .OUT_W (OUT_W),
    .SHIFT (SHIFT)
  ) u_filter (
    .clka    (clka),
    .rst     (rst),
    .real_in (real_d),
    .imag_in (imag_d),
    .real_f  (real_f),
    .imag_f  (imag_f)
  );

  fs4_up #(.W(OUT_W)) u_fs4_up (
    .clka     (clka),
    .rst      (rst),
    .real_in  (real_f),
    .imag_in  (imag_f),
    .swap     (ctrl.swap),
    .negreal  (ctrl.negreal),
    .negimag  (ctrl.negimag),
    .real_out (real_o),
    .imag_out (imag_o)
  );

  // The state sequence is only ever the four-state ring.
  a_phase_ring: assert property (@(posedge clka) disable iff (rst)
      $past(!rst) |-> phase == phase_e'($past(phase) + 2'd1));

endmodule
