// polyphase_filter: the two branch filters of the decimating lowpass.
//
// After FS/4 down conversion the even input samples are purely real and the
// odd ones purely imaginary, so a 63-tap real lowpass h[k] followed by
// decimation by two splits into two independent real filters running at the
// output rate:
//   real branch:      32 taps h[0], h[2], .., h[62] on the real stream
//   imaginary branch: 31 taps h[1], h[3], .., h[61] on the imaginary stream
// Each branch is a fir_filter instance ("realfilter", "imaginaryfilter").
//
// Registers, as in the design: the imaginary stream passes one extra
// register before its filter, which lines it up with the real stream
// (fs4_down delivers it one cycle earlier); each filter output is
// registered once more. Both filters run every cycle (clk_en tied high).
// From this module's inputs, real_in reaches real_f after 2 cycles and
// imag_in reaches imag_f after 3.
//
// rst is synchronous, active high (the design ties the filters' reset low;
// driving it from the processor reset is this design's own choice).
module polyphase_filter #(
  parameter int unsigned IN_W   = dif_pkg::IN_W,
  parameter int unsigned OUT_W  = dif_pkg::OUT_W,
  parameter int unsigned SHIFT  = dif_pkg::OUT_SHIFT
) (
  input  logic                    clka,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  real_in,
  input  logic signed [IN_W-1:0]  imag_in,
  output logic signed [OUT_W-1:0] real_f,
  output logic signed [OUT_W-1:0] imag_f
);

  logic signed [IN_W-1:0]  imag_sync;
  logic signed [OUT_W-1:0] real_fir, imag_fir;
  logic real_rdy, real_done, imag_rdy, imag_done;

  always_ff @(posedge clka) begin
    if (rst) imag_sync <= '0;
    else     imag_sync <= imag_in;
  end

  fir_filter #(
    .NTAPS (dif_pkg::REAL_TAPS),
    .IN_W  (IN_W),
    .OUT_W (OUT_W),
    .SHIFT (SHIFT),
    .COEFS (dif_pkg::REAL_COEFS)
  ) realfilter (
    .clock      (clka),
    .clk_en     (1'b1),
    .rst        (rst),
    .data_in    (real_in),
    .fir_result (real_fir),
    .rdy_to_ld  (real_rdy),
    .done       (real_done)
  );

  fir_filter #(
    .NTAPS (dif_pkg::IMAG_TAPS),
    .IN_W  (IN_W),
    .OUT_W (OUT_W),
    .SHIFT (SHIFT),
    .COEFS (dif_pkg::IMAG_COEFS)
  ) imaginaryfilter (
    .clock      (clka),
    .clk_en     (1'b1),
    .rst        (rst),
    .data_in    (imag_sync),
    .fir_result (imag_fir),
    .rdy_to_ld  (imag_rdy),
    .done       (imag_done)
  );

  always_ff @(posedge clka) begin
    if (rst) begin
      real_f <= '0;
      imag_f <= '0;
    end else begin
      real_f <= real_fir;
      imag_f <= imag_fir;
    end
  end

  // The filters are fully parallel: once out of reset they take a sample and
  // produce a result every cycle.
  a_filters_stream: assert property (@(posedge clka) disable iff (rst)
      $past(!rst) |-> (real_rdy && imag_rdy && real_done && imag_done));

endmodule
