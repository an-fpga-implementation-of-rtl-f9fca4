// fir_filter: fully parallel FIR filter, one output per clock.
//
// Each enabled clock the newest sample data_in enters a delay line and the
// filter forms
//   acc = sum_{k=0}^{NTAPS-1} COEFS[k] * x[n-k]
// at full precision (IN_W + COEF_W + ceil(log2 NTAPS) bits). The result is
// divided by 2^SHIFT, rounding toward zero, and registered as an OUT_W-bit
// fir_result. With the default widths (8-bit data, 10-bit taps, SHIFT 11)
// that is the 8-bit output of the processor.
//
// The design uses a generated vendor filter for this block and gives its
// port names (data_in, clk_en, rst, clock, fir_result, rdy_to_ld, done), its
// tap counts (32 real, 31 imaginary), its widths, and notes that the tap
// symmetry of each branch sets its size. What is inside is this design's own:
// with SYMMETRIC = 1 (the default; both default tap sets are symmetric) the
// two samples that share a tap, x[n-k] and x[n-(NTAPS-1-k)], are added first
// and multiplied once, so an even-length filter needs NTAPS/2 multipliers
// and an odd-length one (NTAPS+1)/2, the middle tap taking a single sample.
// With SYMMETRIC = 0 every tap has its own multiplier. Elaboration stops if
// SYMMETRIC = 1 is given taps that are not symmetric.
//
// The handshake outputs follow the meaning those names usually have:
// rdy_to_ld is high whenever a sample can be loaded (every cycle once out of
// reset, as the filter is fully parallel) and done is high for one cycle
// each time fir_result takes a new value.
//
// Timing: data_in sampled at edge n (clk_en high) contributes to fir_result
// right after that same edge, so the latency is one cycle. clk_en low freezes
// the delay line and the output. rst is synchronous, active high, and clears
// the delay line and the output.
//
// The largest possible |result| is checked at elaboration against OUT_W, so
// no saturation logic is needed; the default taps give at most 112.
module fir_filter #(
  parameter int unsigned NTAPS  = dif_pkg::REAL_TAPS,
  parameter int unsigned IN_W   = dif_pkg::IN_W,
  parameter int unsigned COEF_W = dif_pkg::COEF_W,
  parameter int unsigned OUT_W  = dif_pkg::OUT_W,
  parameter int unsigned SHIFT  = dif_pkg::OUT_SHIFT,
  parameter logic signed [COEF_W-1:0] COEFS [NTAPS] = dif_pkg::REAL_COEFS,
  parameter bit          SYMMETRIC = 1'b1
) (
  input  logic                    clock,
  input  logic                    clk_en,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  data_in,
  output logic signed [OUT_W-1:0] fir_result,
  output logic                    rdy_to_ld,
  output logic                    done
);

  localparam int unsigned ACC_W = IN_W + COEF_W + $clog2(NTAPS);

  // Worst-case output magnitude, for the width check below.
  function automatic longint unsigned worst_case_out();
    longint unsigned s = 0;
    for (int k = 0; k < NTAPS; k++)
      s += longint'((COEFS[k] < 0) ? -longint'(COEFS[k]) : longint'(COEFS[k]));
    return (s << (IN_W - 1)) >> SHIFT;
  endfunction

  function automatic bit taps_symmetric();
    for (int k = 0; k < NTAPS; k++)
      if (COEFS[k] != COEFS[NTAPS-1-k]) return 1'b0;
    return 1'b1;
  endfunction

  if (SYMMETRIC && !taps_symmetric()) begin : gen_symmetry_check
    $error("fir_filter: SYMMETRIC set but the taps are not symmetric");
  end

  if (worst_case_out() > (64'd1 << (OUT_W - 1)) - 1) begin : gen_width_check
    $error("fir_filter: coefficients can overflow an OUT_W-bit result");
  end

  localparam logic signed [ACC_W-1:0] BIAS = ACC_W'((64'd1 << SHIFT) - 1);

  localparam int unsigned NPAIR = NTAPS / 2;

  logic signed [IN_W-1:0]  dline [NTAPS-1]; // dline[0]: previous sample
  logic signed [IN_W-1:0]  samp  [NTAPS];   // samp[k] = x[n-k]
  logic signed [IN_W:0]    pair  [NPAIR];   // samp[k] + samp[NTAPS-1-k]
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] acc_q;           // acc rounded toward zero

  always_comb begin
    samp[0] = data_in;
    for (int k = 1; k < NTAPS; k++) samp[k] = dline[k-1];
    for (int k = 0; k < NPAIR; k++)
      pair[k] = (IN_W+1)'(samp[k]) + (IN_W+1)'(samp[NTAPS-1-k]);
    acc = '0;
    if (SYMMETRIC) begin
      for (int k = 0; k < NPAIR; k++) acc += ACC_W'(pair[k] * COEFS[k]);
      if (NTAPS % 2 == 1) acc += ACC_W'(samp[NPAIR] * COEFS[NPAIR]);
    end else begin
      for (int k = 0; k < NTAPS; k++) acc += ACC_W'(samp[k] * COEFS[k]);
    end
    // Arithmetic shift rounds toward minus infinity; bias negative sums so
    // the division rounds toward zero.
    if (acc < 0) acc_q = (acc + BIAS) >>> SHIFT;
    else         acc_q = acc >>> SHIFT;
  end

  // The width check above guarantees the divided sum fits in OUT_W bits.
  a_result_fits: assert property (@(posedge clock) disable iff (rst)
      acc_q == ACC_W'($signed(OUT_W'(acc_q))));

  always_ff @(posedge clock) begin
    if (rst) begin
      for (int k = 0; k < NTAPS - 1; k++) dline[k] <= '0;
      fir_result <= '0;
      done       <= 1'b0;
      rdy_to_ld  <= 1'b0;
    end else begin
      rdy_to_ld <= 1'b1;
      done      <= clk_en;
      if (clk_en) begin
        dline[0] <= data_in;
        for (int k = 1; k < NTAPS - 1; k++) dline[k] <= dline[k-1];
        fir_result <= OUT_W'(acc_q);
      end
    end
  end

endmodule
