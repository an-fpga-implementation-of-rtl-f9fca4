// fs4_down: input registers and FS/4 down conversion of the two demultiplexed
// ADC streams.
//
// The ADC delivers its 200 MS/s samples as two 100 MS/s buses. busa carries
// the even samples x[2m]; busb carries the sample taken just before it,
// x[2m-1]; both change together once per clka cycle. Mixing x[n] with
// exp(-j*pi*n/2) leaves the even samples purely real and the odd samples
// purely imaginary, each with a sign that alternates from one output cycle
// to the next. The stage therefore needs only two negators and two
// multiplexers, both selected by neginput from the controller:
//   neginput = 1: real = +busa, imag = -busb
//   neginput = 0: real = -busa, imag = +busb
//
// Registers, as in the design: busa passes two input registers and busb one
// before the multiplexers, and both results are registered. So busa reaches
// real_d three cycles after it is sampled and busb reaches imag_d two cycles
// after; the filter stage adds the missing register on the imaginary side.
// Because busa meets the multiplexer one cycle after busb, and neginput
// alternates each cycle, the two samples of one bus word get the same sign,
// which is what exp(-j*pi*n/2) gives for the pair (x[2m-1], x[2m]).
//
// The negators are IN_W bits wide and wrap: -(-128) stays -128. The
// synchronous reset clearing all registers is this design's own choice.
module fs4_down #(
  parameter int unsigned W = dif_pkg::IN_W
) (
  input  logic                clka,
  input  logic                rst,
  input  logic signed [W-1:0] busa,
  input  logic signed [W-1:0] busb,
  input  logic                neginput,
  output logic signed [W-1:0] real_d,
  output logic signed [W-1:0] imag_d
);

  logic signed [W-1:0] a1, a2, b1;
  logic signed [W-1:0] real_mux, imag_mux;

  always_comb begin
    real_mux = neginput ? a2 : W'(-a2);
    imag_mux = neginput ? W'(-b1) : b1;
  end

  always_ff @(posedge clka) begin
    if (rst) begin
      a1     <= '0;
      a2     <= '0;
      b1     <= '0;
      real_d <= '0;
      imag_d <= '0;
    end else begin
      a1     <= busa;
      a2     <= a1;
      b1     <= busb;
      real_d <= real_mux;
      imag_d <= imag_mux;
    end
  end

endmodule
