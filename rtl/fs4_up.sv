// fs4_up: output stage, FS/4 up (or down) conversion at the 100 MHz rate.
//
// Multiplying a complex sample by exp(+/-j*pi*m/2) needs no multiplier: it is
// one of 1, j, -1, -j, i.e. an optional exchange of real and imaginary parts
// followed by an optional negation of each. The stage is built that way, with
// two multiplexers for the exchange, a register, two negators with their
// multiplexers, and an output register, as in the design:
//   cycle 1: swap = 1 exchanges real and imaginary, result registered
//   cycle 2: negreal / negimag negate each part, result registered
// The controller supplies swap one cycle ahead of the matching negreal and
// negimag, so each sample meets the bits meant for it. Whether the stage
// shifts up or down is only a matter of the bit patterns it is given.
//
// Latency: 2 cycles from real_in/imag_in to real_out/imag_out. The negators
// are W bits wide and wrap (-(-2^(W-1)) stays -2^(W-1)). The synchronous,
// active-high reset is this design's own choice.
module fs4_up #(
  parameter int unsigned W = dif_pkg::OUT_W
) (
  input  logic                clka,
  input  logic                rst,
  input  logic signed [W-1:0] real_in,
  input  logic signed [W-1:0] imag_in,
  input  logic                swap,
  input  logic                negreal,
  input  logic                negimag,
  output logic signed [W-1:0] real_out,
  output logic signed [W-1:0] imag_out
);

  logic signed [W-1:0] real_s, imag_s;

  always_ff @(posedge clka) begin
    if (rst) begin
      real_s   <= '0;
      imag_s   <= '0;
      real_out <= '0;
      imag_out <= '0;
    end else begin
      real_s   <= swap ? imag_in : real_in;
      imag_s   <= swap ? real_in : imag_in;
      real_out <= negreal ? W'(-real_s) : real_s;
      imag_out <= negimag ? W'(-imag_s) : imag_s;
    end
  end

endmodule
