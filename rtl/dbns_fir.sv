// dbns_fir -- 8-tap FIR filter whose multipliers are double-base index-calculus cells.
//
// y[n] = sum_{k=0}^{TAPS-1} COEFFS[k] * x[n-k], with every product formed by
// an Inner Product Step Processor (ipsp) instead of a multiplier.
//
// How it works:
//   * One data-conversion ROM (dbnr_conv_rom) turns each input sample into a
//     double-base digit s * 2^b * 3^t. A register (the "data in" stage) holds
//     that digit and broadcasts it to all taps.
//   * The coefficients are fixed. They are converted to double-base digits
//     when the design is elaborated, with the same function that fills the ROM.
//   * The taps form a chain (transposed direct form): tap k adds
//     COEFFS[k] * x to the partial sum handed on by tap k+1 and registers it.
//     The last tap starts from 0; tap 0's register is the output.
//   * Each product is approximate: the double-base digits are the closest
//     ones with a ternary exponent in [-32, 31], and 3^t is held with a 16-bit
//     mantissa. y is the exact sum of these approximate products, truncated
//     to FRAC_W (15) fraction bits per product.
//
// Interface: x is a two's-complement DATA_W-bit sample, taken at every rising
// edge of clk. y is the output in two's-complement fixed point with FRAC_W
// fraction bits; y_int is y rounded to the nearest integer (halves rounded
// up). ovf is high while any tap's product exceeds the barrel shifter's
// range, which 8-bit operands cannot cause.
// Timing: one sample per clock; the filter output for the sample applied
// before edge i is on y after edge i+1 (latency 2 clocks). rst is synchronous
// and active high; it clears the data register and every tap.
//
// Taps, data and coefficient widths, the single conversion ROM and the chain
// of IPSPs sharing one broadcast input follow the published design. The
// coefficient values (which it does not list), the chain's direction, the
// registers and the number formats are this design's own choices.
module dbns_fir
  import dbns_pkg::*;
#(
  parameter int TAPS   = 8,
  parameter int DATA_W = 8,
  parameter int COEF_W = 8,
  parameter logic signed [COEF_W-1:0] COEFFS [TAPS] = '{1, 2, 3, 4, 4, 3, 2, 1},
  localparam int ACC_W = MANT_W + SHIFT_MAX + 1 + $clog2(TAPS),
  localparam int OUT_W = ACC_W - FRAC_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [ACC_W-1:0]  y,
  output logic signed [OUT_W-1:0]  y_int,
  output logic                     ovf
);

  typedef logic [$bits(dbnr_t)-1:0] coef_table_t [TAPS];

  function automatic coef_table_t convert_coeffs();
    coef_table_t tab;
    for (int k = 0; k < TAPS; k++)
      tab[k] = to_dbnr(int'(COEFFS[k]));
    return tab;
  endfunction

  localparam coef_table_t CDBNR = convert_coeffs();

  dbnr_t                   d_conv;
  dbnr_t                   d_reg;
  logic signed [ACC_W-1:0] a [TAPS+1];
  logic [TAPS-1:0]         tap_ovf;

  dbnr_conv_rom #(
    .DATA_W (DATA_W)
  ) u_conv (
    .x (x),
    .d (d_conv)
  );

  // Data-in register: the converted sample broadcast to every tap.
  always_ff @(posedge clk) begin
    if (rst)
      d_reg <= '{zero: 1'b1, default: '0};
    else
      d_reg <= d_conv;
  end

  assign a[TAPS] = '0;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    ipsp #(
      .ACC_W (ACC_W)
    ) u_ipsp (
      .clk   (clk),
      .rst   (rst),
      .d     (d_reg),
      .c     (dbnr_t'(CDBNR[k])),
      .a_in  (a[k+1]),
      .a_out (a[k]),
      .ovf   (tap_ovf[k])
    );
  end

  assign y     = a[0];
  assign y_int = OUT_W'((y + ACC_W'(2 ** (FRAC_W - 1))) >>> FRAC_W);
  assign ovf   = |tap_ovf;

endmodule
