// dbns_top -- the double-base FIR filter and the DBNS map arithmetic units, side by side.
//
// Two independent parts share this top; each keeps its own ports:
//   * fir_*  : dbns_fir, the 8-tap FIR filter whose taps multiply by adding
//              double-base exponents (index calculus). One sample per clock,
//              latency 2, output in fixed point with 15 fraction bits.
//   * conv_* : dbns_greedy_conv, greedy conversion of an 8-bit integer into a
//              4 x 4 DBNS map (cell [j][i] = 2^i * 3^j).
//   * add_*  : dbns_map_add, sum of two 4 x 4 maps into a reduced 5 x 5 map.
//   * mul_*  : dbns_map_mul, product of two 4 x 4 maps into a reduced 8 x 8 map.
//   * calc_* : dbnr_index_calc, product or quotient of two double-base digits
//              by index calculus, combinational.
// The map units use a start/busy/done handshake; see each module for timing.
// All parts share clk and the synchronous, active-high rst.
//
// The filter is the published design; the map units and the index-calculus
// unit implement the published DBNS conversion, map arithmetic and index
// calculus (including division), which the filter itself does not use.
// Grouping them in one top is this design's own arrangement.
module dbns_top
  import dbns_pkg::*;
#(
  parameter int ROWS = 4,
  parameter int COLS = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  // FIR filter
  input  logic signed [7:0]             fir_x,
  output logic signed [35:0]            fir_y,
  output logic signed [20:0]            fir_y_int,
  output logic                          fir_ovf,
  // Greedy converter
  input  logic                          conv_start,
  input  logic [7:0]                    conv_x,
  output logic                          conv_busy,
  output logic                          conv_done,
  output logic [ROWS-1:0][COLS-1:0]     conv_map,
  output logic [$clog2(ROWS*COLS+1)-1:0] conv_digits,
  output logic                          conv_err,
  // Map adder
  input  logic                          add_start,
  input  logic [ROWS-1:0][COLS-1:0]     add_a,
  input  logic [ROWS-1:0][COLS-1:0]     add_b,
  output logic                          add_busy,
  output logic                          add_done,
  output logic [ROWS:0][COLS:0]         add_sum,
  output logic                          add_ovf,
  // Map multiplier
  input  logic                          mul_start,
  input  logic [ROWS-1:0][COLS-1:0]     mul_a,
  input  logic [ROWS-1:0][COLS-1:0]     mul_b,
  output logic                          mul_busy,
  output logic                          mul_done,
  output logic [2*ROWS-1:0][2*COLS-1:0] mul_prod,
  output logic                          mul_ovf,
  // Index-calculus multiply / divide
  input  dbnr_t                         calc_a,
  input  dbnr_t                         calc_b,
  input  logic                          calc_div,
  output dbnr_t                         calc_r,
  output logic                          calc_ovf,
  output logic                          calc_div0
);

  dbns_fir u_fir (
    .clk   (clk),
    .rst   (rst),
    .x     (fir_x),
    .y     (fir_y),
    .y_int (fir_y_int),
    .ovf   (fir_ovf)
  );

  dbns_greedy_conv #(
    .X_W  (8),
    .ROWS (ROWS),
    .COLS (COLS)
  ) u_conv (
    .clk    (clk),
    .rst    (rst),
    .start  (conv_start),
    .x      (conv_x),
    .busy   (conv_busy),
    .done   (conv_done),
    .map    (conv_map),
    .digits (conv_digits),
    .err    (conv_err)
  );

  dbns_map_add #(
    .ROWS (ROWS),
    .COLS (COLS)
  ) u_add (
    .clk   (clk),
    .rst   (rst),
    .start (add_start),
    .a     (add_a),
    .b     (add_b),
    .busy  (add_busy),
    .done  (add_done),
    .sum   (add_sum),
    .ovf   (add_ovf)
  );

  dbns_map_mul #(
    .ROWS (ROWS),
    .COLS (COLS)
  ) u_mul (
    .clk   (clk),
    .rst   (rst),
    .start (mul_start),
    .a     (mul_a),
    .b     (mul_b),
    .busy  (mul_busy),
    .done  (mul_done),
    .prod  (mul_prod),
    .ovf   (mul_ovf)
  );

  dbnr_index_calc u_calc (
    .a    (calc_a),
    .b    (calc_b),
    .div  (calc_div),
    .r    (calc_r),
    .ovf  (calc_ovf),
    .div0 (calc_div0)
  );

endmodule
