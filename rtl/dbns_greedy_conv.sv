// dbns_greedy_conv -- greedy conversion of a binary integer into a DBNS map.
//
// Writes x as a sum of distinct 2-integers 2^i * 3^j, i < COLS, j < ROWS, by
// the greedy rule: take the largest 2-integer w <= x, mark its cell, continue
// with x - w, stop at 0. The result is the near-canonical map of x, usually
// with only a few active cells (at most 6 for 8-bit x on a 4 x 4 map).
//
// How it works: a remainder register starts at x. Every clock a combinational
// search compares the remainder with the constant values of all cells, picks
// the largest that does not exceed it, marks that cell and subtracts its
// value. If the chosen cell is already marked (the map is too small for x:
// on the default 4 x 4 map this first happens at x = 432), err is raised.
//
// Interface and timing: pulse start for one cycle while busy is low; x is
// loaded at the clock edge that samples start. Then each clock adds one
// digit, and one more clock raises done: done is high for one cycle after the
// (digits+1)-th edge following the one that sampled start (x = 0 gives an
// empty map after the first). map, digits and
// err are valid with done and held until the next start. rst is synchronous,
// active high.
//
// The greedy rule is the published one; the one-digit-per-clock engine, the
// map size and the handshake are this design's own.
module dbns_greedy_conv
  import dbns_map_pkg::*;
#(
  parameter int X_W  = 8,
  parameter int ROWS = 4,
  parameter int COLS = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [X_W-1:0]            x,
  output logic                      busy,
  output logic                      done,
  output logic [ROWS-1:0][COLS-1:0] map,
  output logic [$clog2(ROWS*COLS+1)-1:0] digits,
  output logic                      err
);

  logic [X_W-1:0] rem, best_v;
  logic           found;
  int             best_j, best_i;
  logic           running;

  // Largest cell value not above the remainder.
  always_comb begin
    found  = 1'b0;
    best_v = '0;
    best_j = 0;
    best_i = 0;
    for (int j = 0; j < ROWS; j++)
      for (int i = 0; i < COLS; i++)
        if (cell_value(j, i) <= longint'(rem) && X_W'(cell_value(j, i)) >= best_v) begin
          found  = 1'b1;
          best_v = X_W'(cell_value(j, i));
          best_j = j;
          best_i = i;
        end
  end

  assign busy = running;

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      rem     <= '0;
      map     <= '0;
      digits  <= '0;
      err     <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          rem     <= x;
          map     <= '0;
          digits  <= '0;
          err     <= 1'b0;
        end
      end else if (rem == '0) begin
        running <= 1'b0;
        done    <= 1'b1;
      end else if (!found || map[best_j][best_i]) begin
        err     <= 1'b1;
        running <= 1'b0;
        done    <= 1'b1;
      end else begin
        map[best_j][best_i] <= 1'b1;
        rem                 <= rem - best_v;
        digits              <= digits + 1'b1;
      end
    end
  end

endmodule
