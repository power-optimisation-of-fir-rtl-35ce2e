// dbns_map_mul -- multiplies two DBNS maps cell by cell and reduces the product.
//
// Operands a and b are ROWS x COLS maps (bit [j][i] is the cell 2^i * 3^j).
// The product of two cells is found by adding their indices:
// 2^i1 3^j1 * 2^i2 3^j2 = 2^(i1+i2) 3^(j1+j2). Following the published
// method, every active cell of a is multiplied with every active cell of b
// and the resulting cells are marked; where marked cells land on each other
// the surplus is moved one cell to the right in the same row (a carry), and
// the reduction rules simplify the map (both in dbns_reduce_step).
//
// How it works: the product map has 2*ROWS x 2*COLS cells, enough for every
// index sum plus one extra row and column. For each active cell (j, i) of a,
// taken one per pass, b shifted by j rows and i columns is laid over the
// running product (cells counted, so an overlap gives 2), and then one
// rewrite per clock is applied until none is left. If a carry would leave the
// map, ovf is raised and the product is not valid.
//
// Interface and timing: pulse start for one cycle while busy is low; a and b
// are sampled then. done pulses for one cycle when the product and ovf are
// valid; they hold until the next start. One pass takes one cycle to lay b
// over the product plus one per rewrite. rst is synchronous and active high.
//
// The cell-by-cell method, the carry and the rules follow the published
// description; the pass order, the product map size and the handshake are
// this design's own.
module dbns_map_mul
  import dbns_map_pkg::*;
#(
  parameter int ROWS = 4,
  parameter int COLS = 4
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start,
  input  logic [ROWS-1:0][COLS-1:0]     a,
  input  logic [ROWS-1:0][COLS-1:0]     b,
  output logic                          busy,
  output logic                          done,
  output logic [2*ROWS-1:0][2*COLS-1:0] prod,
  output logic                          ovf
);

  localparam int GR = 2 * ROWS;
  localparam int GC = 2 * COLS;

  typedef enum logic [1:0] {S_IDLE, S_ADD, S_REDUCE} state_t;

  state_t                     state;
  logic [ROWS-1:0][COLS-1:0]  pending, b_reg, pending_nxt;
  logic [GR-1:0][GC-1:0][1:0] grid, grid_nxt, laid;
  rule_t                      fired;
  logic                       any;
  int                         sel_j, sel_i;

  dbns_reduce_step #(.GR(GR), .GC(GC)) u_step (
    .cur   (grid),
    .nxt   (grid_nxt),
    .fired (fired)
  );

  // First active cell of the operand still to be multiplied (row-major).
  always_comb begin
    any   = 1'b0;
    sel_j = 0;
    sel_i = 0;
    for (int j = 0; j < ROWS; j++)
      for (int i = 0; i < COLS; i++)
        if (!any && pending[j][i]) begin
          any   = 1'b1;
          sel_j = j;
          sel_i = i;
        end
    pending_nxt = pending;
    pending_nxt[sel_j][sel_i] = 1'b0;
  end

  // Running product with b, shifted by the selected cell, laid over it.
  always_comb begin
    laid = grid;
    for (int j = 0; j < GR; j++)
      for (int i = 0; i < GC; i++)
        if (j >= sel_j && j - sel_j < ROWS && i >= sel_i && i - sel_i < COLS)
          laid[j][i] = grid[j][i] + 2'(b_reg[j-sel_j][i-sel_i]);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      grid    <= '0;
      pending <= '0;
      b_reg   <= '0;
      done    <= 1'b0;
      prod    <= '0;
      ovf     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            grid    <= '0;
            pending <= a;
            b_reg   <= b;
            state   <= S_ADD;
          end
        end
        S_ADD: begin
          if (!any) begin
            for (int j = 0; j < GR; j++)
              for (int i = 0; i < GC; i++)
                prod[j][i] <= grid[j][i][0];
            ovf   <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            grid    <= laid;
            pending <= pending_nxt;
            state   <= S_REDUCE;
          end
        end
        S_REDUCE: begin
          if (fired == RULE_OVF) begin
            prod  <= '0;
            ovf   <= 1'b1;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (fired == RULE_NONE) begin
            state <= S_ADD;
          end else begin
            grid <= grid_nxt;
            // A carry must never push a count past 3 (it would wrap to 0).
            for (int j = 0; j < GR; j++)
              for (int i = 0; i < GC; i++)
                assert (!(fired == RULE_CARRY && grid[j][i] == 2'd3 && grid_nxt[j][i] == 2'd0))
                  else $error("count overflow at row %0d column %0d", j, i);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
