// dbns_map_add -- adds two DBNS maps by overlaying them and reducing the result.
//
// Operands a and b are ROWS x COLS maps: bit [j][i] set means the cell
// 2^i * 3^j is active, and the number is the sum of active cells. The sum is
// formed the way the published method describes: the two maps are laid over
// each other (cells counted, so an overlap gives a count of 2), then the
// reduction rules and the carry for overlapping cells (see dbns_reduce_step)
// are applied one per clock until none applies. The result map has one extra
// row and one extra column, the published remedy for reductions that run
// past the operands' edge. If a carry would leave even the enlarged map, ovf
// is raised and sum is not valid.
//
// Interface and timing: pulse start for one cycle while busy is low; a and b
// are sampled then. busy stays high while reducing, one rewrite per clock;
// when no rewrite is left, done pulses for one cycle with sum and ovf valid,
// and they hold until the next start. An addition takes one cycle to load,
// at most one per unit of count (2*ROWS*COLS) to reduce, and one to finish.
// rst (synchronous, active high) returns to idle and clears the outputs.
//
// Overlay, rules, carry and the extra row and column follow the published
// method; the cycle-by-cycle engine and the handshake are this design's own.
module dbns_map_add
  import dbns_map_pkg::*;
#(
  parameter int ROWS = 4,
  parameter int COLS = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [ROWS-1:0][COLS-1:0] a,
  input  logic [ROWS-1:0][COLS-1:0] b,
  output logic                      busy,
  output logic                      done,
  output logic [ROWS:0][COLS:0]     sum,
  output logic                      ovf
);

  localparam int GR = ROWS + 1;
  localparam int GC = COLS + 1;

  typedef enum logic {S_IDLE, S_REDUCE} state_t;

  state_t                     state;
  logic [GR-1:0][GC-1:0][1:0] grid, grid_nxt, overlay;
  rule_t                      fired;

  dbns_reduce_step #(.GR(GR), .GC(GC)) u_step (
    .cur   (grid),
    .nxt   (grid_nxt),
    .fired (fired)
  );

  always_comb begin
    overlay = '0;
    for (int j = 0; j < ROWS; j++)
      for (int i = 0; i < COLS; i++)
        overlay[j][i] = 2'(a[j][i]) + 2'(b[j][i]);
  end

  assign busy = (state == S_REDUCE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      grid  <= '0;
      done  <= 1'b0;
      sum   <= '0;
      ovf   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            grid  <= overlay;
            state <= S_REDUCE;
          end
        end
        S_REDUCE: begin
          if (fired == RULE_NONE || fired == RULE_OVF) begin
            for (int j = 0; j < GR; j++)
              for (int i = 0; i < GC; i++)
                sum[j][i] <= grid[j][i][0];
            ovf   <= (fired == RULE_OVF);
            done  <= 1'b1;
            state <= S_IDLE;
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
