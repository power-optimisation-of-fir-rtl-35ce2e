// dbns_reduce_step -- one rewrite of a DBNS map under the reduction rules.
//
// Takes a map of GR rows (powers of 3) by GC columns (powers of 2) whose cells
// hold counts 0..3, applies at most one value-preserving rewrite and returns
// the new map, which rewrite it was (rule_t, see dbns_map_pkg) and its cell.
// Repeating the step until it reports RULE_NONE reduces the map: every cell
// then holds 0 or 1 and no rule applies anywhere its result cell fits.
//
// Priority, highest first; within one kind the first cell in row-major order
// (row 0 first, lowest column first) wins:
//   1. carry: a cell with count >= 2 gives up 2 and adds 1 to the cell to its
//      right (2 * 2^i 3^j = 2^(i+1) 3^j). With no column to its right the
//      value cannot be held and RULE_OVF is reported, map unchanged.
//   2. rule III, 3. rule I, 4. rule II, applied only while every count is 0
//      or 1, and only where the resulting cell lies inside the map.
// Every rewrite removes at least one unit of count, so repetition ends after
// at most the map's total count steps. Carries are taken lowest column first,
// so a count never exceeds 3 (asserted by the units that use the step, where
// the map is known to be valid, i.e. after reset).
//
// Combinational. The rules and the carry are the published ones; the
// priority order, the counts and the boundary treatment are this design's.
module dbns_reduce_step
  import dbns_map_pkg::*;
#(
  parameter int GR = 5,
  parameter int GC = 5
) (
  input  logic [GR-1:0][GC-1:0][1:0] cur,
  output logic [GR-1:0][GC-1:0][1:0] nxt,
  output rule_t                      fired
);

  logic carry_found;

  always_comb begin
    nxt         = cur;
    fired       = RULE_NONE;
    carry_found = 1'b0;
    // 1. Carries (super-imposed cells).
    for (int j = 0; j < GR; j++) begin
      for (int i = 0; i < GC; i++) begin
        if (!carry_found && cur[j][i] >= 2'd2) begin
          carry_found = 1'b1;
          if (i + 1 < GC) begin
            // A carry into a cell already at 3 would wrap; the units
            // that use this step check that it never happens.
            nxt[j][i]   = cur[j][i] - 2'd2;
            nxt[j][i+1] = cur[j][i+1] + 2'd1;
            fired       = RULE_CARRY;
          end else begin
            fired = RULE_OVF;
          end
        end
      end
    end
    // 2. Rule III: 1 + 2 + 3 = 6 (three cells in an L to one diagonal cell).
    for (int j = 0; j + 1 < GR; j++) begin
      for (int i = 0; i + 1 < GC; i++) begin
        if (!carry_found && fired == RULE_NONE &&
            cur[j][i] != 0 && cur[j][i+1] != 0 && cur[j+1][i] != 0) begin
          nxt[j][i]     = 2'd0;
          nxt[j][i+1]   = 2'd0;
          nxt[j+1][i]   = 2'd0;
          nxt[j+1][i+1] = cur[j+1][i+1] + 2'd1;
          fired         = RULE_III;
        end
      end
    end
    // 3. Rule I: 1 + 2 = 3 (two cells side by side in a row).
    for (int j = 0; j + 1 < GR; j++) begin
      for (int i = 0; i + 1 < GC; i++) begin
        if (!carry_found && fired == RULE_NONE && cur[j][i] != 0 && cur[j][i+1] != 0) begin
          nxt[j][i]   = 2'd0;
          nxt[j][i+1] = 2'd0;
          nxt[j+1][i] = cur[j+1][i] + 2'd1;
          fired       = RULE_I;
        end
      end
    end
    // 4. Rule II: 1 + 3 = 4 (two cells one above the other in a column).
    for (int j = 0; j + 1 < GR; j++) begin
      for (int i = 0; i + 2 < GC; i++) begin
        if (!carry_found && fired == RULE_NONE && cur[j][i] != 0 && cur[j+1][i] != 0) begin
          nxt[j][i]   = 2'd0;
          nxt[j+1][i] = 2'd0;
          nxt[j][i+2] = cur[j][i+2] + 2'd1;
          fired       = RULE_II;
        end
      end
    end
  end

endmodule
