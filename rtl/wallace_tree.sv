// wallace_tree: carry-save reduction of partial-product rows to two rows.
//
// Rows are taken three at a time into rows of 3:2 carry-save adders (a full
// adder per bit position, no carry chain): the XOR of the three rows stays
// in place, the majority moves one position left. Rows left over after the
// groups of three pass to the next layer unchanged. Layers repeat until two
// rows remain, so ROWS rows need about log_{3/2}(ROWS/2) layers of one full
// adder delay each. The final sum_row + carry_row (modulo 2^W) equals the sum
// of all input rows modulo 2^W; the two rows go to a carry-propagate adder.
//
// The reference design names a Wallace carry-save tree; the grouping of
// rows into compressors is this design's (the classic top-down grouping).
//
// Interface: rows in; sum_row, carry_row out. Purely combinational.
module wallace_tree #(
  parameter int unsigned ROWS = 3,
  parameter int unsigned W    = 8
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum_row,
  output logic [W-1:0] carry_row
);
  // Largest possible row count, used as the size of the working arrays.
  localparam int unsigned MAXR = (ROWS < 2) ? 2 : ROWS;

  always_comb begin
    logic [W-1:0] cur [MAXR];
    logic [W-1:0] nxt [MAXR];
    int unsigned  n, m, groups;
    for (int i = 0; i < MAXR; i++) cur[i] = (i < ROWS) ? rows[i] : '0;
    n = (ROWS < 2) ? 2 : ROWS;
    // Each layer removes at least one row while n > 2, so ROWS layers suffice.
    for (int lvl = 0; lvl < MAXR; lvl++) begin
      if (n > 2) begin
        groups = n / 3;
        m      = 0;
        for (int i = 0; i < MAXR; i++) nxt[i] = '0;
        for (int g = 0; g < MAXR / 3; g++) begin
          if (g < groups) begin
            nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
            nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2])
                         | (cur[3*g+1] & cur[3*g+2])) << 1;
          end
        end
        m = 2 * groups;
        for (int i = 0; i < MAXR; i++) begin
          if (i >= 3 * groups && i < n) begin
            nxt[m + i - 3 * groups] = cur[i];
          end
        end
        m = m + (n - 3 * groups);
        cur = nxt;
        n   = m;
      end
    end
    sum_row   = cur[0];
    carry_row = cur[1];
  end
endmodule
