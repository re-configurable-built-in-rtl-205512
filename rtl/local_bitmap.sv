// local_bitmap -- small fault table of the repair analyser: ENTRIES entries,
// each holding one faulty row address and a COLS-bit vector of the faulty
// columns found in that row (4 x 64 by default).
//
// Operations, all taking effect at the rising clock edge, at most one per
// cycle in the priority order listed:
//   clear      empties the table;
//   ins_en     records fault (ins_row, ins_col): it sets the column bit of the
//              entry already holding ins_row, or else opens the lowest free
//              entry; it is ignored when neither exists (can_insert low);
//   drop_en    frees entry drop_idx (its row has been replaced by a spare row);
//   clrcol_en  clears column clrcol_col in every entry (the column has been
//              replaced by a spare column) and frees entries left empty.
// The contents are visible on valid / rows / bits for the analysis logic.
// can_insert is combinational in ins_row. The entry layout is this design's
// choice; the table size is the scheme's.
module local_bitmap
  import rebisr_pkg::*;
#(
  parameter int unsigned ENTRIES = BM_ENTRIES,
  parameter int unsigned COLS    = MAX_WIDTH
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        clear,
  input  logic                        ins_en,
  input  logic [ADDR_W-1:0]           ins_row,
  input  logic [$clog2(COLS)-1:0]     ins_col,
  input  logic                        drop_en,
  input  logic [$clog2(ENTRIES)-1:0]  drop_idx,
  input  logic                        clrcol_en,
  input  logic [$clog2(COLS)-1:0]     clrcol_col,
  output logic [ENTRIES-1:0]          valid,
  output logic [ADDR_W-1:0]           rows [ENTRIES],
  output logic [COLS-1:0]             bits [ENTRIES],
  output logic                        can_insert
);

  logic [ENTRIES-1:0] valid_q;
  logic [ADDR_W-1:0]  row_q  [ENTRIES];
  logic [COLS-1:0]    bits_q [ENTRIES];

  // Where would a fault in ins_row go?
  logic                        hit, free;
  logic [$clog2(ENTRIES)-1:0]  hit_idx, free_idx;
  always_comb begin
    hit = 1'b0;  hit_idx  = '0;
    free = 1'b0; free_idx = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (valid_q[e] && row_q[e] == ins_row) begin
        hit = 1'b1; hit_idx = ($clog2(ENTRIES))'(e);
      end
      if (!valid_q[e]) begin
        free = 1'b1; free_idx = ($clog2(ENTRIES))'(e);
      end
    end
  end
  assign can_insert = hit || free;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      valid_q <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        row_q[e]  <= '0;
        bits_q[e] <= '0;
      end
    end else if (ins_en) begin
      if (hit) begin
        bits_q[hit_idx][ins_col] <= 1'b1;
      end else if (free) begin
        valid_q[free_idx] <= 1'b1;
        row_q[free_idx]   <= ins_row;
        bits_q[free_idx]  <= COLS'(1) << ins_col;
      end
    end else if (drop_en) begin
      valid_q[drop_idx] <= 1'b0;
      bits_q[drop_idx]  <= '0;
    end else if (clrcol_en) begin
      for (int e = 0; e < ENTRIES; e++) begin
        bits_q[e][clrcol_col] <= 1'b0;
        if ((bits_q[e] & ~(COLS'(1) << clrcol_col)) == '0) valid_q[e] <= 1'b0;
      end
    end
  end

  assign valid = valid_q;
  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      rows[e] = row_q[e];
      bits[e] = bits_q[e];
    end
  end

endmodule
