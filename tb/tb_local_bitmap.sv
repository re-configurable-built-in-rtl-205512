// tb_local_bitmap -- self-checking test of local_bitmap (4 x 64).
// Random insert / drop / clear-column / clear operations are applied to the
// bitmap and to a reference model kept in this bench (a list of
// {row, column-set} entries, lowest free slot first); after every operation
// the valid bits, rows, column vectors and can_insert are compared. Rows are
// drawn from a small range so that hits, new entries and a full table all
// happen often; the bench counts each case and fails if one never occurs.
module tb_local_bitmap;
  import rebisr_pkg::*;

  logic clk = 1'b0, rst;
  logic clear, ins_en, drop_en, clrcol_en;
  logic [ADDR_W-1:0] ins_row;
  logic [5:0] ins_col, clrcol_col;
  logic [1:0] drop_idx;
  logic [3:0] valid;
  logic [ADDR_W-1:0] rows [4];
  logic [63:0] bits [4];
  logic can_insert;

  local_bitmap #(.ENTRIES(4), .COLS(64)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit        m_valid [4];
  int        m_row   [4];
  bit [63:0] m_bits  [4];
  int n_hit = 0, n_new = 0, n_full = 0, n_drop = 0, n_empty_by_col = 0;

  function automatic bit m_can(input int r);
    for (int e = 0; e < 4; e++) if (m_valid[e] && m_row[e] == r) return 1;
    for (int e = 0; e < 4; e++) if (!m_valid[e]) return 1;
    return 0;
  endfunction

  task automatic compare(input string op);
    for (int e = 0; e < 4; e++) begin
      check(valid[e] == m_valid[e], $sformatf("%s: valid[%0d]", op, e));
      if (m_valid[e]) begin
        check(int'(rows[e]) == m_row[e], $sformatf("%s: row[%0d]", op, e));
        check(bits[e] == m_bits[e], $sformatf("%s: bits[%0d] %h want %h", op, e, bits[e], m_bits[e]));
      end
    end
  endtask

  initial begin
    int r, c, op, e;
    bit done;
    clear = 0; ins_en = 0; drop_en = 0; clrcol_en = 0;
    ins_row = 0; ins_col = 0; clrcol_col = 0; drop_idx = 0;
    for (int i = 0; i < 4; i++) begin m_valid[i] = 0; m_row[i] = 0; m_bits[i] = 0; end
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    compare("reset");
    for (int it = 0; it < 3000; it++) begin
      op = $urandom_range(0, 99);
      r = $urandom_range(0, 6) * 37;
      c = $urandom_range(0, 7) * 9 % 64;
      ins_row = ADDR_W'(r);
      #1;
      check(can_insert == m_can(r), "can_insert");
      if (op < 60) begin
        ins_en = 1; ins_col = 6'(c);
        done = 0;
        for (e = 0; e < 4; e++) if (!done && m_valid[e] && m_row[e] == r) begin
          m_bits[e][c] = 1; done = 1; n_hit++;
        end
        for (e = 0; e < 4; e++) if (!done && !m_valid[e]) begin
          m_valid[e] = 1; m_row[e] = r; m_bits[e] = 64'd1 << c; done = 1; n_new++;
        end
        if (!done) n_full++;
      end else if (op < 75) begin
        drop_en = 1; drop_idx = 2'($urandom_range(0, 3));
        if (m_valid[drop_idx]) n_drop++;
        m_valid[drop_idx] = 0; m_bits[drop_idx] = 0;
      end else if (op < 98) begin
        clrcol_en = 1; clrcol_col = 6'(c);
        for (e = 0; e < 4; e++) begin
          m_bits[e][c] = 0;
          if (m_valid[e] && m_bits[e] == 0) begin m_valid[e] = 0; n_empty_by_col++; end
          if (m_bits[e] == 0) m_valid[e] = 0;
        end
      end else begin
        clear = 1;
        for (e = 0; e < 4; e++) begin m_valid[e] = 0; m_bits[e] = 0; end
      end
      @(negedge clk);
      ins_en = 0; drop_en = 0; clrcol_en = 0; clear = 0;
      compare($sformatf("op %0d", it));
    end
    check(n_hit > 0 && n_new > 0 && n_full > 0 && n_drop > 0 && n_empty_by_col > 0,
          $sformatf("cases hit=%0d new=%0d full=%0d drop=%0d freed=%0d",
                    n_hit, n_new, n_full, n_drop, n_empty_by_col));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
