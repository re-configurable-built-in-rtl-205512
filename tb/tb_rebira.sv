// tb_rebira -- self-checking test of the ReBIRA.
//
// The bench plays the BIST: it presents a list of faults one per cycle,
// honouring pause_bist, then raises bist_done. It records every repair
// register write and checks, per scenario:
//   A  4 faults: two in row 14, two in column 18, spares 2/2 -> exactly
//      "row 14" and "column 18" (range checking picks row for the row with
//      two faults and column for the column with two faults);
//   B  one fault, no spares -> irreparable;
//   C  6 faults in 6 different rows and columns, spares 3/3 -> the bitmap
//      fills, pause_bist must rise, and every fault must end up covered;
//   D  7 faults in different rows and columns, spares 3/3 -> irreparable;
//   E  3 faults in column 5 and one in row 40, spares 1/1 -> column 5, row 40;
//   F  faults repeated (as R0 and R1 both report them) and one in a row that
//      is already replaced -> no extra allocations;
// plus, in all scenarios: indices of the spares are 0,1,2.. in order and
// never exceed the spare counts, and rebira_done rises.
module tb_rebira;
  import rebisr_pkg::*;

  logic clk = 1'b0, rst;
  logic start, bist_done, fault_present;
  logic [3:0] n_spare_rows, n_spare_cols;
  logic [ADDR_W-1:0] fault_row;
  logic [COL_W-1:0] fault_col;
  logic pause_bist, irreparable, rep_reg_wr, rebira_done;
  logic [REP_DATA_W-1:0] rep_reg_data;
  rep_addr_t rep_reg_addr;

  rebira dut (.*);

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

  int rep_rows [$], rep_cols [$];
  int pauses;
  always_ff @(posedge clk) begin
    if (!rst && rep_reg_wr) begin
      if (rep_reg_addr.is_col) begin
        check(int'(rep_reg_addr.idx) == rep_cols.size(), "column spare index in order");
        rep_cols.push_back(int'(rep_reg_data));
      end else begin
        check(int'(rep_reg_addr.idx) == rep_rows.size(), "row spare index in order");
        rep_rows.push_back(int'(rep_reg_data));
      end
    end
    if (pause_bist) pauses <= pauses + 1;
  end

  int f_row [$], f_col [$];

  task automatic run(input int nsr, input int nsc);
    int i = 0;
    rep_rows.delete(); rep_cols.delete(); pauses = 0;
    @(negedge clk);
    n_spare_rows = 4'(nsr); n_spare_cols = 4'(nsc); start = 1; bist_done = 0;
    @(negedge clk);
    start = 0;
    while (i < f_row.size()) begin
      fault_present = 1; fault_row = ADDR_W'(f_row[i]); fault_col = COL_W'(f_col[i]);
      #1;
      if (!pause_bist) i++;
      @(negedge clk);
    end
    fault_present = 0;
    repeat (2) @(negedge clk);
    bist_done = 1;
    for (int t = 0; t < 50 && !rebira_done; t++) @(negedge clk);
    check(rebira_done, "rebira_done");
    check(rep_rows.size() <= nsr && rep_cols.size() <= nsc, "spare counts respected");
    bist_done = 0;
  endtask

  function automatic bit covered_all();
    for (int i = 0; i < f_row.size(); i++) begin
      bit ok = 0;
      foreach (rep_rows[k]) if (rep_rows[k] == f_row[i]) ok = 1;
      foreach (rep_cols[k]) if (rep_cols[k] == f_col[i]) ok = 1;
      if (!ok) return 0;
    end
    return 1;
  endfunction

  task automatic add(input int r, input int c);
    f_row.push_back(r); f_col.push_back(c);
  endtask

  initial begin
    start = 0; bist_done = 0; fault_present = 0; fault_row = 0; fault_col = 0;
    n_spare_rows = 0; n_spare_cols = 0;
    rst = 1; repeat (2) @(negedge clk); rst = 0;

    // A
    f_row.delete(); f_col.delete();
    add(14, 28); add(14, 29); add(7, 18); add(6, 18);
    run(2, 2);
    check(!irreparable, "A repairable");
    check(rep_rows.size() == 1 && rep_rows[0] == 14, "A row 14 replaced");
    check(rep_cols.size() == 1 && rep_cols[0] == 18, "A column 18 replaced");
    check(pauses == 0, $sformatf("A never paused: the bitmap did not fill (%0d)", pauses));

    // B
    f_row.delete(); f_col.delete();
    add(243, 31);
    run(0, 0);
    check(irreparable, "B irreparable with no spares");
    check(rep_rows.size() == 0 && rep_cols.size() == 0, "B nothing written");

    // C
    f_row.delete(); f_col.delete();
    for (int k = 0; k < 6; k++) add(10 + 7 * k, 3 + 5 * k);
    run(3, 3);
    check(!irreparable, "C repairable");
    check(covered_all(), "C all faults covered");
    check(pauses > 0, "C bitmap full paused the BIST");

    // D
    f_row.delete(); f_col.delete();
    for (int k = 0; k < 7; k++) add(100 + k, 10 + k);
    run(3, 3);
    check(irreparable, "D irreparable");

    // E
    f_row.delete(); f_col.delete();
    add(1, 5); add(2, 5); add(3, 5); add(40, 60);
    run(1, 1);
    check(!irreparable, "E repairable");
    check(rep_cols.size() == 1 && rep_cols[0] == 5, "E column 5 replaced");
    check(rep_rows.size() == 1 && rep_rows[0] == 40, "E row 40 replaced");

    // F: repeated reports, and a fault in a row replaced mid-test
    f_row.delete(); f_col.delete();
    for (int k = 0; k < 4; k++) begin add(20 + k, 2); add(20 + k, 2); end  // 4 rows, column 2
    add(50, 9); add(50, 9);   // bitmap full -> one allocation
    add(20, 2);               // column 2 already replaced by then
    run(2, 2);
    check(!irreparable, "F repairable");
    check(covered_all(), "F all faults covered");
    check(rep_cols.size() == 1 && rep_cols[0] == 2, "F column 2 replaced once");
    check(rep_rows.size() == 1 && rep_rows[0] == 50, "F row 50 replaced");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
