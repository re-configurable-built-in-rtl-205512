// tb_rebisr_fsm -- self-checking test of the ReBISR controller.
//
// The bench stands in for the details table, the BIST and the ReBIRA: the
// BIST model raises bist_done some cycles after each bist_start, the ReBIRA
// model raises rebira_done after each rebira_start and reports RAM 1 as
// irreparable, and in the verification pass of RAM 2 the BIST model reports
// one fault. start is pulsed before the table is full. Checks: nothing starts
// until the table is full; the RAMs are visited in order 0..3; each RAM gets
// its own table entry on cfg; each RAM gets one ReBIRA start and two BIST
// starts, except RAM 1 (one BIST start, no verification); the final map is
// 4'b0110; done rises and holds, test_mode falls.
module tb_rebisr_fsm;
  import rebisr_pkg::*;

  logic clk = 1'b0, rst;
  logic start, table_full;
  logic [1:0] tbl_idx, ram_no;
  ram_cfg_t tbl_cfg, cfg;
  logic bist_start, rebira_start, bist_done, rebira_done, rebira_irreparable, fault_present;
  logic test_mode, irrepairable, done;
  logic [3:0] irrepairable_map;

  rebisr_fsm dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ram_cfg_t entry(input int i);
    return ram_cfg_t'(16'h1234 + 16'(i) * 16'h1111);
  endfunction
  assign tbl_cfg = entry(int'(tbl_idx));

  // BIST and ReBIRA stand-ins
  int bist_cnt, rebira_cnt;
  int n_bist_start [4], n_rebira_start [4];
  int order [$];
  bit verifying;
  always_ff @(posedge clk) begin
    if (rst) begin
      bist_cnt <= 0; rebira_cnt <= 0; bist_done <= 0; rebira_done <= 0; verifying <= 0;
    end else begin
      if (bist_start) begin
        bist_cnt  <= 15 + 3 * int'(ram_no);
        bist_done <= 0;
        verifying <= (n_bist_start[ram_no] == 1);
        n_bist_start[ram_no] <= n_bist_start[ram_no] + 1;
        check(cfg == entry(int'(ram_no)), "configuration of the RAM under test");
      end else if (bist_cnt > 0) begin
        bist_cnt <= bist_cnt - 1;
        if (bist_cnt == 1) bist_done <= 1;
      end
      if (rebira_start) begin
        rebira_cnt  <= 8;
        rebira_done <= 0;
        n_rebira_start[ram_no] <= n_rebira_start[ram_no] + 1;
        order.push_back(int'(ram_no));
      end else if (rebira_cnt > 0) begin
        rebira_cnt <= rebira_cnt - 1;
        if (rebira_cnt == 1) rebira_done <= 1;
      end
    end
  end
  assign rebira_irreparable = (ram_no == 2'd1);
  assign fault_present = verifying && (ram_no == 2'd2) && (bist_cnt == 5);

  initial begin
    start = 0; table_full = 0;
    for (int i = 0; i < 4; i++) begin n_bist_start[i] = 0; n_rebira_start[i] = 0; end
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    start = 1; @(negedge clk); start = 0;
    repeat (10) begin
      @(negedge clk);
      check(!test_mode && !bist_start && !done, "waits for the full table");
    end
    table_full = 1;
    for (int t = 0; t < 2000 && !done; t++) @(negedge clk);
    check(done, "done");
    check(order.size() == 4, "four RAMs visited");
    for (int i = 0; i < 4 && i < order.size(); i++) check(order[i] == i, "RAMs in order");
    for (int i = 0; i < 4; i++) begin
      check(n_rebira_start[i] == 1, $sformatf("one ReBIRA start for RAM %0d", i));
      check(n_bist_start[i] == ((i == 1) ? 1 : 2), $sformatf("BIST starts for RAM %0d: %0d", i, n_bist_start[i]));
    end
    check(irrepairable_map == 4'b0110, $sformatf("map %b", irrepairable_map));
    check(irrepairable, "irrepairable");
    repeat (20) begin
      @(negedge clk);
      check(done && !test_mode, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
