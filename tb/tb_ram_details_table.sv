// tb_ram_details_table -- self-checking test of ram_details_table.
// Checks: all entries zero after reset; four writes land in entries 0..3 in
// order; `full` rises exactly after the fourth; a fifth write is ignored
// (the pointer holds); idle cycles between writes do not move the pointer;
// reset empties the table again.
module tb_ram_details_table;
  import rebisr_pkg::*;

  logic clk = 1'b0, rst;
  logic program_ram_details;
  ram_cfg_t ram_details, rd_cfg;
  logic [1:0] rd_idx;
  logic full;
  int checks = 0, failures = 0;
  ram_cfg_t words [5];

  ram_details_table #(.ENTRIES(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    program_ram_details = 0; ram_details = '0; rd_idx = 0;
    for (int i = 0; i < 5; i++) words[i] = ram_cfg_t'(16'($urandom()) | 16'h0101);
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 4; i++) begin
      rd_idx = 2'(i); #1; check(rd_cfg == '0, "entry zero after reset");
    end
    check(!full, "not full after reset");
    for (int i = 0; i < 5; i++) begin
      program_ram_details = 1; ram_details = words[i];
      @(negedge clk);
      program_ram_details = 0;
      @(negedge clk);  // an idle cycle between writes
      check(full == (i >= 3), $sformatf("full after write %0d", i));
    end
    for (int i = 0; i < 4; i++) begin
      rd_idx = 2'(i); #1;
      check(rd_cfg == words[i], $sformatf("entry %0d holds write %0d", i, i));
    end
    rst = 1; @(negedge clk); rst = 0;
    check(!full, "not full after second reset");
    for (int i = 0; i < 4; i++) begin
      rd_idx = 2'(i); #1; check(rd_cfg == '0, "entry zero after second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
