// tb_repairable_ram -- self-checking test of repairable_ram (16 x 32, two
// spare rows, two spare columns) with three stuck-at cells.
//
// 1. Without repair, the defects must show: reads of the faulty cells return
//    the stuck value.
// 2. Row 14 is mapped to spare row 0 and column 18 to spare column 0 through
//    the repair-register port; random words written to every row must then
//    read back exactly (the model in this bench is a plain array). Row 9 /
//    bit 3 stays unrepaired and must still show its defect.
// 3. A write to a repair register beyond the spares the RAM has is ignored.
// 4. Reset clears the repair: the defects show again.
module tb_repairable_ram;
  import rebisr_pkg::*;

  localparam int unsigned ROWS = 16, WIDTH = 32;

  logic clk = 1'b0, rst;
  logic en, we;
  logic [3:0]  addr;
  logic [31:0] wdata, rdata;
  logic        rep_reg_wr;
  rep_addr_t   rep_reg_addr;
  logic [REP_DATA_W-1:0] rep_reg_data;
  fault_list_t faults;

  int checks = 0, failures = 0;
  logic [31:0] model [ROWS];

  repairable_ram #(.ROWS(ROWS), .WIDTH(WIDTH), .N_SROWS(2), .N_SCOLS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write(input int a, input logic [31:0] d);
    @(negedge clk);
    en = 1; we = 1; addr = 4'(a); wdata = d;
    @(negedge clk);
    en = 0; we = 0;
    model[a] = d;
  endtask

  logic [31:0] got;
  task automatic rd(input int a);
    addr = 4'(a);
    #1;
    got = rdata;
  endtask

  task automatic rep_write(input bit is_col, input int idx, input int data);
    @(negedge clk);
    rep_reg_wr = 1; rep_reg_addr.is_col = is_col; rep_reg_addr.idx = SPARE_W'(idx);
    rep_reg_data = REP_DATA_W'(data);
    @(negedge clk);
    rep_reg_wr = 0;
  endtask

  // expected word with the unrepaired defects applied
  function automatic logic [31:0] faulty(input int a, input logic [31:0] d,
                                         input bit row14_ok, input bit col18_ok);
    logic [31:0] r = d;
    if (a == 14 && !row14_ok) r[28] = 1'b1;
    if (a == 6 && !col18_ok)  r[18] = 1'b0;
    if (a == 9)               r[3]  = 1'b1;
    if (a == 14 && row14_ok)  r = d;
    return r;
  endfunction


  initial begin
    faults = '0;
    faults[0] = '{valid: 1'b1, row: 8'd14, col: 6'd28, value: 1'b1};
    faults[1] = '{valid: 1'b1, row: 8'd6,  col: 6'd18, value: 1'b0};
    faults[2] = '{valid: 1'b1, row: 8'd9,  col: 6'd3,  value: 1'b1};
    en = 0; we = 0; addr = 0; wdata = 0;
    rep_reg_wr = 0; rep_reg_addr = '0; rep_reg_data = '0;
    rst = 1;
    repeat (2) @(posedge clk);
    rst = 0;

    // 1. defects visible without repair
    write(14, 32'h0);
    rd(14); check(got == 32'h1000_0000, "row 14 bit 28 stuck at 1 before repair");
    write(6, 32'hFFFF_FFFF);
    rd(6); check(got == 32'hFFFB_FFFF, "row 6 bit 18 stuck at 0 before repair");

    // 2. repair row 14 and column 18
    rep_write(1'b0, 0, 14);
    rep_write(1'b1, 0, 18);
    for (int pass = 0; pass < 4; pass++) begin
      for (int a = 0; a < ROWS; a++) write(a, $urandom());
      for (int a = 0; a < ROWS; a++) begin
        rd(a);
        check(got == faulty(a, model[a], 1'b1, 1'b1),
              $sformatf("repaired read row %0d got %h want %h", a, got, faulty(a, model[a], 1, 1)));
      end
    end
    // checkerboard-style extremes on the repaired cells
    write(14, 32'h0);          rd(14); check(got == 32'h0, "spare row holds zero");
    write(6, 32'hFFFF_FFFF);   rd(6); check(got == 32'hFFFF_FFFF, "spare column holds one");
    write(7, 32'h0004_0000);   rd(7); check(got == 32'h0004_0000, "spare column bit of row 7");

    // 3. a third spare row does not exist: the write is ignored
    rep_write(1'b0, 2, 3);
    write(3, 32'h1234_5678);
    rd(3); check(got == 32'h1234_5678, "write to missing spare register ignored");
    rep_write(1'b1, 3, 0);
    write(2, 32'h0000_0001);
    rd(2); check(got == 32'h0000_0001, "write to missing spare column register ignored");

    // 4. reset clears the repair registers
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    write(14, 32'h0);
    rd(14); check(got == 32'h1000_0000, "defect visible again after reset");
    write(6, 32'hFFFF_FFFF);
    rd(6); check(got == 32'hFFFB_FFFF, "column defect visible again after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
