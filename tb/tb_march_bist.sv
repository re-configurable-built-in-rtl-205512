// tb_march_bist -- self-checking test of march_bist against a memory model
// (256 x 64, combinational read) with stuck-at cells.
//
// For each configuration (16x32, 32x64, 256x64, and 32x64 again with random
// pause_bist) the bench works out the fault reports the test must produce:
// stuck-at-1 cells during R0, stuck-at-0 cells during R1, rows descending,
// bits ascending within a row, and only cells inside the configured depth and
// width. It compares them one by one with what the BIST reports, checks that
// every row of the configured depth is written with the right pattern, and,
// without pauses, checks the cycle count 1 + 4*depth + 4 + (failing bits).
module tb_march_bist;
  import rebisr_pkg::*;

  logic clk = 1'b0, rst;
  logic start, pause_bist;
  logic [3:0] cfg_log2_depth, cfg_log2_width;
  logic mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [MAX_WIDTH-1:0] mem_wdata, mem_rdata;
  logic fault_present;
  logic [ADDR_W-1:0] fault_row;
  logic [COL_W-1:0] fault_col;
  logic bist_done;

  march_bist dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory model with stuck-at cells
  logic [MAX_WIDTH-1:0] mem [256];
  logic [MAX_WIDTH-1:0] sa1 [256], sa0 [256];
  int writes_seen [256];
  always_comb mem_rdata = (mem[mem_addr] | sa1[mem_addr]) & ~sa0[mem_addr];
  always_ff @(posedge clk) if (mem_en && mem_we) begin
    mem[mem_addr] <= mem_wdata;
    writes_seen[mem_addr] <= writes_seen[mem_addr] + 1;
  end

  // observed reports
  int obs_row [$], obs_col [$];
  always_ff @(posedge clk) if (fault_present && !pause_bist) begin
    obs_row.push_back(int'(fault_row));
    obs_col.push_back(int'(fault_col));
  end

  bit random_pause;
  always @(negedge clk) pause_bist <= random_pause ? ($urandom_range(0, 2) == 0) : 1'b0;

  task automatic run(input int ld, input int lw, input bit pauses);
    int depth = 1 << ld, width = 1 << lw;
    int exp_row [$], exp_col [$];
    int nbits = 0, cycles = 0;
    logic [MAX_WIDTH-1:0] wmask = (lw >= 6) ? '1 : ((64'd1 << width) - 1);
    // defects: a few fixed ones, some outside the configured size, some random
    for (int r = 0; r < 256; r++) begin sa1[r] = '0; sa0[r] = '0; writes_seen[r] = 0; end
    sa1[depth-1][0] = 1; sa0[0][width-1] = 1; sa1[3][2] = 1; sa1[3][7] = 1;
    sa0[5][9 % width] = 1; sa1[depth > 8 ? 8 : 1][63] = 1;   // bit 63 is outside a 32-bit word
    if (depth < 256) sa1[depth][1] = 1;                         // row outside the depth
    for (int k = 0; k < 6; k++) begin
      int r = $urandom_range(0, depth - 1), b = $urandom_range(0, width - 1);
      if ($urandom_range(0, 1) == 1) sa1[r][b] = 1; else sa0[r][b] = 1;
    end
    for (int r = 0; r < 256; r++) if ((sa1[r] & sa0[r]) != 0) sa0[r] &= ~sa1[r];
    for (int r = depth - 1; r >= 0; r--)
      for (int b = 0; b < width; b++) if (sa1[r][b]) begin exp_row.push_back(r); exp_col.push_back(b); end
    for (int r = depth - 1; r >= 0; r--)
      for (int b = 0; b < width; b++) if (sa0[r][b]) begin exp_row.push_back(r); exp_col.push_back(b); end
    nbits = exp_row.size();
    obs_row.delete(); obs_col.delete();
    random_pause = pauses;

    @(negedge clk);
    cfg_log2_depth = 4'(ld); cfg_log2_width = 4'(lw);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!bist_done) begin @(negedge clk); cycles++; end

    if (!pauses)
      check(cycles == 1 + 4 * depth + 4 + nbits,
            $sformatf("cycles %0d want %0d", cycles, 1 + 4 * depth + 4 + nbits));
    check(obs_row.size() == nbits, $sformatf("%0d reports, want %0d", obs_row.size(), nbits));
    for (int i = 0; i < nbits && i < obs_row.size(); i++)
      check(obs_row[i] == exp_row[i] && obs_col[i] == exp_col[i],
            $sformatf("report %0d: (%0d,%0d) want (%0d,%0d)", i, obs_row[i], obs_col[i], exp_row[i], exp_col[i]));
    for (int r = 0; r < 256; r++) begin
      if (r < depth) begin
        check(writes_seen[r] == 2, $sformatf("row %0d written %0d times", r, writes_seen[r]));
        check((mem[r] & wmask) == wmask, $sformatf("row %0d holds the W1 pattern", r));
      end else if (writes_seen[r] != 0) begin
        check(0, $sformatf("row %0d outside depth written", r));
      end
    end
  endtask

  initial begin
    start = 0; random_pause = 0; cfg_log2_depth = 4; cfg_log2_width = 5;
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    check(!bist_done && !fault_present, "idle after reset");
    run(4, 5, 0);
    run(5, 6, 0);
    run(8, 6, 0);
    run(5, 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
