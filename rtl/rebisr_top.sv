// rebisr_top -- reconfigurable built-in self-repair (ReBISR) of four
// word-oriented repairable RAMs of different sizes sharing one BIST, one
// redundancy analyser (ReBIRA) and one controller.
//
// Blocks: RAM 0..3 (repairable_ram, 16x32 with 2 spare rows / 2 spare
// columns, 32x64 with 2/3, 128x64 with 3/2, 256x64 with none), the MUX/DEMUX
// (mem_mux), the BIST (march_bist), the ReBIRA (rebira, with its local
// bitmap), the RAM details table (ram_details_table) and the controller
// (rebisr_fsm).
//
// Use: hold rst for a cycle, write the four configuration words on
// ram_details with program_ram_details high (one per cycle, RAM 0 first),
// pulse start. The controller then tests, repairs and re-tests each RAM in
// turn; ram_no tells which RAM is being worked on, irrepairable /
// irrepairable_map report RAMs that could not be repaired, and done rises and
// stays high at the end. From then on (and before start) the system port
// sys_* reaches RAM sys_sel through the repair logic: writes at the clock
// edge, asynchronous reads on sys_rdata (zero-extended to 64 bits).
//
// inj_faults is a simulation hook that models manufacturing defects as
// stuck-at cells of each RAM's main array; tie it to zero in a real system.
//
// The block set, the RAM geometries and spare counts, and the top-level
// control pins (start, program_ram_details, ram_details, ram_no,
// irrepairable, done) follow the scheme; the system port, test_mode,
// irrepairable_map and the fault-injection input are this design's additions.
module rebisr_top
  import rebisr_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic                  program_ram_details,
  input  ram_cfg_t              ram_details,
  output logic [RAM_NO_W-1:0]   ram_no,
  output logic                  irrepairable,
  output logic [N_RAMS-1:0]     irrepairable_map,
  output logic                  done,
  output logic                  test_mode,
  // system port (normal operation)
  input  logic [RAM_NO_W-1:0]   sys_sel,
  input  mem_req_t              sys_req,
  output logic [MAX_WIDTH-1:0]  sys_rdata,
  // defect model
  input  fault_list_t           inj_faults [N_RAMS]
);

  // RAM details table
  logic                 table_full;
  logic [RAM_NO_W-1:0]  tbl_idx;
  ram_cfg_t             tbl_cfg;

  ram_details_table #(.ENTRIES(N_RAMS)) u_table (
    .clk, .rst,
    .program_ram_details,
    .ram_details,
    .rd_idx (tbl_idx),
    .rd_cfg (tbl_cfg),
    .full   (table_full)
  );

  // Controller
  ram_cfg_t cfg;
  logic     bist_start, rebira_start, bist_done, rebira_done, rebira_irrep;
  logic     fault_present, pause_bist;

  rebisr_fsm u_fsm (
    .clk, .rst, .start,
    .table_full,
    .tbl_idx,
    .tbl_cfg,
    .cfg,
    .bist_start,
    .rebira_start,
    .bist_done,
    .rebira_done,
    .rebira_irreparable (rebira_irrep),
    .fault_present,
    .test_mode,
    .ram_no,
    .irrepairable,
    .irrepairable_map,
    .done
  );

  // BIST
  mem_req_t             bist_req;
  logic [MAX_WIDTH-1:0] test_rdata;
  logic [ADDR_W-1:0]    fault_row;
  logic [COL_W-1:0]     fault_col;

  march_bist u_bist (
    .clk, .rst,
    .start          (bist_start),
    .cfg_log2_depth (cfg.log2_depth),
    .cfg_log2_width (cfg.log2_width),
    .pause_bist,
    .mem_en         (bist_req.en),
    .mem_we         (bist_req.we),
    .mem_addr       (bist_req.addr),
    .mem_wdata      (bist_req.wdata),
    .mem_rdata      (test_rdata),
    .fault_present,
    .fault_row,
    .fault_col,
    .bist_done
  );

  // ReBIRA
  logic                  rep_reg_wr;
  logic [REP_DATA_W-1:0] rep_reg_data;
  rep_addr_t             rep_reg_addr;

  rebira u_rebira (
    .clk, .rst,
    .start         (rebira_start),
    .n_spare_rows  (cfg.spare_rows),
    .n_spare_cols  (cfg.spare_cols),
    .bist_done,
    .fault_present,
    .fault_row,
    .fault_col,
    .pause_bist,
    .irreparable   (rebira_irrep),
    .rep_reg_wr,
    .rep_reg_data,
    .rep_reg_addr,
    .rebira_done
  );

  // MUX / DEMUX
  mem_req_t             ram_req   [N_RAMS];
  logic [N_RAMS-1:0]    ram_rep_wr;
  logic [MAX_WIDTH-1:0] ram_rdata [N_RAMS];
  logic [MAX_WIDTH-1:0] mux_rdata;

  mem_mux u_mux (
    .test_mode,
    .test_sel   (ram_no),
    .bist_req,
    .rep_reg_wr,
    .sys_sel,
    .sys_req,
    .ram_req,
    .ram_rep_wr,
    .ram_rdata,
    .rdata      (mux_rdata)
  );
  assign test_rdata = mux_rdata;
  assign sys_rdata  = mux_rdata;

  // The four repairable RAMs
  for (genvar g = 0; g < N_RAMS; g++) begin : g_ram
    localparam int unsigned ROWS  = RAM_ROWS[g];
    localparam int unsigned WIDTH = RAM_WIDTH[g];
    logic [WIDTH-1:0] rdata;

    repairable_ram #(
      .ROWS    (ROWS),
      .WIDTH   (WIDTH),
      .N_SROWS (RAM_SROWS[g]),
      .N_SCOLS (RAM_SCOLS[g])
    ) u_ram (
      .clk, .rst,
      .en           (ram_req[g].en),
      .we           (ram_req[g].we),
      .addr         (ram_req[g].addr[$clog2(ROWS)-1:0]),
      .wdata        (ram_req[g].wdata[WIDTH-1:0]),
      .rdata        (rdata),
      .rep_reg_wr   (ram_rep_wr[g]),
      .rep_reg_addr (rep_reg_addr),
      .rep_reg_data (rep_reg_data),
      .faults       (inj_faults[g])
    );
    assign ram_rdata[g] = MAX_WIDTH'(rdata);
  end

endmodule
