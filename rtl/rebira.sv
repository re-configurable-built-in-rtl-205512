// rebira -- reconfigurable built-in redundancy analyser (ReBIRA).
//
// It takes the faults the BIST reports, keeps them in a local bitmap while
// the test runs, and allocates spare rows and spare columns with the range
// checking first rules, writing each allocation into the RAM's repair
// registers. One ReBIRA serves RAMs of any geometry up to 256 x 64: the spare
// counts of the RAM under repair are loaded into the reconfiguration
// registers at `start`.
//
// States: IDLE, UPDATE_TABLE, ANALYSIS, DONE.
//   IDLE          waits for start; then loads n_spare_rows / n_spare_cols,
//                 clears the bitmap and the allocation records.
//   UPDATE_TABLE  takes one fault per cycle (fault_present and not
//                 pause_bist). A fault in a row or column already replaced
//                 is dropped; otherwise it goes into the bitmap. If the
//                 bitmap has no room for it, pause_bist rises at once and the
//                 analyser goes to ANALYSIS for one allocation, then returns
//                 and retries (repair runs on the fly, concurrently with the
//                 BIST). When bist_done rises it goes to ANALYSIS to empty the
//                 bitmap.
//   ANALYSIS      one allocation per cycle. It takes the lowest valid entry
//                 (row r) and its lowest faulty column c, counts
//                 NFCE = faulty columns in row r and NFRE = faulty rows in
//                 column c (entries with bit c set), and allocates a spare
//                 column if NFRE > NFCE, a spare row if NFRE < NFCE, and on a
//                 tie the kind with more spares left (row if equal). If the
//                 chosen kind is used up the other kind is taken; if both are
//                 used up the RAM is irreparable. pause_bist is high here
//                 while the BIST is still running.
//   DONE          rebira_done high; faults are taken and ignored so that the
//                 BIST can finish.
// An allocation is a one-cycle pulse of rep_reg_wr with rep_reg_addr =
// {is_column, index of the spare} and rep_reg_data = the row or column
// address. The counting of NFRE/NFCE, the tie and fallback rules and the
// dropping of already-repaired faults are this design's reading of the rules.
module rebira
  import rebisr_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [3:0]             n_spare_rows,
  input  logic [3:0]             n_spare_cols,
  input  logic                   bist_done,
  input  logic                   fault_present,
  input  logic [ADDR_W-1:0]      fault_row,
  input  logic [COL_W-1:0]       fault_col,
  output logic                   pause_bist,
  output logic                   irreparable,
  output logic                   rep_reg_wr,
  output logic [REP_DATA_W-1:0]  rep_reg_data,
  output rep_addr_t              rep_reg_addr,
  output logic                   rebira_done
);

  localparam int unsigned E  = BM_ENTRIES;
  localparam int unsigned EW = $clog2(E);

  typedef enum logic [1:0] {IDLE, UPDATE_TABLE, ANALYSIS, DONE} rebira_state_t;

  rebira_state_t       state_q;
  logic                final_q;     // analysis after bist_done: empty the bitmap
  logic                irrep_q;
  logic [3:0]          nsr_q, nsc_q;               // reconfiguration registers
  logic [3:0]          used_r_q, used_c_q;
  logic [ADDR_W-1:0]   rep_row_q [MAX_SPARE];
  logic [COL_W-1:0]    rep_col_q [MAX_SPARE];

  // Bitmap.
  logic                bm_clear, bm_ins, bm_drop, bm_clrcol;
  logic [EW-1:0]       bm_drop_idx;
  logic [COL_W-1:0]    bm_clr_col;
  logic [E-1:0]        bm_valid;
  logic [ADDR_W-1:0]   bm_rows [E];
  logic [MAX_WIDTH-1:0] bm_bits [E];
  logic                bm_can_insert;

  local_bitmap #(.ENTRIES(E), .COLS(MAX_WIDTH)) u_bitmap (
    .clk, .rst,
    .clear     (bm_clear),
    .ins_en    (bm_ins),
    .ins_row   (fault_row),
    .ins_col   (fault_col),
    .drop_en   (bm_drop),
    .drop_idx  (bm_drop_idx),
    .clrcol_en (bm_clrcol),
    .clrcol_col(bm_clr_col),
    .valid     (bm_valid),
    .rows      (bm_rows),
    .bits      (bm_bits),
    .can_insert(bm_can_insert)
  );

  // Is the reported fault already covered by an allocated spare?
  logic covered;
  always_comb begin
    covered = 1'b0;
    for (int k = 0; k < MAX_SPARE; k++) begin
      if (4'(k) < used_r_q && rep_row_q[k] == fault_row) covered = 1'b1;
      if (4'(k) < used_c_q && rep_col_q[k] == fault_col) covered = 1'b1;
    end
  end

  // Range checking of the lowest valid entry.
  logic              any_entry;
  logic [EW-1:0]     sel_e;
  logic [COL_W-1:0]  sel_c;
  logic [6:0]        nfce;   // faulty columns in the selected row
  logic [EW:0]       nfre;   // faulty rows in the selected column
  logic [3:0]        avail_r, avail_c;
  logic              take_row, take_col;
  always_comb begin
    any_entry = |bm_valid;
    sel_e = '0;
    for (int e = E - 1; e >= 0; e--)
      if (bm_valid[e]) sel_e = EW'(e);
    sel_c = '0;
    for (int b = MAX_WIDTH - 1; b >= 0; b--)
      if (bm_bits[sel_e][b]) sel_c = COL_W'(b);
    nfce = '0;
    for (int b = 0; b < MAX_WIDTH; b++)
      nfce = nfce + 7'(bm_bits[sel_e][b]);
    nfre = '0;
    for (int e = 0; e < E; e++)
      if (bm_valid[e] && bm_bits[e][sel_c]) nfre = nfre + 1'b1;
    avail_r = nsr_q - used_r_q;
    avail_c = nsc_q - used_c_q;

    // Preferred kind by the range check, then fall back on what is left.
    if (7'(nfre) > nfce)      take_col = 1'b1;
    else if (7'(nfre) < nfce) take_col = 1'b0;
    else                      take_col = (avail_c > avail_r);
    if (take_col && avail_c == 0) take_col = 1'b0;
    if (!take_col && avail_r == 0) take_col = (avail_c != 0);
    take_row = !take_col && (avail_r != 0);
  end

  logic analyse, allocate, no_spare;
  assign analyse  = (state_q == ANALYSIS) && any_entry;
  assign no_spare = (avail_r == 0) && (avail_c == 0);
  assign allocate = analyse && !no_spare;

  logic accept_fault;
  assign accept_fault = (state_q == UPDATE_TABLE) && fault_present &&
                        (covered || bm_can_insert);

  assign pause_bist = ((state_q == ANALYSIS) && !final_q) ||
                      ((state_q == UPDATE_TABLE) && fault_present && !accept_fault);

  assign bm_clear    = ((state_q == IDLE) || (state_q == DONE)) && start;
  assign bm_ins      = accept_fault && !covered;
  assign bm_drop     = allocate && take_row;
  assign bm_drop_idx = sel_e;
  assign bm_clrcol   = allocate && take_col;
  assign bm_clr_col  = sel_c;

  assign rep_reg_wr          = allocate;
  assign rep_reg_addr.is_col = take_col;
  assign rep_reg_addr.idx    = SPARE_W'(take_col ? used_c_q : used_r_q);
  assign rep_reg_data        = take_col ? REP_DATA_W'(sel_c) : REP_DATA_W'(bm_rows[sel_e]);

  assign irreparable = irrep_q;
  assign rebira_done = (state_q == DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q  <= IDLE;
      final_q  <= 1'b0;
      irrep_q  <= 1'b0;
      nsr_q    <= '0;
      nsc_q    <= '0;
      used_r_q <= '0;
      used_c_q <= '0;
      for (int k = 0; k < MAX_SPARE; k++) begin
        rep_row_q[k] <= '0;
        rep_col_q[k] <= '0;
      end
    end else begin
      unique case (state_q)
        IDLE, DONE: begin
          if (start) begin
            state_q  <= UPDATE_TABLE;
            final_q  <= 1'b0;
            irrep_q  <= 1'b0;
            // a spare count above what the registers can hold is clipped
            nsr_q    <= (n_spare_rows > 4'(MAX_SPARE)) ? 4'(MAX_SPARE) : n_spare_rows;
            nsc_q    <= (n_spare_cols > 4'(MAX_SPARE)) ? 4'(MAX_SPARE) : n_spare_cols;
            used_r_q <= '0;
            used_c_q <= '0;
          end
        end
        UPDATE_TABLE: begin
          if (fault_present && !accept_fault) begin
            state_q <= ANALYSIS;
            final_q <= 1'b0;
          end else if (bist_done && !fault_present) begin
            state_q <= ANALYSIS;
            final_q <= 1'b1;
          end
        end
        ANALYSIS: begin
          if (!any_entry) begin
            state_q <= final_q ? DONE : UPDATE_TABLE;
          end else if (no_spare) begin
            irrep_q <= 1'b1;
            state_q <= DONE;
          end else begin
            if (take_row) begin
              rep_row_q[used_r_q[SPARE_W-1:0]] <= bm_rows[sel_e];
              used_r_q <= used_r_q + 1'b1;
            end else begin
              rep_col_q[used_c_q[SPARE_W-1:0]] <= sel_c;
              used_c_q <= used_c_q + 1'b1;
            end
            // mid-test: one allocation, then resume the BIST
            if (!final_q) state_q <= UPDATE_TABLE;
          end
        end
        default: ;
      endcase
    end
  end

  // A repair register write always names a spare that exists.
  a_spare_exists: assert property (@(posedge clk) disable iff (rst)
    rep_reg_wr |-> (rep_reg_addr.is_col ? (4'(rep_reg_addr.idx) < nsc_q)
                                        : (4'(rep_reg_addr.idx) < nsr_q)));

endmodule
