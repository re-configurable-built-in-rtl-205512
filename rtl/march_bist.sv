// march_bist -- reconfigurable memory BIST running the test
// W0; R0; W1; R1 over a RAM whose depth and word width are given at run time.
//
// The state sequence is IDLE, W0, WAIT1, WAIT2, R0, W1, WAIT3, WAIT4, R1,
// DONE. W0 and W1 write all-zero and all-one words to rows 0 .. depth-1 in
// ascending order, one row per cycle. Each pair of WAIT states is two idle
// cycles that hold the address at the last row, from which R0 and R1 read in
// descending order, one row per cycle, comparing the word with the value just
// written (only the low `width` bits are compared). Ascending writes and
// descending reads are this design's reading of the state diagram.
//
// When a read word mismatches, the failing bits are latched and reported one
// per cycle on fault_present / fault_row / fault_col, lowest bit first. A
// fault is taken by the repair analyser in a cycle where fault_present is
// high and pause_bist is low; while pause_bist is high the BIST freezes and
// holds the fault it is showing, with mem_en and mem_we low. After the last failing bit of a word is
// taken, the test moves on to the next row. bist_done is high in DONE until
// the next start.
//
// Cycle count with no faults: 1 (start) + 4*depth + 4 cycles until
// bist_done; each failing word adds as many cycles as it has failing bits,
// plus the cycles spent paused.
//
// The memory port is combinational-read: mem_rdata must belong to mem_addr in
// the same cycle.
module march_bist
  import rebisr_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [3:0]            cfg_log2_depth,
  input  logic [3:0]            cfg_log2_width,
  input  logic                  pause_bist,
  // memory port
  output logic                  mem_en,
  output logic                  mem_we,
  output logic [ADDR_W-1:0]     mem_addr,
  output logic [MAX_WIDTH-1:0]  mem_wdata,
  input  logic [MAX_WIDTH-1:0]  mem_rdata,
  // fault report
  output logic                  fault_present,
  output logic [ADDR_W-1:0]     fault_row,
  output logic [COL_W-1:0]      fault_col,
  output logic                  bist_done
);

  typedef enum logic [3:0] {
    IDLE, W0, WAIT1, WAIT2, R0, W1, WAIT3, WAIT4, R1, DONE
  } bist_state_t;

  bist_state_t           state_q;
  logic [ADDR_W-1:0]     addr_q;
  logic [MAX_WIDTH-1:0]  err_q;      // failing bits still to report
  logic [ADDR_W-1:0]     err_row_q;

  logic [ADDR_W-1:0]     last_row;
  logic [MAX_WIDTH-1:0]  width_mask;
  assign last_row   = ADDR_W'((9'd1 << cfg_log2_depth) - 9'd1);
  assign width_mask = (cfg_log2_width >= 4'd6) ? '1
                    : MAX_WIDTH'((65'd1 << (7'd1 << cfg_log2_width)) - 65'd1);

  logic                 reading;
  logic [MAX_WIDTH-1:0] expected, mismatch;
  assign reading  = (state_q == R0) || (state_q == R1);
  assign expected = (state_q == R1) ? width_mask : '0;
  assign mismatch = (mem_rdata ^ expected) & width_mask;

  // Lowest failing bit still to report.
  logic [COL_W-1:0]     low_col;
  logic [MAX_WIDTH-1:0] err_next;
  always_comb begin
    low_col = '0;
    for (int b = MAX_WIDTH - 1; b >= 0; b--)
      if (err_q[b]) low_col = COL_W'(b);
    err_next = err_q & ~(MAX_WIDTH'(1) << low_col);
  end

  assign mem_en        = !pause_bist &&
                         ((state_q == W0) || (state_q == W1) || (reading && err_q == '0));
  assign mem_we        = !pause_bist && ((state_q == W0) || (state_q == W1));
  assign mem_addr      = addr_q;
  assign mem_wdata     = (state_q == W1) ? width_mask : '0;
  assign fault_present = reading && (err_q != '0);
  assign fault_row     = err_row_q;
  assign fault_col     = low_col;
  assign bist_done     = (state_q == DONE);

  // Advance a read phase by one row (descending), or leave it.
  function automatic void read_step(input bist_state_t nxt);
    if (addr_q == '0) state_q <= nxt;
    else              addr_q  <= addr_q - 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q   <= IDLE;
      addr_q    <= '0;
      err_q     <= '0;
      err_row_q <= '0;
    end else if (start && (state_q == IDLE || state_q == DONE)) begin
      state_q <= W0;
      addr_q  <= '0;
      err_q   <= '0;
    end else if (!pause_bist) begin
      unique case (state_q)
        W0, W1: begin
          if (addr_q == last_row) state_q <= (state_q == W0) ? WAIT1 : WAIT3;
          else                    addr_q  <= addr_q + 1'b1;
        end
        WAIT1: state_q <= WAIT2;
        WAIT2: state_q <= R0;
        WAIT3: state_q <= WAIT4;
        WAIT4: state_q <= R1;
        R0, R1: begin
          if (err_q != '0) begin
            err_q <= err_next;
            if (err_next == '0) read_step((state_q == R0) ? W1 : DONE);
          end else if (mismatch != '0) begin
            err_q     <= mismatch;
            err_row_q <= addr_q;
          end else begin
            read_step((state_q == R0) ? W1 : DONE);
          end
        end
        default: ;
      endcase
    end
  end

  // A fault that is shown while paused must stay unchanged.
  property p_fault_held;
    @(posedge clk) disable iff (rst)
      (fault_present && pause_bist) |=> (fault_present && $stable(fault_row) && $stable(fault_col));
  endproperty
  a_fault_held: assert property (p_fault_held);

endmodule
