// rebisr_fsm -- main controller of the ReBISR scheme.
//
// After `start` (remembered if it comes early) and once the RAM details table
// is full, the controller repairs the RAMs one at a time, ram_no = 0 .. N-1:
//   LOAD     read the RAM's entry from the details table into cfg_q, which
//            feeds the BIST (depth, width) and the ReBIRA (spare counts);
//   KICK     one-cycle start pulse to both the BIST and the ReBIRA;
//   REPAIR   test and repair run concurrently until both bist_done and
//            rebira_done; if the ReBIRA found the RAM irreparable the RAM is
//            marked and the verification is skipped;
//   VKICK /
//   VERIFY   the BIST runs once more on the repaired RAM (the ReBIRA stays in
//            its done state and ignores faults); any fault reported now marks
//            the RAM irreparable;
//   NEXT     move to the next RAM, or to ALL_DONE.
// In ALL_DONE `done` is high and the controller stays there until reset.
// test_mode is high from LOAD to NEXT and selects the test path of the
// multiplexer. irrepairable is high once any RAM is marked;
// irrepairable_map has one bit per RAM. The per-step state split and the
// verification rule are this design's choices.
module rebisr_fsm
  import rebisr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  // RAM details table
  input  logic                 table_full,
  output logic [RAM_NO_W-1:0]  tbl_idx,
  input  ram_cfg_t             tbl_cfg,
  // to BIST / ReBIRA
  output ram_cfg_t             cfg,
  output logic                 bist_start,
  output logic                 rebira_start,
  input  logic                 bist_done,
  input  logic                 rebira_done,
  input  logic                 rebira_irreparable,
  input  logic                 fault_present,
  // status
  output logic                 test_mode,
  output logic [RAM_NO_W-1:0]  ram_no,
  output logic                 irrepairable,
  output logic [N_RAMS-1:0]    irrepairable_map,
  output logic                 done
);

  typedef enum logic [2:0] {IDLE, LOAD, KICK, REPAIR, VKICK, VERIFY, NEXT, ALL_DONE} fsm_state_t;

  fsm_state_t          state_q;
  logic                start_q;
  logic [RAM_NO_W-1:0] ram_q;
  ram_cfg_t            cfg_q;
  logic [N_RAMS-1:0]   irrep_q;

  assign tbl_idx          = ram_q;
  assign cfg              = cfg_q;
  assign bist_start       = (state_q == KICK) || (state_q == VKICK);
  assign rebira_start     = (state_q == KICK);
  assign test_mode        = (state_q != IDLE) && (state_q != ALL_DONE);
  assign ram_no           = ram_q;
  assign irrepairable     = |irrep_q;
  assign irrepairable_map = irrep_q;
  assign done             = (state_q == ALL_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= IDLE;
      start_q <= 1'b0;
      ram_q   <= '0;
      cfg_q   <= '0;
      irrep_q <= '0;
    end else begin
      unique case (state_q)
        IDLE: begin
          if (start) start_q <= 1'b1;
          if ((start || start_q) && table_full) begin
            state_q <= LOAD;
            ram_q   <= '0;
          end
        end
        LOAD: begin
          cfg_q   <= tbl_cfg;
          state_q <= KICK;
        end
        KICK: state_q <= REPAIR;
        REPAIR: begin
          if (bist_done && rebira_done) begin
            if (rebira_irreparable) begin
              irrep_q[ram_q] <= 1'b1;
              state_q <= NEXT;
            end else begin
              state_q <= VKICK;
            end
          end
        end
        VKICK: state_q <= VERIFY;
        VERIFY: begin
          if (fault_present) irrep_q[ram_q] <= 1'b1;
          if (bist_done) state_q <= NEXT;
        end
        NEXT: begin
          if (32'(ram_q) == N_RAMS - 1) begin
            state_q <= ALL_DONE;
          end else begin
            ram_q   <= ram_q + 1'b1;
            state_q <= LOAD;
          end
        end
        ALL_DONE: ;
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
