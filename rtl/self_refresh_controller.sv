// self_refresh_controller: periodic read-check-repair (scrubbing) of the
// SECDED-protected SRAM.
//
// Soft errors only do harm if a word is read before it is rewritten, so the
// controller keeps every word clean by itself: it walks through the array,
// one word every INTERVAL clock cycles, reads it, decodes it with its own
// SECDED decoder and acts on the result:
//   no error      nothing is written;
//   parity error  the corrected word is written back (overall parity bit);
//   single error  the corrected word is written back;
//   double error  nothing is written (it cannot be corrected), the event is
//                 flagged and counted and its address reported.
// The array is shared with a user port, which always has priority: a refresh
// read is issued only in a cycle where rd_gnt_i is high, a write-back only
// where wr_gnt_i is high, and the controller waits (stalls) otherwise. If
// the user writes the word being refreshed between the refresh read and the
// write-back, the write-back is dropped, so new data is never overwritten
// with old corrected data.
//
// Timing: the read request is taken at a granted edge; the data is checked
// at the next edge; a write-back request follows one cycle later and is held
// until granted. With no conflicts one word costs 2 cycles (clean) or 3
// cycles (repaired) of the INTERVAL. A full sweep ends with sweep_done_o.
// The read-check-write-back scheme and the reaction to each error class
// follow the self-refresh description; the interval, the one-word-at-a-time
// sweep, the user priority and the counters are this design's choices.
module self_refresh_controller
  import secded_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned INTERVAL = 64,
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned ADDR_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable_i,
  // array read port (shared)
  output logic              rd_req_o,
  output logic [ADDR_W-1:0] rd_addr_o,
  input  logic              rd_gnt_i,
  input  code_t             rd_data_i,   // valid the cycle after a granted read
  // array write port (shared)
  output logic              wr_req_o,
  output logic [ADDR_W-1:0] wr_addr_o,
  output code_t             wr_data_o,
  input  logic              wr_gnt_i,
  // user writes, watched to drop stale write-backs
  input  logic              usr_wr_i,
  input  logic [ADDR_W-1:0] usr_waddr_i,
  // status
  output logic              corrected_o,    // pulse: a word was repaired
  output logic              parity_fix_o,   // pulse: the repair was of d7
  output logic              double_err_o,   // pulse: uncorrectable word found
  output logic              dropped_o,      // pulse: write-back dropped
  output logic [ADDR_W-1:0] event_addr_o,   // address of the last event
  output syn_t              event_syn_o,    // syndrome of the last faulty word
  output logic              sweep_done_o,   // pulse: last address checked
  output logic [CNT_W-1:0]  corrected_cnt_o,
  output logic [CNT_W-1:0]  double_cnt_o
);

  typedef enum logic [1:0] {S_WAIT, S_READ, S_CHECK, S_WRITE} state_t;

  localparam int unsigned TMR_W = (INTERVAL > 1) ? $clog2(INTERVAL) : 1;

  state_t            state_q;
  logic [TMR_W-1:0]  timer_q;
  logic [ADDR_W-1:0] addr_q;
  code_t             fix_q;
  logic              stale_q;

  // SECDED check of the word read back
  code_t     dec_code;
  syn_t      dec_syn;
  err_kind_t dec_kind;
  logic      par_q;

  secded_decoder u_dec (
    .code_i      (rd_data_i),
    .data_o      (),
    .code_o      (dec_code),
    .syndrome_o  (dec_syn),
    .single_err_o(),
    .parity_err_o(),
    .double_err_o(),
    .kind_o      (dec_kind)
  );

  logic hit_usr_wr;
  assign hit_usr_wr = usr_wr_i && (usr_waddr_i == addr_q);

  logic last_addr;
  assign last_addr = (addr_q == ADDR_W'(DEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q         <= S_WAIT;
      timer_q         <= '0;
      addr_q          <= '0;
      fix_q           <= '0;
      stale_q         <= 1'b0;
      par_q           <= 1'b0;
      event_syn_o     <= '0;
      corrected_o     <= 1'b0;
      parity_fix_o    <= 1'b0;
      double_err_o    <= 1'b0;
      dropped_o       <= 1'b0;
      event_addr_o    <= '0;
      sweep_done_o    <= 1'b0;
      corrected_cnt_o <= '0;
      double_cnt_o    <= '0;
    end else begin
      corrected_o  <= 1'b0;
      parity_fix_o <= 1'b0;
      double_err_o <= 1'b0;
      dropped_o    <= 1'b0;
      sweep_done_o <= 1'b0;
      if (timer_q != TMR_W'(INTERVAL - 1)) timer_q <= timer_q + 1'b1;

      unique case (state_q)
        S_WAIT: begin
          if (enable_i && timer_q == TMR_W'(INTERVAL - 1)) begin
            timer_q <= '0;
            state_q <= S_READ;
          end
        end
        S_READ: begin
          stale_q <= 1'b0;
          if (rd_gnt_i) state_q <= S_CHECK;
        end
        S_CHECK: begin
          fix_q   <= dec_code;
          par_q   <= (dec_kind == ERR_PARITY);
          if (dec_kind != ERR_NONE) event_syn_o <= dec_syn;
          stale_q <= hit_usr_wr;
          if (dec_kind == ERR_DOUBLE) begin
            double_err_o <= 1'b1;
            event_addr_o <= addr_q;
            double_cnt_o <= double_cnt_o + 1'b1;
          end
          if (dec_kind == ERR_SINGLE || dec_kind == ERR_PARITY) begin
            state_q <= S_WRITE;
          end else begin
            state_q      <= S_WAIT;
            addr_q       <= last_addr ? '0 : addr_q + 1'b1;
            sweep_done_o <= last_addr;
          end
        end
        S_WRITE: begin
          if (stale_q || hit_usr_wr) begin
            dropped_o    <= 1'b1;
            event_addr_o <= addr_q;
            state_q      <= S_WAIT;
            addr_q       <= last_addr ? '0 : addr_q + 1'b1;
            sweep_done_o <= last_addr;
          end else if (wr_gnt_i) begin
            corrected_o     <= 1'b1;
            parity_fix_o    <= par_q;
            event_addr_o    <= addr_q;
            corrected_cnt_o <= corrected_cnt_o + 1'b1;
            state_q         <= S_WAIT;
            addr_q          <= last_addr ? '0 : addr_q + 1'b1;
            sweep_done_o    <= last_addr;
          end
        end
        default: state_q <= S_WAIT;
      endcase
    end
  end

  // One word is read, checked and written back within its interval.
  if (INTERVAL < 3) begin : g_interval_check
    $error("self_refresh_controller: INTERVAL must be at least 3 cycles");
  end

  // A write-back never goes to a word the user is writing in the same cycle.
  a_no_stale_writeback: assert property (
    @(posedge clk) disable iff (!rst_n)
    wr_req_o |-> !(usr_wr_i && usr_waddr_i == wr_addr_o));

  assign rd_req_o  = (state_q == S_READ);
  assign rd_addr_o = addr_q;
  assign wr_req_o  = (state_q == S_WRITE) && !stale_q && !hit_usr_wr;
  assign wr_addr_o = addr_q;
  assign wr_data_o = fix_q;

endmodule
