// ecc_sram_top: soft-error-tolerant memory built from an 8T SRAM array, an
// (8,4) SECDED code and a self-refresh (scrubbing) controller, next to the
// encoder / noise / decoder channel used to demonstrate the code.
//
// Memory path. A 4-bit word written on the user port is encoded into an
// 8-bit SECDED word and stored in one row of the 8T array. A user read
// decodes the stored word on the way out: one flipped bit is corrected, a
// flipped overall parity bit is ignored, two flipped bits are reported as
// uncorrectable. The memory itself is only repaired by the self-refresh
// controller, which in the background reads one word every REFRESH_INTERVAL
// cycles, checks it and writes back the corrected word, so that single
// upsets are removed before a second one can hit the same word. seu_i gives
// one strike input per stored bit, to inject single event upsets.
//
// Sharing the array. The 8T array has separate read and write ports. On each
// port the user has priority: a refresh read waits for a cycle without a
// user read, a refresh write-back for a cycle without a user write, and a
// write-back is dropped when the user rewrote the same word in between.
//
// Timing. A write request is stored within the cycle it is taken. Read data
// and its error flags (rd_valid_o) come in the cycle after rd_en_i. Reading a
// word in the cycle after writing it returns the new word.
//
// Channel demonstration. The ch_* ports lead to an independent, purely
// combinational encoder -> XOR noise -> decoder path with all intermediate
// words brought out, for switches-and-LEDs experiments with the code.
//
// The SRAM array inside is a behavioural model of an 8T macro (see
// sram_8t_array); everything else is synthesizable logic. For an
// implementation the array is replaced by a real macro with the same ports.
//
// The code, the cell, and scrubbing by periodic read / check / write-back
// follow the design description; the array depth, the refresh interval, the
// port arbitration and the status outputs are this design's choices.
module ecc_sram_top
  import secded_pkg::*;
#(
  parameter int unsigned DEPTH            = 16,
  parameter int unsigned REFRESH_INTERVAL = 64,
  parameter int unsigned CNT_W            = 16,
  parameter int unsigned ADDR_W           = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // user write port
  input  logic                         wr_en_i,
  input  logic [ADDR_W-1:0]            wr_addr_i,
  input  data_t                        wr_data_i,
  // user read port
  input  logic                         rd_en_i,
  input  logic [ADDR_W-1:0]            rd_addr_i,
  output logic                         rd_valid_o,
  output data_t                        rd_data_o,
  output logic                         rd_single_err_o,
  output logic                         rd_parity_err_o,
  output logic                         rd_double_err_o,
  // single event upset injection, one strike input per stored bit
  input  logic [DEPTH-1:0][CODE_W-1:0] seu_i,
  // self-refresh
  input  logic                         refresh_en_i,
  output logic                         rf_corrected_o,
  output logic                         rf_parity_fix_o,
  output logic                         rf_double_err_o,
  output logic                         rf_dropped_o,
  output logic [ADDR_W-1:0]            rf_event_addr_o,
  output syn_t                         rf_event_syn_o,
  output logic                         rf_sweep_done_o,
  output logic                         rf_rd_stall_o,
  output logic                         rf_wr_stall_o,
  output logic [CNT_W-1:0]             rf_corrected_cnt_o,
  output logic [CNT_W-1:0]             rf_double_cnt_o,
  // encoder / noise / decoder channel
  input  data_t                        ch_data_i,
  input  code_t                        ch_noise_i,
  output code_t                        ch_code_o,
  output code_t                        ch_noisy_code_o,
  output code_t                        ch_fixed_code_o,
  output data_t                        ch_data_o,
  output syn_t                         ch_syndrome_o,
  output logic                         ch_single_err_o,
  output logic                         ch_parity_err_o,
  output logic                         ch_double_err_o
);

  // ---------------------------------------------------------------- memory
  code_t             wr_code;
  code_t             arr_rdata;
  logic              arr_we, arr_re;
  logic [ADDR_W-1:0] arr_waddr, arr_raddr;
  code_t             arr_wdata;

  logic              rf_rd_req, rf_wr_req;
  logic [ADDR_W-1:0] rf_rd_addr, rf_wr_addr;
  code_t             rf_wr_data;
  logic              rf_rd_gnt, rf_wr_gnt;

  secded_encoder u_enc (.data_i(wr_data_i), .code_o(wr_code));

  // user first on both ports
  assign rf_rd_gnt = !rd_en_i;
  assign rf_wr_gnt = !wr_en_i;

  assign arr_we    = wr_en_i || rf_wr_req;
  assign arr_waddr = wr_en_i ? wr_addr_i : rf_wr_addr;
  assign arr_wdata = wr_en_i ? wr_code   : rf_wr_data;
  assign arr_re    = rd_en_i || rf_rd_req;
  assign arr_raddr = rd_en_i ? rd_addr_i : rf_rd_addr;

  assign rf_rd_stall_o = rf_rd_req && !rf_rd_gnt;
  assign rf_wr_stall_o = rf_wr_req && !rf_wr_gnt;

  sram_8t_array #(.DEPTH(DEPTH), .WIDTH(CODE_W)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .we_i   (arr_we),
    .waddr_i(arr_waddr),
    .wdata_i(arr_wdata),
    .re_i   (arr_re),
    .raddr_i(arr_raddr),
    .rdata_o(arr_rdata),
    .seu_i  (seu_i)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_o <= 1'b0;
    else        rd_valid_o <= rd_en_i;
  end

  secded_decoder u_rd_dec (
    .code_i      (arr_rdata),
    .data_o      (rd_data_o),
    .code_o      (),
    .syndrome_o  (),
    .single_err_o(rd_single_err_o),
    .parity_err_o(rd_parity_err_o),
    .double_err_o(rd_double_err_o),
    .kind_o      ()
  );

  self_refresh_controller #(
    .DEPTH   (DEPTH),
    .INTERVAL(REFRESH_INTERVAL),
    .CNT_W   (CNT_W)
  ) u_refresh (
    .clk            (clk),
    .rst_n          (rst_n),
    .enable_i       (refresh_en_i),
    .rd_req_o       (rf_rd_req),
    .rd_addr_o      (rf_rd_addr),
    .rd_gnt_i       (rf_rd_gnt),
    .rd_data_i      (arr_rdata),
    .wr_req_o       (rf_wr_req),
    .wr_addr_o      (rf_wr_addr),
    .wr_data_o      (rf_wr_data),
    .wr_gnt_i       (rf_wr_gnt),
    .usr_wr_i       (wr_en_i),
    .usr_waddr_i    (wr_addr_i),
    .corrected_o    (rf_corrected_o),
    .parity_fix_o   (rf_parity_fix_o),
    .double_err_o   (rf_double_err_o),
    .dropped_o      (rf_dropped_o),
    .event_addr_o   (rf_event_addr_o),
    .event_syn_o    (rf_event_syn_o),
    .sweep_done_o   (rf_sweep_done_o),
    .corrected_cnt_o(rf_corrected_cnt_o),
    .double_cnt_o   (rf_double_cnt_o)
  );

  // --------------------------------------------------------------- channel
  secded_codec u_channel (
    .data_i      (ch_data_i),
    .noise_i     (ch_noise_i),
    .code_o      (ch_code_o),
    .noisy_code_o(ch_noisy_code_o),
    .fixed_code_o(ch_fixed_code_o),
    .data_o      (ch_data_o),
    .syndrome_o  (ch_syndrome_o),
    .single_err_o(ch_single_err_o),
    .parity_err_o(ch_parity_err_o),
    .double_err_o(ch_double_err_o),
    .kind_o      ()
  );

endmodule
