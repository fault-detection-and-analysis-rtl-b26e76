// ecc_sram_top_tb: end-to-end run of the protected memory at its default
// size (16 words, one word refreshed every 64 cycles), plus the channel
// demonstration. No parameter of the top is changed.
//   1. Fill all words through the user port and read them back clean; read
//      data must arrive exactly one cycle after the request.
//   2. Strike cells: single upsets in two words, the parity bit of a third,
//      a double upset in a fourth. User reads must correct / flag them
//      without repairing the array.
//   3. Turn self-refresh on and keep random user reads running (so refresh
//      reads stall). After one sweep the single and parity upsets must be
//      gone from the array and the double upset must be reported.
//   4. Upset two more words; rewrite one of them right after the refresh
//      read it (the write-back must be dropped), and write elsewhere while
//      the other waits for write-back (the write-back must stall, then land).
//   5. Channel: every data word with no noise, one flipped Hamming bit, the
//      parity bit flipped and two flipped bits, and the 0101 example.
// Every mechanism is counted; one that never happened is a failure.
module ecc_sram_top_tb;
  import secded_pkg::*;
  import secded_ref_pkg::*;

  localparam int unsigned DEPTH = 16;

  int checks = 0, failures = 0;
  int n_rd_stall = 0, n_wr_stall = 0, n_drop = 0, n_corr = 0, n_par = 0, n_dbl = 0;
  int n_sweep = 0, n_usr_single = 0, n_usr_par = 0, n_usr_dbl = 0;
  int n_ch_none = 0, n_ch_single = 0, n_ch_par = 0, n_ch_dbl = 0;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, refresh_en = 0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  data_t wr_data = '0;
  logic rd_valid, rd_s, rd_p, rd_d;
  data_t rd_data;
  logic [DEPTH-1:0][CODE_W-1:0] seu = '0;
  logic rf_corr, rf_par, rf_dbl, rf_drop, rf_sweep, rf_rd_stall, rf_wr_stall;
  logic [3:0] rf_addr;
  syn_t rf_syn;
  logic [15:0] rf_corr_cnt, rf_dbl_cnt;
  data_t ch_data = '0, ch_dout;
  code_t ch_noise = '0, ch_code, ch_noisy, ch_fixed;
  syn_t ch_syn;
  logic ch_s, ch_p, ch_d;

  data_t expect_data [DEPTH];

  ecc_sram_top dut (
    .clk(clk), .rst_n(rst_n),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_valid_o(rd_valid), .rd_data_o(rd_data),
    .rd_single_err_o(rd_s), .rd_parity_err_o(rd_p), .rd_double_err_o(rd_d),
    .seu_i(seu), .refresh_en_i(refresh_en),
    .rf_corrected_o(rf_corr), .rf_parity_fix_o(rf_par), .rf_double_err_o(rf_dbl),
    .rf_dropped_o(rf_drop), .rf_event_addr_o(rf_addr), .rf_event_syn_o(rf_syn),
    .rf_sweep_done_o(rf_sweep), .rf_rd_stall_o(rf_rd_stall), .rf_wr_stall_o(rf_wr_stall),
    .rf_corrected_cnt_o(rf_corr_cnt), .rf_double_cnt_o(rf_dbl_cnt),
    .ch_data_i(ch_data), .ch_noise_i(ch_noise), .ch_code_o(ch_code),
    .ch_noisy_code_o(ch_noisy), .ch_fixed_code_o(ch_fixed), .ch_data_o(ch_dout),
    .ch_syndrome_o(ch_syn), .ch_single_err_o(ch_s), .ch_parity_err_o(ch_p),
    .ch_double_err_o(ch_d));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (rf_rd_stall) n_rd_stall++;
    if (rf_wr_stall) n_wr_stall++;
    if (rf_drop)     n_drop++;
    if (rf_corr)     n_corr++;
    if (rf_par)      n_par++;
    if (rf_dbl)      n_dbl++;
    if (rf_sweep)    n_sweep++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic user_write(input int a, input data_t d);
    wr_en = 1; wr_addr = 4'(a); wr_data = d;
    @(negedge clk);
    wr_en = 0;
    expect_data[a] = d;
  endtask

  // Read one word; flags are returned as {single, parity, double}.
  task automatic user_read(input int a, output data_t d, output logic [2:0] flags);
    rd_en = 1; rd_addr = 4'(a);
    check(!rd_valid || rd_en, "no stray read valid");
    @(negedge clk);
    rd_en = 0;
    check(rd_valid, "read data one cycle after the request");
    d = rd_data;
    flags = {rd_s, rd_p, rd_d};
    if (rd_s) n_usr_single++;
    if (rd_p) n_usr_par++;
    if (rd_d) n_usr_dbl++;
  endtask

  task automatic expect_read(input int a, input logic [2:0] want_flags, input string what);
    data_t d;
    logic [2:0] f;
    user_read(a, d, f);
    check(f == want_flags, $sformatf("%s: word %0d flags %b, expected %b", what, a, f, want_flags));
    if (want_flags != 3'b001)
      check(d == expect_data[a], $sformatf("%s: word %0d data %h, expected %h", what, a, d, expect_data[a]));
  endtask

  task automatic strike(input int a, input int bitpos);
    seu[a][bitpos] = 1'b1;
    #1;
    seu[a][bitpos] = 1'b0;
    @(negedge clk);
  endtask

  task automatic channel(input data_t d, input code_t n);
    logic [3:0] ed;
    logic [7:0] ef;
    ref_kind_t  ek;
    ch_data = d; ch_noise = n;
    #1;
    ref_decode(ref_encode(d) ^ n, ed, ef, ek);
    check(ch_code == ref_encode(d) && ch_noisy == (ref_encode(d) ^ n), "channel code words");
    check(ch_dout == ed && ch_fixed == ef, $sformatf("channel data %b noise %b", d, n));
    check({ch_s, ch_p, ch_d} == {ek == REF_SINGLE, ek == REF_PARITY, ek == REF_DOUBLE},
          $sformatf("channel flags for %b noise %b", d, n));
    if (!ch_s && !ch_p && !ch_d) n_ch_none++;
    if (ch_s) n_ch_single++;
    if (ch_p) n_ch_par++;
    if (ch_d) n_ch_dbl++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d;
    logic [2:0] f;
    int target;

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. fill and read back
    for (int a = 0; a < DEPTH; a++) user_write(a, 4'(a * 7 + 3));
    for (int a = 0; a < DEPTH; a++) expect_read(a, 3'b000, "clean");

    // 2. upsets, seen by user reads
    strike(0, 2);                 // D1 of word 0
    strike(1, 7);                 // overall parity bit of word 1
    strike(2, 4); strike(2, 6);   // D2 and D4 of word 2
    strike(3, 0);                 // P1 of word 3
    for (int k = 0; k < 2; k++) begin
      expect_read(0, 3'b100, "single upset");
      expect_read(1, 3'b010, "parity upset");
      expect_read(2, 3'b001, "double upset");
      expect_read(3, 3'b100, "single upset");
    end

    // 3. one refresh sweep with user reads competing for the read port
    refresh_en = 1;
    target = n_sweep + 1;
    while (n_sweep < target) begin
      if ($urandom_range(0, 3) == 0) expect_read($urandom_range(4, DEPTH - 1), 3'b000, "during refresh");
      else @(negedge clk);
    end
    expect_read(0, 3'b000, "scrubbed");
    expect_read(1, 3'b000, "scrubbed");
    expect_read(2, 3'b001, "double upset stays");
    expect_read(3, 3'b000, "scrubbed");
    check(rf_corr_cnt == 3, $sformatf("repair count %0d", rf_corr_cnt));
    check(rf_dbl_cnt == 1, $sformatf("double error count %0d", rf_dbl_cnt));
    user_write(2, 4'h9);          // software rewrites the lost word

    // 4. write-back dropped, and write-back stalled
    strike(5, 5);
    strike(6, 3);
    @(negedge clk);
    while (!(dut.rf_rd_req && dut.rf_rd_gnt && dut.rf_rd_addr == 4'd5)) @(negedge clk);
    @(negedge clk);               // refresh is checking word 5
    user_write(5, 4'hB);
    while (!(dut.rf_rd_req && dut.rf_rd_gnt && dut.rf_rd_addr == 4'd6)) @(negedge clk);
    @(negedge clk);               // refresh is checking word 6
    user_write(12, 4'h1);         // overlaps the write-back request
    user_write(13, 4'h2);
    repeat (4) @(negedge clk);
    expect_read(5, 3'b000, "user word kept after dropped write-back");
    expect_read(6, 3'b000, "scrubbed after stalled write-back");
    expect_read(12, 3'b000, "user write during write-back");
    expect_read(13, 3'b000, "user write during write-back");
    check(rf_corr_cnt == 4, $sformatf("repair count %0d", rf_corr_cnt));
    refresh_en = 0;

    // 5. channel demonstration
    for (int v = 0; v < 16; v++) begin
      channel(4'(v), 8'h00);
      channel(4'(v), 8'd1 << $urandom_range(0, 6));
      channel(4'(v), 8'h80);
      channel(4'(v), 8'h41);
    end
    channel(4'b0101, 8'b0110_0000);
    check(ch_dout == 4'b1001 && ch_d, "0101 with two flipped bits reads 1001, flagged");

    check(n_rd_stall > 0, "refresh read stalled by a user read");
    check(n_wr_stall > 0, "refresh write-back stalled by a user write");
    check(n_drop > 0, "stale write-back dropped");
    check(n_corr > 0, "word repaired by refresh");
    check(n_par > 0, "parity bit repaired by refresh");
    check(n_dbl > 0, "double upset reported by refresh");
    check(n_sweep > 0, "refresh sweep completed");
    check(n_usr_single > 0 && n_usr_par > 0 && n_usr_dbl > 0, "all error kinds seen on user reads");
    check(n_ch_none > 0 && n_ch_single > 0 && n_ch_par > 0 && n_ch_dbl > 0, "all channel cases");
    $display("rd_stall=%0d wr_stall=%0d dropped=%0d repaired=%0d parity=%0d double=%0d sweeps=%0d",
             n_rd_stall, n_wr_stall, n_drop, n_corr, n_par, n_dbl, n_sweep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
