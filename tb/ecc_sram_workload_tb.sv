// ecc_sram_workload_tb: the code's evaluation sequence run through the
// protected memory rather than the bare codec. All 16 data words are stored
// (word a holds data a), upsets are injected into every word, user reads show
// what the decoder sees, and one self-refresh sweep must then leave the
// array in the state the reference model predicts.
//   round 1  no upsets: clean reads, nothing repaired
//   round 2  one random Hamming bit per word: flagged, all 16 repaired
//   round 3  the parity bit of every word: flagged, all 16 repaired
//   round 4  two random bits per word: flagged double, nothing written back
//   round 5  d7 plus two data bits per word (three upsets): miscorrected by
//            the refresh into another valid codeword, as SECDED must
//   round 6  one clean word pattern again
// Runs the top at its default size.
module ecc_sram_workload_tb;
  import secded_pkg::*;
  import secded_ref_pkg::*;

  localparam int unsigned DEPTH = 16;

  int checks = 0, failures = 0;
  int n_corr = 0, n_par = 0, n_dbl = 0, n_sweep = 0;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, refresh_en = 0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  data_t wr_data = '0;
  logic rd_valid, rd_s, rd_p, rd_d;
  data_t rd_data;
  logic [DEPTH-1:0][CODE_W-1:0] seu = '0;
  logic rf_corr, rf_par, rf_dbl, rf_sweep;
  logic [15:0] rf_corr_cnt, rf_dbl_cnt;

  code_t stored [DEPTH];      // expected content of each row

  ecc_sram_top dut (
    .clk(clk), .rst_n(rst_n),
    .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_valid_o(rd_valid), .rd_data_o(rd_data),
    .rd_single_err_o(rd_s), .rd_parity_err_o(rd_p), .rd_double_err_o(rd_d),
    .seu_i(seu), .refresh_en_i(refresh_en),
    .rf_corrected_o(rf_corr), .rf_parity_fix_o(rf_par), .rf_double_err_o(rf_dbl),
    .rf_dropped_o(), .rf_event_addr_o(), .rf_event_syn_o(),
    .rf_sweep_done_o(rf_sweep), .rf_rd_stall_o(), .rf_wr_stall_o(),
    .rf_corrected_cnt_o(rf_corr_cnt), .rf_double_cnt_o(rf_dbl_cnt),
    .ch_data_i('0), .ch_noise_i('0), .ch_code_o(), .ch_noisy_code_o(), .ch_fixed_code_o(),
    .ch_data_o(), .ch_syndrome_o(), .ch_single_err_o(), .ch_parity_err_o(),
    .ch_double_err_o());

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (rf_corr)  n_corr++;
    if (rf_par)   n_par++;
    if (rf_dbl)   n_dbl++;
    if (rf_sweep) n_sweep++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic fill(input int offset);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = 4'(a); wr_data = 4'(a + offset);
      stored[a] = ref_encode(4'(a + offset));
      @(negedge clk);
    end
    wr_en = 0;
  endtask

  // flip the cells of one row given by a mask
  task automatic upset(input int a, input code_t mask);
    seu[a] = mask;
    #1;
    seu[a] = '0;
    stored[a] ^= mask;
  endtask

  // read every word and compare data and flags with the reference decoder
  task automatic read_all(input string what);
    for (int a = 0; a < DEPTH; a++) begin
      logic [3:0] ed;
      logic [7:0] ef;
      ref_kind_t  ek;
      rd_en = 1; rd_addr = 4'(a);
      @(negedge clk);
      rd_en = 0;
      ref_decode(stored[a], ed, ef, ek);
      check(rd_valid && rd_data == ed, $sformatf("%s: word %0d data %h expected %h", what, a, rd_data, ed));
      check({rd_s, rd_p, rd_d} == {ek == REF_SINGLE, ek == REF_PARITY, ek == REF_DOUBLE},
            $sformatf("%s: word %0d flags %b%b%b", what, a, rd_s, rd_p, rd_d));
    end
  endtask

  // one full sweep; the model applies what the refresh should write back
  task automatic sweep_and_model();
    int target;
    target = n_sweep + 1;
    refresh_en = 1;
    while (n_sweep < target) @(negedge clk);
    refresh_en = 0;
    repeat (4) @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      logic [3:0] ed;
      logic [7:0] ef;
      ref_kind_t  ek;
      ref_decode(stored[a], ed, ef, ek);
      stored[a] = ef;
    end
  endtask

  function automatic code_t rand_two(input int lo, input int hi);
    int x, y;
    x = $urandom_range(lo, hi);
    do y = $urandom_range(lo, hi); while (y == x);
    return (8'd1 << x) | (8'd1 << y);
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, p0, d0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // round 1
    fill(0);
    read_all("no upset");
    sweep_and_model();
    read_all("no upset, after refresh");
    check(n_corr == 0 && n_dbl == 0, "nothing to repair");

    // round 2
    for (int a = 0; a < DEPTH; a++) upset(a, 8'd1 << $urandom_range(0, 6));
    @(negedge clk);
    read_all("single upset");
    c0 = n_corr;
    sweep_and_model();
    read_all("single upset, after refresh");
    check(n_corr - c0 == DEPTH, $sformatf("%0d words repaired", n_corr - c0));

    // round 3
    for (int a = 0; a < DEPTH; a++) upset(a, 8'h80);
    @(negedge clk);
    read_all("parity upset");
    p0 = n_par;
    sweep_and_model();
    read_all("parity upset, after refresh");
    check(n_par - p0 == DEPTH, $sformatf("%0d parity bits repaired", n_par - p0));

    // round 4
    for (int a = 0; a < DEPTH; a++) upset(a, rand_two(0, 7));
    @(negedge clk);
    read_all("double upset");
    c0 = n_corr;
    d0 = n_dbl;
    sweep_and_model();
    read_all("double upset, after refresh");
    check(n_dbl - d0 == DEPTH, $sformatf("%0d double errors reported", n_dbl - d0));
    check(n_corr == c0, "no write-back of double errors");
    check(int'(rf_dbl_cnt) == n_dbl, "double error counter");

    // round 5
    fill(3);
    for (int a = 0; a < DEPTH; a++) upset(a, 8'h80 | 8'h50);   // d7, D2, D4
    @(negedge clk);
    read_all("triple upset");
    sweep_and_model();
    read_all("triple upset, after refresh");
    for (int a = 0; a < DEPTH; a++)
      check(stored[a] != ref_encode(4'(a + 3)), $sformatf("word %0d miscorrected", a));

    // round 6
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = 4'(a); wr_data = 4'b1010; stored[a] = ref_encode(4'b1010);
      @(negedge clk);
    end
    wr_en = 0;
    read_all("clean again");
    check(int'(rf_corr_cnt) == n_corr, "repair counter");

    $display("repaired=%0d parity=%0d double=%0d sweeps=%0d", n_corr, n_par, n_dbl, n_sweep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
