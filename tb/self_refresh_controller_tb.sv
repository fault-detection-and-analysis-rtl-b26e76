// self_refresh_controller_tb: the scrubbing controller on a small array
// (8 words, a word every 4 cycles) modelled in the testbench.
// The memory model has the array's port timing: a granted read returns its
// word in the next cycle, a write is stored at the edge that takes it.
//   Sweep 1, ports always granted: words with a single error, a parity-bit
//     error and a double error are planted; after one sweep the first two
//     kinds must be repaired, the double error left in place and reported,
//     the counters must match, and refresh reads must come exactly INTERVAL
//     cycles apart.
//   Sweep 2, ports granted at random: more errors planted; every one must be
//     repaired, and stalled reads and write-backs must have occurred.
//   Collision: the user writes a faulty word right after the refresh read
//     it; the write-back must be dropped and the user's word kept.
module self_refresh_controller_tb;
  import secded_pkg::*;
  import secded_ref_pkg::*;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned INTERVAL = 4;

  int checks = 0, failures = 0;
  int n_corr = 0, n_par = 0, n_dbl = 0, n_drop = 0, n_sweep = 0;
  int n_rd_stall = 0, n_wr_stall = 0;
  int last_rd = -1, rd_gap_bad = 0, n_rd = 0;
  longint cyc = 0;

  logic clk = 0, rst_n = 0, en = 0;
  logic rd_req, wr_req, rd_gnt = 1, wr_gnt = 1;
  logic [2:0] rd_addr, wr_addr, ev_addr;
  code_t rd_data, wr_data;
  logic usr_wr = 0;
  logic [2:0] usr_waddr = '0;
  code_t usr_wdata = '0;
  logic corrected, parity_fix, dbl, dropped, sweep;
  syn_t ev_syn;
  logic [15:0] corr_cnt, dbl_cnt;
  typedef enum {FIXED, RANDOM} grant_mode_t;
  grant_mode_t grants;

  code_t mem [DEPTH];
  logic       rpend = 0;
  logic [2:0] rrow = '0;

  self_refresh_controller #(.DEPTH(DEPTH), .INTERVAL(INTERVAL)) dut (
    .clk(clk), .rst_n(rst_n), .enable_i(en),
    .rd_req_o(rd_req), .rd_addr_o(rd_addr), .rd_gnt_i(rd_gnt), .rd_data_i(rd_data),
    .wr_req_o(wr_req), .wr_addr_o(wr_addr), .wr_data_o(wr_data), .wr_gnt_i(wr_gnt),
    .usr_wr_i(usr_wr), .usr_waddr_i(usr_waddr),
    .corrected_o(corrected), .parity_fix_o(parity_fix), .double_err_o(dbl),
    .dropped_o(dropped), .event_addr_o(ev_addr), .event_syn_o(ev_syn),
    .sweep_done_o(sweep), .corrected_cnt_o(corr_cnt), .double_cnt_o(dbl_cnt));

  always #5 clk = ~clk;

  // memory model and event counters
  assign rd_data = rpend ? mem[rrow] : '1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    rpend <= rd_req && rd_gnt;
    if (rd_req && rd_gnt) begin
      rrow <= rd_addr;
      n_rd++;
      if (grants == FIXED && last_rd >= 0 && cyc - longint'(last_rd) != longint'(INTERVAL)) rd_gap_bad++;
      last_rd = int'(cyc);
    end
    if (usr_wr) mem[usr_waddr] <= usr_wdata;
    else if (wr_req && wr_gnt) mem[wr_addr] <= wr_data;
    if (rd_req && !rd_gnt) n_rd_stall++;
    if (wr_req && !wr_gnt) n_wr_stall++;
    if (corrected)  n_corr++;
    if (parity_fix) n_par++;
    if (dbl)        n_dbl++;
    if (dropped)    n_drop++;
    if (sweep)      n_sweep++;
  end

  always @(negedge clk) begin
    if (grants == RANDOM) begin
      rd_gnt <= ($urandom_range(0, 1) == 1);
      wr_gnt <= ($urandom_range(0, 1) == 1);
    end else begin
      rd_gnt <= 1'b1;
      wr_gnt <= 1'b1;
    end
  end

  task automatic wait_sweeps(input int n);
    int target;
    target = n_sweep + n;
    while (n_sweep < target) @(posedge clk);
    @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    grants = FIXED;
    for (int a = 0; a < DEPTH; a++) mem[a] = ref_encode(4'(a + 3));
    mem[1] ^= 8'h04;           // single error at position 3 (D1)
    mem[3] ^= 8'h80;           // overall parity bit
    mem[5] ^= 8'h30;           // double error
    mem[6] ^= 8'h01;           // single error at position 1 (P1)
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    wait_sweeps(1);
    for (int a = 0; a < DEPTH; a++)
      if (a == 5) check(mem[a] == (ref_encode(4'(a + 3)) ^ 8'h30), "double error word untouched");
      else        check(mem[a] == ref_encode(4'(a + 3)), $sformatf("word %0d scrubbed", a));
    check(corr_cnt == 3 && n_corr == 3, $sformatf("3 repairs, got %0d/%0d", corr_cnt, n_corr));
    check(n_par == 1, "one parity-bit repair");
    check(dbl_cnt == 1 && n_dbl == 1, "one double error reported");
    check(rd_gap_bad == 0 && n_rd >= DEPTH, $sformatf("reads every %0d cycles", INTERVAL));

    // sweep 2 with contention
    grants = RANDOM;
    mem[5] = ref_encode(4'(8));
    for (int a = 0; a < DEPTH; a++) mem[a] = ref_encode(4'(a)) ^ (8'd1 << (a % 8));
    wait_sweeps(2);
    for (int a = 0; a < DEPTH; a++)
      check(mem[a] == ref_encode(4'(a)), $sformatf("word %0d scrubbed under contention", a));
    check(int'(corr_cnt) == 3 + DEPTH, $sformatf("repair count %0d", corr_cnt));
    check(n_rd_stall > 0, "refresh read stalled");
    check(n_wr_stall > 0, "refresh write-back stalled");

    // collision: user rewrites the word between refresh read and write-back
    grants = FIXED;
    @(negedge clk);
    mem[2] ^= 8'h10;
    while (!(rd_req && rd_gnt && rd_addr == 3'd2)) @(negedge clk);
    @(negedge clk);            // controller is now checking word 2
    usr_wr = 1; usr_waddr = 3'd2; usr_wdata = ref_encode(4'hE);
    @(negedge clk);
    usr_wr = 0;
    repeat (4) @(negedge clk);
    check(n_drop == 1, $sformatf("write-back dropped (%0d)", n_drop));
    check(mem[2] == ref_encode(4'hE), "user word kept");
    check(ev_addr == 3'd2, "event address");

    $display("repairs=%0d parity=%0d double=%0d dropped=%0d rd_stall=%0d wr_stall=%0d",
             n_corr, n_par, n_dbl, n_drop, n_rd_stall, n_wr_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
