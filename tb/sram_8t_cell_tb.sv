// sram_8t_cell_tb: drives the word and bit lines of one 8T cell by hand.
// Writes 0 and 1 (bit lines set first, then a WWL pulse), reads through the
// read stack (RBL discharged only for Q = 0, never with RWL low), checks
// that a WWL pulse with both bit lines precharged keeps the value, that
// reading leaves the value unchanged, and that an SEU strike flips it.
module sram_8t_cell_tb;

  int checks = 0, failures = 0;
  logic wwl = 0, bl = 1, blb = 1, rwl = 0, seu = 0;
  logic pull;

  sram_8t_cell dut (.wwl(wwl), .bl(bl), .blb(blb), .rwl(rwl), .seu(seu), .rbl_pull(pull));

  task automatic write_bit(input logic v);
    bl = v; blb = ~v; #1;
    wwl = 1; #1;
    wwl = 0; #1;
    bl = 1; blb = 1; #1;
  endtask

  // returns the value seen on the precharged read bit line
  task automatic read_bit(output logic v);
    rwl = 1; #1;
    v = ~pull;
    rwl = 0; #1;
  endtask

  task automatic expect_bit(input logic want, input string what);
    logic v;
    read_bit(v);
    checks++;
    if (v != want) begin failures++; $display("FAIL %s: read %b", what, v); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    checks++;
    if (pull) begin failures++; $display("FAIL read stack active with RWL low"); end
    write_bit(1'b0);
    expect_bit(1'b0, "write 0");
    checks++;
    if (pull) begin failures++; $display("FAIL read stack active with RWL low, Q = 0"); end
    expect_bit(1'b0, "read does not disturb");
    write_bit(1'b1);
    expect_bit(1'b1, "write 1");
    // word line pulse with precharged bit lines: hold
    wwl = 1; #1; wwl = 0; #1;
    expect_bit(1'b1, "hold with precharged bit lines");
    seu = 1; #1; seu = 0; #1;
    expect_bit(1'b0, "upset flips 1 to 0");
    seu = 1; #1; seu = 0; #1;
    expect_bit(1'b1, "upset flips 0 to 1");
    write_bit(1'b0);
    expect_bit(1'b0, "rewrite after upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
