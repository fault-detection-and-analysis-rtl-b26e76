// sram_8t_array_tb: the 8T array macro model with its clocked ports.
// Writes a random word to every row, reads each back one cycle after the
// request, writes and reads in the same cycle (different rows, then a read
// of a row in the cycle after its write), checks the precharged value when
// no read is in progress, and flips single cells with strikes, checking
// that exactly that bit changes. Expected contents are kept in a plain
// array in the testbench.
module sram_8t_array_tb;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned WIDTH = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic we = 0, re = 0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [DEPTH-1:0][WIDTH-1:0] seu = '0;
  logic [WIDTH-1:0] model [DEPTH];

  sram_8t_array #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .re_i(re), .raddr_i(raddr), .rdata_o(rdata), .seu_i(seu));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // inputs change at the falling edge, outputs are checked just before the
  // next rising edge
  task automatic cycle();
    @(negedge clk);
  endtask

  task automatic check_read(input int row, input string what);
    re = 1; raddr = 4'(row); cycle();
    re = 0;
    #4;  // late in the data cycle
    checks++;
    if (rdata != model[row]) begin
      failures++; $display("FAIL %s row %0d: %h expected %h", what, row, rdata, model[row]);
    end
    cycle();
  endtask

  initial begin
    repeat (2) cycle();
    rst_n = 1;
    cycle();
    checks++;
    if (rdata != '1) begin failures++; $display("FAIL idle read lines %h", rdata); end
    for (int r = 0; r < DEPTH; r++) begin
      we = 1; waddr = 4'(r); wdata = WIDTH'($urandom); model[r] = wdata;
      cycle();
    end
    we = 0;
    cycle();
    for (int r = 0; r < DEPTH; r++) check_read(r, "read back");
    // write one row while reading another in the same cycle
    we = 1; waddr = 4'd3; wdata = 8'hA5; model[3] = 8'hA5;
    re = 1; raddr = 4'd9;
    cycle();
    we = 0; re = 0;
    checks++;
    if (rdata != model[9]) begin failures++; $display("FAIL simultaneous read %h", rdata); end
    cycle();
    check_read(3, "after simultaneous write");
    // read in the cycle right after a write to the same row: new word
    we = 1; waddr = 4'd7; wdata = 8'h3C; model[7] = 8'h3C;
    cycle();
    we = 0; re = 1; raddr = 4'd7;
    cycle();
    re = 0;
    #4;
    checks++;
    if (rdata != 8'h3C) begin failures++; $display("FAIL read after write %h", rdata); end
    cycle();
    // strikes on single cells
    for (int k = 0; k < 20; k++) begin
      int r, c;
      r = $urandom_range(0, DEPTH - 1);
      c = $urandom_range(0, WIDTH - 1);
      seu[r][c] = 1'b1; #1; seu[r][c] = 1'b0;
      model[r][c] = ~model[r][c];
      check_read(r, "after strike");
    end
    for (int r = 0; r < DEPTH; r++) check_read(r, "final");
    checks++;
    if (rdata != '1) begin failures++; $display("FAIL idle read lines %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
