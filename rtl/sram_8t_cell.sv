// sram_8t_cell: behavioural model of an 8T SRAM bit cell (not synthesizable
// logic; it stands for a transistor-level cell).
//
// The cell is a 6T core (two cross-coupled inverters holding Q and QB, with
// access transistors to BL and BLB gated by the write word line WWL) plus a
// two-transistor read stack that is decoupled from the storage node.
//   Write: BL and BLB are driven to complementary levels, then WWL is raised;
//          the value on BL is stored at Q. With BL = BLB (both precharged)
//          the cell keeps its value.
//   Read:  RBL is precharged high by the column; RWL turns on the access
//          device of the read stack, and when Q = 0 the stack discharges RBL.
//          rbl_pull = 1 stands for that discharge; the column combines the
//          pulls of all its cells. Reading never disturbs Q.
//   Upset: a rising edge on seu models a particle strike that flips Q (a
//          single event upset). This pin does not exist on a real cell; it
//          is how a testbench or fault-injection source reaches the node.
// The model stores on the rising edge of WWL, so the bit lines must be stable
// before the word line rises, as in a real write. Q is not reset: like real
// SRAM it powers up at an arbitrary value. The read polarity (Q = 0
// discharges RBL, so RBL reads Q directly) follows the read-operation
// description of the cell.
module sram_8t_cell (
  input  logic wwl,
  input  logic bl,
  input  logic blb,
  input  logic rwl,
  input  logic seu,
  output logic rbl_pull
);

  logic q;

  always @(posedge wwl or posedge seu) begin
    if (seu)            q <= ~q;
    else if (bl != blb) q <= bl;
  end

  assign rbl_pull = rwl & ~q;

endmodule
