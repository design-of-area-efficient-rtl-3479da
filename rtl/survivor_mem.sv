// survivor_mem -- survivor (decision) memory of the Viterbi decoder.
//
// Holds NBANK*BLK columns, each the NSTATE-bit decision vector of one trellis step. The
// columns are grouped in NBANK blocks of BLK, addressed as {block, column}. One write port
// stores the vector coming from the ACS; two independent read ports, one for the traceback
// pointer and one for the decoder, each return the decision bit of one state in one column,
// so the two units can walk different blocks in the same cycle.
//
// Implementation: a register array (the published design keeps the survivor information
// in a bank of registers) with a synchronous write and asynchronous reads. The contents are
// not reset; the controller reads no column before writing it. The 64-column size split
// into four blocks follows the published design.
module survivor_mem #(
  parameter int NSTATE = 64,
  parameter int NBANK  = 4,
  parameter int BLK    = 16,
  localparam int AW    = $clog2(NBANK * BLK),
  localparam int SW    = $clog2(NSTATE)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [NSTATE-1:0] wdata,
  input  logic [AW-1:0]     raddr_tb,
  input  logic [SW-1:0]     rsel_tb,
  output logic              rbit_tb,
  input  logic [AW-1:0]     raddr_dc,
  input  logic [SW-1:0]     rsel_dc,
  output logic              rbit_dc
);

  logic [NSTATE-1:0] mem [NBANK * BLK];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rbit_tb = mem[raddr_tb][rsel_tb];
  assign rbit_dc = mem[raddr_dc][rsel_dc];

endmodule
