// sme_ram: on-chip buffer used for every array of the estimator: the vector
// banks V, M0, M1 and W (one word = the Nb values of one node), the result
// vector R and the CSR arrays of the sparse matrix.
//
// One synchronous write port and two independent read ports. Reads are
// registered: the word at ra/rb appears on qa/qb one clock edge after the
// address is presented. A read of the address being written in the same
// cycle returns the old word. The memory is not reset (a block RAM has no
// reset); the controller writes every word before it is read.
// The published design keeps these arrays in the card's global memory; holding
// them on chip, and the port arrangement, are this design's own choices.
module sme_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd,
  // read port A
  input  logic [AW-1:0]    ra,
  output logic [WIDTH-1:0] qa,
  // read port B
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] qb
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
    qa <= mem[ra];
    qb <= mem[rb];
  end

endmodule
