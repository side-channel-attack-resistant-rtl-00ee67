// fe_regfile -- register file of GF(2^M) field elements.
//
// Holds the operands and intermediate values of the point operations: the
// affine base point P, the running Jacobian point S, the curve constants, the
// new point (NX, NY, NZ), temporaries and the dummy results of the balanced
// doubling (register map in ecc_pkg). It plays the part of the field-element
// variables of the document's point-operation routines.
//
// Three asynchronous read ports (A and B feed the field operations, C lets the
// scalar controller read the result out) and one synchronous write port.
// Every entry resets to zero. A write is visible on the read ports from the
// next clock cycle. Organisation and port count are this design's choice.
module fe_regfile #(
  parameter int unsigned  M     = 131,
  parameter int unsigned  DEPTH = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [M-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  input  logic [AW-1:0] raddr_c,
  output logic [M-1:0]  rdata_a,
  output logic [M-1:0]  rdata_b,
  output logic [M-1:0]  rdata_c
);

  logic [M-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
  assign rdata_c = mem[raddr_c];

endmodule
