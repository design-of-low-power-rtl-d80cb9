// novel_csla16: 16-bit carry select adder built from one-bit cells that
// share the common Boolean logic term.
//
// Each bit position is a cbl_csla_cell: it precomputes its sum and carry-out
// for both possible carry-in values (XOR/INV for the sum, AND/OR for the
// carry) as soon as the operands arrive, and the incoming carry only has to
// pass one 2:1 multiplexer per bit. The carry-out of cell i drives the
// select of cell i+1, so the carry travels through a chain of WIDTH
// multiplexers. Building the adder from sixteen identical cells follows the
// original design; the cin and cout ports at the ends of the chain are a
// choice of this RTL, so that adders can be cascaded and a carry-in used.
//
// Parameters: WIDTH, operand width (default csla_pkg::CSLA_WIDTH = 16).
// Ports: a, b (WIDTH-bit operands), cin (carry into bit 0), sum (WIDTH bits,
// a + b + cin modulo 2**WIDTH), cout (carry out of the top bit).
// Timing: purely combinational, no clock or reset; the result is valid one
// propagation delay after the inputs change.
module novel_csla16
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = CSLA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // carry[i] is the carry into bit i; carry[WIDTH] leaves the adder.
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    cbl_csla_cell u_cell (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (carry[i]),
      .sum  (sum[i]),
      .cout (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
