// cbl_csla_cell: one-bit carry select cell with a shared common Boolean
// logic term.
//
// A one-bit full adder's sum for carry-in 1 is the inverse of its sum for
// carry-in 0, and its carry-out is a AND b for carry-in 0 and a OR b for
// carry-in 1. The cell therefore precomputes both candidates with four gates
// and lets the carry-in select between them:
//   sum0  = a XOR b      (sum if cin = 0)
//   sum1  = NOT sum0     (sum if cin = 1; the shared term)
//   cout0 = a AND b      (carry-out if cin = 0)
//   cout1 = a OR  b      (carry-out if cin = 1)
// and two 2:1 multiplexers driven by cin give sum and cout. This gate
// structure (XOR + INV + AND + OR + 2 MUX) is the one of the original design;
// writing the multiplexer as its own module is a choice of this RTL.
//
// Ports: a, b (operand bits), cin (carry-in, select of both multiplexers),
// sum, cout. Purely combinational: cin to sum/cout is one multiplexer deep,
// which is the critical path through a cell when cells are chained.
module cbl_csla_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic sum0, sum1, cout0, cout1;

  always_comb begin
    sum0  = a ^ b;
    sum1  = ~sum0;
    cout0 = a & b;
    cout1 = a | b;
  end

  csla_mux2 u_sum_mux  (.d0(sum0),  .d1(sum1),  .sel(cin), .y(sum));
  csla_mux2 u_cout_mux (.d0(cout0), .d1(cout1), .sel(cin), .y(cout));
endmodule
