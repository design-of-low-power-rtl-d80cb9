// csla_mux2: one-bit 2:1 multiplexer, the selecting element of the carry
// select cell.
//
// y = d0 when sel is 0, y = d1 when sel is 1. Purely combinational.
// Ports: d0, d1 (data inputs), sel (select), y (output). In the carry select
// cell, sel is the carry arriving from the previous bit, d0 is the value
// precomputed for a carry-in of 0 and d1 the value for a carry-in of 1.
// The multiplexer is a gate-level primitive in the original design; here it
// is written behaviourally and left to synthesis to map.
module csla_mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);
  always_comb y = sel ? d1 : d0;
endmodule
