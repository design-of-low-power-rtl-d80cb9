// csla_pkg: constants shared by the carry select adder modules.
//
// CSLA_WIDTH is the operand width of the adder, 16 bits as in the design
// this RTL follows. The top-level adder uses it as the default of its WIDTH
// parameter, and the testbenches use it to size their reference arithmetic.
package csla_pkg;
  localparam int unsigned CSLA_WIDTH = 16;
endpackage
