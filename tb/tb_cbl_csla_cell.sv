// tb_cbl_csla_cell: self-checking testbench of the one-bit carry select cell.
//
// Applies all eight combinations of cin, a and b and compares sum and cout
// with the one-bit carry select truth table, written out below as constants,
// and with the integer sum a + b + cin. The cell is combinational, so each
// result is checked one time step after its inputs are applied (zero-cycle
// latency). A watchdog ends the run with a failure if it hangs.
module tb_cbl_csla_cell;
  logic a, b, cin, sum, cout;
  int checks = 0;
  int failures = 0;

  // Truth table rows indexed by {cin, a, b}: expected {sum, cout}.
  localparam logic [1:0] TRUTH [8] = '{
    2'b00, 2'b10, 2'b10, 2'b01,   // cin = 0: sum "0110", carry "0001"
    2'b10, 2'b01, 2'b01, 2'b11    // cin = 1: sum "1001", carry "0111"
  };

  cbl_csla_cell dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int row = 0; row < 8; row++) begin
      {cin, a, b} = 3'(row);
      #1;
      checks++;
      if ({sum, cout} !== TRUTH[row]) begin
        failures++;
        $display("row %0d cin=%0b a=%0b b=%0b: got sum=%0b cout=%0b, table says %02b",
                 row, cin, a, b, sum, cout, TRUTH[row]);
      end
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("row %0d: {cout,sum}=%02b differs from a+b+cin", row, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
