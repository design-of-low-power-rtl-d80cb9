// tb_novel_csla16: end-to-end self-checking testbench of the 16-bit carry
// select adder at its default width (no parameter override).
//
// Compares {cout, sum} with the integer sum a + b + cin computed in 32-bit
// arithmetic for: corner operands, every 16-bit value of a against its
// complement (which makes every cell propagate, so with cin = 1 the carry
// runs through all sixteen multiplexers), every single-bit generate position, every
// operand pair whose carry is generated in bit 0 and propagated by all higher
// bits,
// and 200000 random operand pairs with random carry-in. The adder is
// combinational, so each result is checked one time step after the inputs
// change (zero-cycle latency).
//
// It counts how often each behaviour of the design occurred and fails if one
// never did: cells selecting the carry-in = 1 candidates, a carry-in of 1 to
// the adder, a carry-out (unsigned overflow), a carry rippling through all
// cells, and a carry generated at bit 0 rippling to the top.
module tb_novel_csla16;
  import csla_pkg::*;
  localparam int unsigned W = CSLA_WIDTH;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0;
  int failures = 0;

  longint n_cin1 = 0;        // adder carry-in of 1
  longint n_cout = 0;        // carry out of the top cell
  longint n_full_ripple = 0; // cin = 1 passes all W propagate cells
  longint n_gen_ripple = 0;  // carry generated in bit 0 reaches the carry-out
  longint n_sel1 = 0;      // cells whose incoming carry is 1

  novel_csla16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] expected;
    logic [W:0] carries;   // carries[i] = carry into bit i, from the reference
    a = ta; b = tb_; cin = tc;
    #1;
    expected = (W+1)'(ta) + (W+1)'(tb_) + (W+1)'(tc);
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures <= 10)
        $display("a=%h b=%h cin=%0b: got cout=%0b sum=%h, expected %h",
                 ta, tb_, tc, cout, sum, expected);
    end
    // Reference carry into each bit: bits of (a + b + cin) XOR a XOR b.
    carries = expected ^ (W+1)'(ta) ^ (W+1)'(tb_);
    for (int i = 0; i < W; i++) if (carries[i]) n_sel1++;
    if (tc) n_cin1++;
    if (expected[W]) n_cout++;
    if (tc && ((ta ^ tb_) == '1)) n_full_ripple++;
    if (!tc && ta[0] && tb_[0] && ((ta[W-1:1] ^ tb_[W-1:1]) == '1)) n_gen_ripple++;
  endtask

  task automatic require(input string what, input longint count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("behaviour never exercised: %s", what);
    end else
      $display("%-40s %0d", what, count);
  endtask

  initial begin : stimulus
    logic [W-1:0] ra, rb;
    // Corner operands.
    for (int c = 0; c < 2; c++) begin
      apply('0, '0, 1'(c));
      apply('1, '0, 1'(c));
      apply('0, '1, 1'(c));
      apply('1, '1, 1'(c));
      apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'(c));
    end
    // Every a against its complement: all cells propagate.
    for (int v = 0; v < (1 << W); v++) begin
      ra = W'(v);
      apply(ra, ~ra, 1'b0);
      apply(ra, ~ra, 1'b1);
    end
    // A carry generated at each bit position and propagated upwards.
    for (int i = 0; i < W; i++) begin
      ra = W'(1) << i;
      apply(ra, ~W'(0) & ~(ra - W'(1)), 1'b0);
      apply(ra, ra, 1'b1);
    end
    // A carry generated in bit 0 that every higher cell propagates.
    for (int v = 0; v < (1 << (W-1)); v++) begin
      ra = {(W-1)'(v), 1'b1};
      apply(ra, {~ra[W-1:1], 1'b1}, 1'b0);
    end
    // Random operands and carry-in.
    for (int n = 0; n < 200000; n++) begin
      ra = W'($urandom);
      rb = W'($urandom);
      apply(ra, rb, 1'($urandom));
    end

    require("cells selecting the cin=1 candidates", n_sel1);
    require("adder carry-in of 1", n_cin1);
    require("carry-out (unsigned overflow)", n_cout);
    require("carry-in rippling through all cells", n_full_ripple);
    require("bit-0 generate rippling to carry-out", n_gen_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
