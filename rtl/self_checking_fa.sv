// self_checking_fa: full adder cell with an on-line checker that localises a
// fault to the sum output, the carry output or both.
//
// The checker rebuilds each output from the inputs by a second route and
// compares it with the cell's output:
//   G1 = b | cin, G2 = b & cin, MUX-1 (select a) -> c1      reference carry
//   G3 = a & b & cin, eqt = a'b'c' + abc (functional_unit)
//   MUX-2 (select eqt) chooses G3 when all inputs are equal and ~c1 otherwise
//                                                      -> s1  reference sum
//   G4: fc = XNOR(c1, cout)     G5: fs = XNOR(s1, sum)
// The sum rule rests on the fact that a full adder's sum equals its carry for
// inputs 000 and 111 and is the complement of the carry for every other
// input. Because the two flags are formed independently, a fault on both
// outputs at once (a double fault) clears both flags, which a single
// parity-style error signal would miss.
//
// Flag polarity: fc/fs = 1 means the output is fault free, 0 means it is
// faulty (XNOR comparators, as in the checker's truth table).
// The gate structure follows the design; the checker itself is assumed
// fault free. Purely combinational: flags are valid in the same cycle as the
// inputs.
module self_checking_fa
  import dft_fa_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  fault_ctl_t fault,  // fault injected on the cell outputs
  output logic       sum,    // cell sum (possibly faulty)
  output logic       cout,   // cell carry (possibly faulty)
  output logic       fs,     // 1: sum fault free, 0: sum faulty
  output logic       fc      // 1: carry fault free, 0: carry faulty
);
  logic g1, g2, g3, eqt, c1, c1_n, s1;

  full_adder_cell u_fa (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .fault(fault),
    .sum  (sum),
    .cout (cout)
  );

  functional_unit u_fu (
    .a  (a),
    .b  (b),
    .c  (cin),
    .eqt(eqt)
  );

  always_comb begin
    g1   = b | cin;       // G1
    g2   = b & cin;       // G2
    g3   = a & b & cin;   // G3
    c1_n = ~c1;           // inverter feeding MUX-2
  end

  // MUX-1: a = 1 -> carry is b|cin, a = 0 -> carry is b&cin
  mux2 #(.WIDTH(1)) u_mux1 (.in0(g2), .in1(g1), .sel(a), .y(c1));

  // MUX-2: equal inputs -> sum equals carry (= abc), else sum = ~carry
  mux2 #(.WIDTH(1)) u_mux2 (.in0(c1_n), .in1(g3), .sel(eqt), .y(s1));

  always_comb begin
    fc = ~(c1 ^ cout);    // G4 (XNOR)
    fs = ~(s1 ^ sum);     // G5 (XNOR)
  end
endmodule
