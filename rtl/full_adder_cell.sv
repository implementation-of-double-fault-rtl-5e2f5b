// full_adder_cell: the one-bit full adder that the design protects.
//
//   sum  = a ^ b ^ cin
//   cout = a&b | b&cin | cin&a
//
// Each output then passes through a fault site controlled by `fault`
// (see dft_fa_pkg): with fault = NO_FAULT the cell is an ordinary full
// adder; any other value corrupts the sum, the carry or both, which is how
// single and double faults are produced for the checker downstream. The
// equations are the standard ones used by the design; the fault sites are
// this implementation's own means of fault injection. Purely combinational.
module full_adder_cell
  import dft_fa_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  fault_ctl_t fault,  // fault on sum and on carry
  output logic       sum,
  output logic       cout
);
  logic sum_good, cout_good;

  always_comb begin
    sum_good  = a ^ b ^ cin;
    cout_good = (a & b) | (b & cin) | (cin & a);
    sum       = apply_fault(sum_good, fault.sum);
    cout      = apply_fault(cout_good, fault.cout);
  end
endmodule
