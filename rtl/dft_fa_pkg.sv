// dft_fa_pkg: types shared by the fault tolerant full adder.
//
// The adder protects one full adder cell whose two outputs (sum and carry)
// can each be hit by a fault. A single fault corrupts one output, a double
// fault corrupts both at once. To exercise the checker and repair logic the
// cell takes a fault-control input per output. The fault models (stuck-at-0,
// stuck-at-1, bit flip) are this design's choice; the transient and permanent
// faults they stand for are the ones the self-checking scheme is meant to
// catch.
package dft_fa_pkg;

  // Fault placed on one output net of the full adder cell.
  typedef enum logic [1:0] {
    FLT_NONE = 2'd0,  // output driven by the correct logic
    FLT_SA0  = 2'd1,  // output stuck at 0
    FLT_SA1  = 2'd2,  // output stuck at 1
    FLT_FLIP = 2'd3   // output inverted (transient upset)
  } fault_e;

  // Faults on both outputs of the cell; both non-NONE is a double fault.
  typedef struct packed {
    fault_e sum;
    fault_e cout;
  } fault_ctl_t;

  localparam fault_ctl_t NO_FAULT = '{sum: FLT_NONE, cout: FLT_NONE};

  // Value seen on a net carrying `good` when fault `f` is present.
  function automatic logic apply_fault(input logic good, input fault_e f);
    unique case (f)
      FLT_NONE: return good;
      FLT_SA0:  return 1'b0;
      FLT_SA1:  return 1'b1;
      FLT_FLIP: return ~good;
      default:  return good;
    endcase
  endfunction

endpackage
