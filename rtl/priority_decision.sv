// priority_decision - turns the comparator flags into the benign/ransomware class.
//
// The flags are tested in the order of the trained tree's paths, a node's
// "greater than" side being the tree's False branch:
//   C1 (F1 > T1)            -> benign
//   else C2 (F2 > T2)       -> benign
//   else C3 (F3 > T3)       -> ransomware if C4a (F6 <= T6), else benign
//   else not C4 (F4 <= T4)  -> ransomware
//   else C5 (F5 > T5)       -> ransomware, else benign
// How comparator C6 (the F5 tolerance check) should change the decision is not
// part of the trained tree, so this design leaves the class to the tree alone
// and passes C6 on as a separate status flag. Combinational, no clock.
module priority_decision
  import rd_pkg::*;
(
  input  cmp_flags_t flags,
  output class_e     cls,
  output logic       within_tol
);

  always_comb begin
    if (flags.c1)       cls = CLASS_BENIGN;
    else if (flags.c2)  cls = CLASS_BENIGN;
    else if (flags.c3)  cls = flags.c4a ? CLASS_RANSOMWARE : CLASS_BENIGN;
    else if (!flags.c4) cls = CLASS_RANSOMWARE;
    else if (flags.c5)  cls = CLASS_RANSOMWARE;
    else                cls = CLASS_BENIGN;
  end

  assign within_tol = flags.c6;

endmodule
