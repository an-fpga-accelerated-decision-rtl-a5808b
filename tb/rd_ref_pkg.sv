// rd_ref_pkg - reference model and stimulus helpers for the classifier testbenches.
//
// ref_classify walks the trained decision tree on real numbers: it turns each
// fixed-point feature back into value / 1000.0 and compares it with the tree's
// own real thresholds (116.5, 25.0, 3368.5, 886.5, 262.0, 0.041), so it shares
// no constant or comparison with the RTL. It returns the class and the leaf the
// sample reached, numbered 0..6 from the tree's first benign leaf:
//   0: F1 > 116.5                          benign
//   1: F1 <= 116.5, F2 > 25.0              benign
//   2: ... F3 > 3368.5, F6 <= 0.041        ransomware
//   3: ... F3 > 3368.5, F6 > 0.041         benign
//   4: ... F3 <= 3368.5, F4 <= 886.5       ransomware
//   5: ... F4 > 886.5, F5 <= 262.0         benign
//   6: ... F4 > 886.5, F5 > 262.0          ransomware
// gen_sample draws a feature vector that reaches a chosen leaf, often placing
// values within a few LSBs of a threshold, and with F5 now and then close to
// the reference value so the tolerance check is exercised both ways.
package rd_ref_pkg;
  import rd_pkg::*;

  localparam int N_LEAVES = 7;

  function automatic real to_real(feat_t v);
    return real'(v) / 1000.0;
  endfunction

  function automatic bit ref_classify(feature_vec_t f, output int leaf);
    if (!(to_real(f.svcscan_shared_process_services) <= 116.5)) begin
      leaf = 0; return 1'b0;
    end
    if (!(to_real(f.svcscan_process_services) <= 25.0)) begin
      leaf = 1; return 1'b0;
    end
    if (!(to_real(f.handles_nevent) <= 3368.5)) begin
      if (to_real(f.psxview_not_in_ethread_pool_false_avg) <= 0.041) begin
        leaf = 2; return 1'b1;
      end
      leaf = 3; return 1'b0;
    end
    if (to_real(f.handles_nthread) <= 886.5) begin
      leaf = 4; return 1'b1;
    end
    if (to_real(f.handles_nmutant) <= 262.0) begin
      leaf = 5; return 1'b0;
    end
    leaf = 6; return 1'b1;
  endfunction

  // |F5 - 0.1| < 2.0 in real units, evaluated in 64-bit integers.
  function automatic bit ref_within_tol(feature_vec_t f);
    longint d;
    d = longint'(f.handles_nmutant) - 64'sd100;
    if (d < 0) d = -d;
    return d < 64'sd2000;
  endfunction

  // A value v with v <= thr (in fixed point): mostly right at the boundary.
  function automatic feat_t pick_le(longint thr);
    longint v;
    case ($urandom_range(3))
      0:       v = thr;
      1:       v = thr - longint'($urandom_range(3));
      2:       v = thr - longint'($urandom_range(2000000));
      default: v = longint'($urandom_range(32'h7fff_ffff)) * (($urandom_range(1) == 0) ? 1 : -1);
    endcase
    if (v > thr) v = thr;
    if (v < -64'sd2147483648) v = -64'sd2147483648;
    return feat_t'(v);
  endfunction

  // A value v with v > thr.
  function automatic feat_t pick_gt(longint thr);
    longint v;
    case ($urandom_range(3))
      0:       v = thr + 1;
      1:       v = thr + 1 + longint'($urandom_range(3));
      2:       v = thr + 1 + longint'($urandom_range(2000000));
      default: v = thr + 1 + longint'($urandom_range(32'h7fff_ffff));
    endcase
    if (v > 64'sd2147483647) v = 64'sd2147483647;
    return feat_t'(v);
  endfunction

  function automatic feat_t pick_any();
    case ($urandom_range(2))
      0:       return feat_t'($urandom);
      1:       return feat_t'($urandom_range(5000000));
      default: return feat_t'(100 + int'($urandom_range(4400)) - 2200);  // around REF_VALUE
    endcase
  endfunction

  // F5 when it is free: often close to the reference value.
  function automatic feat_t pick_f5();
    if ($urandom_range(1) == 0) return feat_t'(100 + int'($urandom_range(4010)) - 2005);
    return pick_any();
  endfunction

  function automatic feature_vec_t gen_sample(int leaf);
    feature_vec_t f;
    f.svcscan_shared_process_services       = pick_any();
    f.svcscan_process_services              = pick_any();
    f.handles_nevent                        = pick_any();
    f.handles_nthread                       = pick_any();
    f.handles_nmutant                       = pick_f5();
    f.psxview_not_in_ethread_pool_false_avg = pick_any();
    if (leaf == 0) begin
      f.svcscan_shared_process_services = pick_gt(116500);
      return f;
    end
    f.svcscan_shared_process_services = pick_le(116500);
    if (leaf == 1) begin
      f.svcscan_process_services = pick_gt(25000);
      return f;
    end
    f.svcscan_process_services = pick_le(25000);
    if (leaf == 2 || leaf == 3) begin
      f.handles_nevent = pick_gt(3368500);
      f.psxview_not_in_ethread_pool_false_avg = (leaf == 2) ? pick_le(41) : pick_gt(41);
      return f;
    end
    f.handles_nevent = pick_le(3368500);
    if (leaf == 4) begin
      f.handles_nthread = pick_le(886500);
      return f;
    end
    f.handles_nthread = pick_gt(886500);
    if (leaf == 5) begin
      // keep F5 <= 262.0, and often inside the tolerance window
      f.handles_nmutant = ($urandom_range(1) == 0) ? feat_t'(100 + int'($urandom_range(4010)) - 2005)
                                                   : pick_le(262000);
    end else begin
      f.handles_nmutant = pick_gt(262000);
    end
    return f;
  endfunction

endpackage
