// rd_pkg - shared types and constants of the decision-tree ransomware classifier.
//
// The classifier reads six memory-forensics features of a process snapshot and
// decides benign or ransomware with a trained decision tree mapped to comparators.
// Every feature is a signed 32-bit fixed-point number carrying round(x * 1000), so
// a real threshold such as 116.5 becomes the integer 116500 and 0.041 becomes 41.
// The thresholds, the reference value and the tolerance are the trained model's
// constants; the scale of 1000 is inferred from them. The struct order F1..F6 is
// the order in which the features feed comparators C1..C5 and C4a.
package rd_pkg;

  localparam int unsigned FEAT_W     = 32;    // fixed-point feature width
  localparam int unsigned N_FEATURES = 6;
  localparam int          Q_SCALE    = 1000;  // real value x is held as round(x * Q_SCALE)

  typedef logic signed [FEAT_W-1:0] feat_t;

  // F1..F6, F1 in the most significant 32 bits of the packed vector.
  typedef struct packed {
    feat_t svcscan_shared_process_services;        // F1
    feat_t svcscan_process_services;               // F2
    feat_t handles_nevent;                         // F3
    feat_t handles_nthread;                        // F4
    feat_t handles_nmutant;                        // F5
    feat_t psxview_not_in_ethread_pool_false_avg;  // F6
  } feature_vec_t;

  // Embedded thresholds of the trained tree (real value x 1000).
  localparam feat_t T1 = 32'sd116500;   // svcscan.shared_process_services <= 116.5
  localparam feat_t T2 = 32'sd25000;    // svcscan.process_services       <= 25.0
  localparam feat_t T3 = 32'sd3368500;  // handles.nevent                 <= 3368.5
  localparam feat_t T4 = 32'sd886500;   // handles.nthread                <= 886.5
  localparam feat_t T5 = 32'sd262000;   // handles.nmutant                <= 262.0
  localparam feat_t T6 = 32'sd41;       // psxview.not_in_ethread_pool_false_avg <= 0.041

  // Reference and tolerance of the F5 distance check (comparator C6).
  localparam feat_t REF_VALUE = 32'sd100;
  localparam feat_t TOLERANCE = 32'sd2000;

  // Width of the F5 - REF_VALUE difference: one guard bit, so it never overflows.
  localparam int unsigned DIFF_W = FEAT_W + 1;

  typedef enum logic {
    CMP_GT = 1'b0,  // hit = feature >  threshold
    CMP_LE = 1'b1   // hit = feature <= threshold
  } cmp_mode_e;

  typedef enum logic {
    CLASS_BENIGN     = 1'b0,
    CLASS_RANSOMWARE = 1'b1
  } class_e;

  // Flags of the seven comparators as they enter the priority decision module.
  typedef struct packed {
    logic c1;   // F1 >  T1
    logic c2;   // F2 >  T2
    logic c3;   // F3 >  T3
    logic c4;   // F4 >  T4
    logic c4a;  // F6 <= T6
    logic c5;   // F5 >  T5
    logic c6;   // |F5 - REF_VALUE| < TOLERANCE
  } cmp_flags_t;

endpackage
