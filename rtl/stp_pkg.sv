// stp_pkg: shared types, constants and helper functions of the reliable
// single-threaded-processor (STP) error detection and recovery logic.
//
// The code-width helper sizes the local-checkpoint error codes. A code that
// must detect up to MAX_ERR flipped bits needs Hamming distance MAX_ERR+1:
//   MAX_ERR = 1 : one even-parity bit                         (distance 2)
//   MAX_ERR = 2 : a plain Hamming code                        (distance 3)
//   MAX_ERR = 3 : a Hamming code plus an overall parity bit   (distance 4)
// The per-structure detection strengths (3 for ROB, register files, map table
// and ROB index table, 2 for the issue queue, 1 for the branch predictor and
// the branch reuse buffer) are the ones the design targets; the choice of
// parity/Hamming codes to reach them is this implementation's own.
package stp_pkg;

  // Recovery policy, in ascending order of aggressiveness.
  //   LDCR: lazy detection at commit, always reload the checkpoint.
  //   LDAR: lazy detection, re-execute first; a repeated error is passive and
  //         is fixed from the checkpoint.
  //   EDAR: passive errors are caught eagerly by the local codes; an error
  //         that still reaches commit is active and is simply re-executed.
  typedef enum logic [1:0] {
    MODE_LDCR = 2'd0,
    MODE_LDAR = 2'd1,
    MODE_EDAR = 2'd2
  } recov_mode_e;

  // Detection strength of each protected structure (bit errors detected).
  localparam int MAXERR_ROB       = 3;
  localparam int MAXERR_BPRED     = 1;
  localparam int MAXERR_ORIG_RF   = 3;
  localparam int MAXERR_ADD_RF    = 3;
  localparam int MAXERR_MAP       = 3;
  localparam int MAXERR_IQ        = 2;
  localparam int MAXERR_BRB       = 1;
  localparam int MAXERR_ROB_INDEX = 3;

  // Cycle costs used by the recovery controller.
  localparam int LDCR_RELOAD_CYCLES = 200;  // checkpoint reload in LDCR
  localparam int PASSIVE_FIX_CYCLES = 5;    // passive-error fix in LDAR/EDAR

  // Number of Hamming check bits r for k data bits: smallest r with
  // 2**r >= k + r + 1.
  function automatic int hamming_r(input int k);
    int r;
    r = 1;
    while ((1 << r) < (k + r + 1)) r++;
    return r;
  endfunction

  // Width of the error code for k data bits detecting max_err bit errors.
  function automatic int edc_width(input int k, input int max_err);
    if (max_err <= 1) return 1;
    else if (max_err == 2) return hamming_r(k);
    else return hamming_r(k) + 1;
  endfunction

  function automatic int clog2_min1(input int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
