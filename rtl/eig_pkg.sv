// eig_pkg: types shared by the leading eigenvector generator.
//
// The generator is a folded datapath (one multiplier, one adder/subtractor,
// a >>1 rounding shifter and a comparator) sequenced by a control engine.
// This package holds the control engine's state encoding and the control
// word it hands to the datapath every cycle: which operands feed the
// multiplier and the adder, and which registers are written. The state names
// follow the main FSM of the design (idle, initial eigenvector, eigenvector
// distilling, overflow check, level shift, orthogonal process, output one
// final eigenvector); the control-word layout is this implementation's own.
package eig_pkg;

  // Main FSM states.
  typedef enum logic [2:0] {
    S_IDLE,     // waiting for start
    S_INIT,     // phi_p = [1, 1, ..., 1]
    S_DISTILL,  // phi_p = Cov * phi_p, N*N cycles
    S_CHECK,    // overflow check of phi_p, N cycles
    S_SHIFT,    // phi_p = (phi_p + 1) >> 1, N cycles
    S_ORTH,     // flipped Gram-Schmidt against one phi_j, 4*N cycles
    S_OUTPUT    // copy phi_p into the final-PC registers, N cycles
  } state_t;

  // The four N-cycle passes of one orthogonal process.
  typedef enum logic [1:0] {
    O_NORM,   // a = phi_j' * phi_j
    O_DOT,    // b = phi_p' * phi_j
    O_SCALE,  // phi_p = a * phi_p
    O_SUB     // phi_p = phi_p - b * phi_j
  } orth_phase_t;

  // Multiplier operand A (wide) source.
  typedef enum logic [2:0] {
    MA_COV,   // covariance matrix memory
    MA_PHI,   // phi_p element
    MA_PCJ,   // phi_j element from the final-PC registers
    MA_NORM,  // scalar phi_j' * phi_j
    MA_DOT    // scalar phi_p' * phi_j
  } mul_a_t;

  // Multiplier operand B (BW bits) source.
  typedef enum logic {
    MB_PHI,   // phi_p element (fits BW bits after the level check)
    MB_PCJ    // phi_j element
  } mul_b_t;

  // Adder's other operand.
  typedef enum logic [1:0] {
    AD_ZERO,  // start of an accumulation
    AD_ACC,   // running partial sum
    AD_PHI    // phi_p element (the scaled vector of the orthogonal process)
  } addend_t;

  // Datapath control word, produced combinationally by the control engine.
  typedef struct packed {
    mul_a_t  mul_a;
    mul_b_t  mul_b;
    addend_t addend;
    logic    sub;        // adder subtracts the product
    logic    acc_we;     // partial sum <= adder output
    logic    norm_we;    // a <= adder output
    logic    dot_we;     // b <= adder output
    logic    phi_we;     // phi element <= adder output or shifter output
    logic    phi_wnext;  // write the other bank (distilling)
    logic    shift_sel;  // phi write data comes from the shifter
    logic    phi_init;   // set the working bank to all ones
    logic    bank_flip;  // swap working / next bank
    logic    chk_en;     // comparator result is valid this cycle
    logic    pc_we;      // final-PC register write
  } dp_ctrl_t;

endpackage
