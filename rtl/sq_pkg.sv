// Shared types for the digit-serial squarers.
//
// The quaternary squarer selects its term buses from the least significant
// radix-4 digit of the current operand (a0); the enum names the four cases
// of that digit. The controller and the general-radix squarer use the state
// enums below. Everything here is a naming choice of this design.
package sq_pkg;

  // Least significant radix-4 digit a0 and its residual r = a0 - 2.
  typedef enum logic [1:0] {
    A0_ZERO  = 2'd0,   // r = -2: T1+T2+T3 = 0
    A0_ONE   = 2'd1,   // r = -1: T1+T2+T3 formed directly
    A0_TWO   = 2'd2,   // r =  0: T1+T2+T3 = T1
    A0_THREE = 2'd3    // r = +1: T1 and T2+T3 summed by the adder array
  } a0_case_e;

  // Quaternary controller.
  typedef enum logic {
    C_IDLE = 1'b0,
    C_BUSY = 1'b1
  } ctrl_state_e;

  // General-radix squarer: one state per STEP of the algorithm.
  typedef enum logic [2:0] {
    G_STEP1 = 3'd0,   // idle; STEP 1 is executed when start is taken
    G_STEP2 = 3'd1,
    G_STEP3 = 3'd2,
    G_STEP4 = 3'd3,
    G_STEP5 = 3'd4,
    G_STEP6 = 3'd5,
    G_STEP7 = 3'd6,
    G_STEP8 = 3'd7
  } gen_state_e;

endpackage
