// rsa_pkg: types and constants shared by the RSA exponentiation core and
// its parallel-port front end.
//
// The controller state encoding follows the state names of the two flow
// charts of the design: the square-and-multiply machine (IDLE, WAIT AND LOAD,
// ENTER MONPRO DOMAIN, RSA_SQUARE, RSA_MULTIPLY, EXIT MONPRO DOMAIN, ADD
// RESULT CS) and the states added for the randomized table window method
// (PREPROCESS 1..3 and the normalizing multiplication). The split of each
// flow-chart box into an issue state and a wait state is this design's own.
package rsa_pkg;

  typedef enum logic [4:0] {
    ST_IDLE,        // clear flags and counters
    ST_WAIT_LOAD,   // accept operand loads, wait for start
    ST_PRE1_GO,     // RT-WM phase 1: start one compare/subtract on the CRPA
    ST_PRE1_WAIT,   //   wait for the CRPA, keep the difference if no borrow
    ST_ENTER_GO,    // M' = MonPro(M, Const)
    ST_ENTER_WAIT,
    ST_PRE2_GO,     // RT-WM phase 2: R' = R' * M' for 2^b - 1 times
    ST_PRE2_WAIT,
    ST_PRE3_GO,     // RT-WM phase 3: V_i = V_(i-1) * U for 2^t - 1 times
    ST_PRE3_WAIT,
    ST_EXP_INIT,    // RT-WM: point the table at the first window
    ST_EXP_FIRST,   // RT-WM: R' = V(first window)
    ST_NEXT,        // decide: square, multiply, or leave the loop
    ST_SQ_GO,       // RSA_SQUARE
    ST_SQ_WAIT,
    ST_MUL_GO,      // RSA_MULTIPLY
    ST_MUL_WAIT,
    ST_NORM_GO,     // RSA_MULT_FIN (normalize with Q)
    ST_NORM_WAIT,
    ST_EXIT_GO,     // EXIT MONPRO DOMAIN: R = MonPro(R', 1)
    ST_EXIT_WAIT,
    ST_ADD_GO,      // ADD RESULT CS: R = RC + RS on the CRPA
    ST_ADD_WAIT,
    ST_RDY          // result valid
  } rsa_state_t;

  // Commands of the parallel-port front end, on ControlPort[2:1], executed on
  // a rising edge of the strobe ControlPort[0].
  typedef enum logic [1:0] {
    CMD_WRITE_BYTE = 2'b00,  // shift DataPort into the word assembly register
    CMD_LOAD_SHIFT = 2'b01,  // push the word into the M->E->N->Const chain
    CMD_LOAD_M     = 2'b10,  // write the word into M only
    CMD_START      = 2'b11   // start one exponentiation
  } pc_cmd_t;

endpackage
