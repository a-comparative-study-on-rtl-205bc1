// Shared types of the radix-4 Booth multiplier.
//
// The stage select signals are carried as a small struct: 'two' chooses 2M
// over M, 'op' chooses whether the stage keeps, adds or subtracts it.
// adder_kind_e names the two adder architectures the multiplier can be
// built with: a ripple-carry adder or a modified square-root carry-select
// adder. The encodings are this design's own choice.
package booth_pkg;

  typedef enum logic [1:0] {
    PP_ZERO = 2'b00,  // digit 0: keep the running value
    PP_ADD  = 2'b01,  // digit +1 or +2
    PP_SUB  = 2'b10   // digit -1 or -2
  } pp_op_e;

  typedef struct packed {
    logic   two;  // use 2M instead of M
    pp_op_e op;
  } booth_sel_t;

  typedef enum logic {
    ADDER_RCA        = 1'b0,
    ADDER_MSQRT_CSLA = 1'b1
  } adder_kind_e;

endpackage
