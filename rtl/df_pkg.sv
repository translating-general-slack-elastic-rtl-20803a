// Shared types for the synchronous dataflow element library.
//
// Every channel in this library is a valid/ready/data bundle: a token moves
// on a rising clock edge where valid and ready are both high, and a producer
// keeps valid and data steady until that happens. The only shared type is the
// operation a FUNC element applies to its inputs.
package df_pkg;

  // Function applied by df_func. FN_ADD sums all inputs (wrapping), FN_NOT
  // inverts input 0 bit by bit.
  typedef enum logic [0:0] {
    FN_ADD = 1'b0,
    FN_NOT = 1'b1
  } func_op_e;

endpackage
