// cdpb_pkg: types and default sizes shared by the compiler-directed
// prefetching and bypassing mechanism.
//
// The decode stage sees four kinds of instruction that matter here: a plain
// register-writing instruction, a normal load, a pref# (a prefetch that also
// names a destination register and the elements of the line it binds) and a
// load# (a load that does the same, with its first element renamed normally).
// The one-bit instruction type kept in the prefetch table tells pref# from
// load#. The encodings are this design's choice.
package cdpb_pkg;

  // Operation class at the rename stage.
  typedef enum logic [1:0] {
    OP_OTHER = 2'd0,  // writes its destination, renamed normally
    OP_LOAD  = 2'd1,  // normal load: may be bypassed by a special mapping
    OP_PREFB = 2'd2,  // pref#: binds the requested elements of a line
    OP_LOADB = 2'd3   // load#: like pref#, first element renamed normally
  } op_e;

  // Type bit stored in the Cache-Line Prefetching Table.
  typedef enum logic {
    T_PREF = 1'b0,
    T_LOAD = 1'b1
  } itype_e;

endpackage
