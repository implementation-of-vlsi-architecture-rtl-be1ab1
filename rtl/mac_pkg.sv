// mac_pkg -- shared types of the multiply-accumulate unit.
//
// mac_addr_e is the register address map of the operand registers: the first
// operand register answers at a primary address (write starts a
// multiply-accumulate) and at an alias address (write starts a multiply that
// leaves the accumulator alone); the second operand register has one address.
// The encoding is this design's choice.
package mac_pkg;
  typedef enum logic [1:0] {
    ADDR_A       = 2'd0,  // first register, primary address: multiply and accumulate
    ADDR_A_ALIAS = 2'd1,  // first register, alias address: multiply only
    ADDR_B       = 2'd2,  // second register: multiply only
    ADDR_NONE    = 2'd3   // unused, writes are ignored
  } mac_addr_e;
endpackage
