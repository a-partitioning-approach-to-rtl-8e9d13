// ftarith_pkg: types and helpers shared by the partitioned fault-tolerant
// arithmetic units.
//
// add_kind_e chooses how the (n/m)-bit sub-adder of the fault-tolerant adder
// is built: a ripple chain of full adders (ADD_RCA) or a ripple chain of 4-bit
// carry-lookahead blocks (ADD_CLA). Both are the two adder types the design
// is evaluated with. maj3 is the bitwise 2-out-of-3 majority used by every
// voter. NREP is the replication factor of the voting scheme (three copies of
// one partition, as in triple modular redundancy).
package ftarith_pkg;

  typedef enum logic {
    ADD_RCA = 1'b0,
    ADD_CLA = 1'b1
  } add_kind_e;

  localparam int unsigned NREP = 3;

  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
