// mb_pkg: types shared by the multiplier block and the filters built around it.
//
// A multiplier block is described as a small netlist of two-input adders. Node 0 is the block
// input x; adder k (k = 1, 2, ...) produces node k from two earlier nodes, each shifted left by a
// constant and optionally negated:
//     node[k] = (+/-)(node[a] << sa) + (+/-)(node[b] << sb)
// Each coefficient output then picks one node, shifted left and optionally negated, or is zero.
// Shifts are wires, so only the adders cost hardware; the number of adders passed on the longest
// path from x to an output is the block's "adder-step" count, its delay measure.
// The encoding (field widths, node numbering) is this design's own choice.
package mb_pkg;

  // Widths of the fields of one graph entry; they bound a block to 255 adders and shifts of 63.
  localparam int IDX_W = 8;
  localparam int SH_W  = 6;

  typedef struct packed {
    logic [IDX_W-1:0] a;    // first operand node
    logic [IDX_W-1:0] b;    // second operand node
    logic [SH_W-1:0]  sa;   // left shift of the first operand
    logic [SH_W-1:0]  sb;   // left shift of the second operand
    logic             na;   // negate the first operand
    logic             nb;   // negate the second operand
  } mb_add_t;

  typedef struct packed {
    logic [IDX_W-1:0] node; // node holding the odd (or shifted) part of the product
    logic [SH_W-1:0]  sh;   // left shift applied to that node
    logic             neg;  // negate the result
    logic             zero; // coefficient is zero: output constant 0
  } mb_out_t;

  // Number of non-zero digits in the canonic signed digit (CSD) form of a non-negative value.
  function automatic int csd_weight(input longint v);
    int n = 0;
    while (v != 0) begin
      if (v[0]) begin
        n++;
        v = v - ((v[1]) ? -1 : 1);  // digit -1 when v mod 4 == 3, else +1
      end
      v = v >>> 1;
    end
    return n;
  endfunction

endpackage
