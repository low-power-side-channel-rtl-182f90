// ncl_pkg: shared types and helpers for the dual-rail Null Convention Logic
// (NCL) S-Box.
//
// Every Boolean signal of the datapath is carried on two wires. The rail
// pair {r1, r0} encodes NULL (00, the spacer between two data items),
// DATA0 (01, logic 0) and DATA1 (10, logic 1); 11 is illegal. A bus is
// "DATA" when every bit is DATA0 or DATA1 and "NULL" when every bit is NULL.
// The helper functions are for testbenches and assertions; the hardware
// itself is built from threshold gates only.
package ncl_pkg;

  typedef struct packed {
    logic r1;  // DATA1 rail
    logic r0;  // DATA0 rail
  } dr_t;

  localparam dr_t DR_NULL  = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_DATA0 = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1 = '{r1: 1'b1, r0: 1'b0};

  // Dual-rail encoding of a Boolean value.
  function automatic dr_t dr_enc(input logic b);
    return b ? DR_DATA1 : DR_DATA0;
  endfunction

  // Logical inversion, also XOR with the constant 1: swap the rails.
  function automatic dr_t dr_not(input dr_t a);
    return '{r1: a.r0, r0: a.r1};
  endfunction

  function automatic logic dr_is_data(input dr_t a);
    return a.r1 ^ a.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t a);
    return a == DR_NULL;
  endfunction

endpackage
