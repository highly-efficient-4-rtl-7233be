// Reference model for the testbenches of the approximate 4:2 compressors.
//
// Computes the expected outputs of design I or II from the truth tables of
// their adder cells (an 8-entry constant per cell), chained as the compressor
// chains them: stage 1 on {x1,x2,x3}, stage 2 on {stage-1 sum, x4, cin}.
// It also returns the exact value X1+X2+X3+X4+Cin and the value the outputs
// encode, Sum + 2*(Cout + Carry). Behavioural, for simulation only.
package approx_compressor_ref;

  import compressor_pkg::*;

  localparam logic [7:0] CBAA2_CARRY = 8'hF8;  // a | (b & c)
  localparam logic [7:0] CBAA4_CARRY = 8'hE8;  // majority(a, b, c)

  function automatic comp_out_t expected(input int variant, input comp_in_t x);
    logic [7:0] tt;
    logic       s1;
    comp_out_t  y;
    tt      = (variant == 1) ? CBAA2_CARRY : CBAA4_CARRY;
    y.cout  = tt[{x.x1, x.x2, x.x3}];
    s1      = ~y.cout;
    y.carry = tt[{s1, x.x4, x.cin}];
    y.sum   = ~y.carry;
    return y;
  endfunction

  function automatic int exact_value(input comp_in_t x);
    return int'(x.x1) + int'(x.x2) + int'(x.x3) + int'(x.x4) + int'(x.cin);
  endfunction

  function automatic int encoded_value(input comp_out_t y);
    return int'(y.sum) + 2 * (int'(y.cout) + int'(y.carry));
  endfunction

endpackage
