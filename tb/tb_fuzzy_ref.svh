// tb_fuzzy_ref.svh: reference fuzzy operators for the testbenches, written
// from the definitions with plain integer arithmetic on codes 0..one.
// ops: 0 max-min, 1 algebraic, 2 bounded, 3 drastic.
`ifndef TB_FUZZY_REF_SVH
`define TB_FUZZY_REF_SVH
function automatic int ref_tn(int ops, int a, int b, int one);
  case (ops)
    0: return (a < b) ? a : b;
    1: return (a * b) / one;
    2: return (a + b > one) ? a + b - one : 0;
    default: return (a == one) ? b : ((b == one) ? a : 0);
  endcase
endfunction

function automatic int ref_sn(int ops, int a, int b, int one);
  case (ops)
    0: return (a > b) ? a : b;
    1: return a + b - (a * b) / one;
    2: return (a + b < one) ? a + b : one;
    default: return (a == 0) ? b : ((b == 0) ? a : one);
  endcase
endfunction
`endif
