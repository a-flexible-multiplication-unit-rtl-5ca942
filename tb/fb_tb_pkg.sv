// fb_tb_pkg: helpers shared by the block-level and array-level testbenches:
// LUT truth tables built from a named function of the four LUT inputs, and
// a configuration word with every field at its neutral value.
package fb_tb_pkg;
  import fb_pkg::*;

  typedef enum int {
    F_XOR3,    // in0 ^ in1 ^ in3       (sum bit of a ripple adder, carry on in3)
    F_MCSUM,   // in2 ^ (in0 & in1) ^ in3 (sum bit of a multiplier cell)
    F_IN0,     // in0
    F_AND01,   // in0 & in1
    F_ZMIX     // (in0 & in1) ^ in2 ^ in3
  } lut_fn_e;

  function automatic logic [15:0] lut_table(lut_fn_e fn);
    logic [15:0] t;
    for (int i = 0; i < 16; i++) begin
      logic [3:0] v;
      v = 4'(i);
      case (fn)
        F_XOR3:  t[i] = v[0] ^ v[1] ^ v[3];
        F_MCSUM: t[i] = v[2] ^ (v[0] & v[1]) ^ v[3];
        F_IN0:   t[i] = v[0];
        F_AND01: t[i] = v[0] & v[1];
        default: t[i] = (v[0] & v[1]) ^ v[2] ^ v[3];
      endcase
    end
    return t;
  endfunction

  function automatic fb_cfg_t cfg_idle();
    fb_cfg_t c;
    c = '0;
    c.out_x = OUT_FX;
    c.out_y = OUT_FY;
    c.fl_x  = FL_FLOP;
    c.fl_y  = FL_FLOP;
    return c;
  endfunction
endpackage
