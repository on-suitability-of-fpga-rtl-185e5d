// vrc_ref_pkg: reference model of the VRC for the testbenches.
//
// fu_ref() gives the value of each PE function, written from the function
// table rather than from the RTL. vrc_model keeps the 25 PE registers and
// advances them one clock cycle per call of step(), using the same source
// numbering as the RTL (first column: x0, x1, x2, 0; others: the 4 outputs
// of the preceding column, x0, x1, x2, 0). Also helpers to build a
// chromosome word by word.
package vrc_ref_pkg;

  localparam int NPE = 25;
  localparam int CFG_BITS = 242;

  function automatic int fu_ref(int f, int x, int y);
    case (f)
      0:  return (x * 2) % 256;
      1:  return 255 - x;
      2:  return x | y;
      3:  return x ^ y;
      4:  return (x + y) / 4;
      5:  return (x + y) / 2;
      6:  return x & 240;
      7:  return x | 240;
      8:  return x | 15;
      9:  return (x < y) ? x : y;
      10: return (x > y) ? x : y;
      11: return x / 2;
      12: return (x + y) % 256;
      default: return x;
    endcase
  endfunction

  function automatic int word_off(int p);
    return (p < 4) ? 8 * p : 32 + 10 * (p - 4);
  endfunction

  // Put PE p's (sel1, sel2, func) into chromosome c.
  function automatic logic [CFG_BITS-1:0] set_pe(logic [CFG_BITS-1:0] c, int p,
                                                 int s1, int s2, int f);
    int sw = (p < 4) ? 2 : 3;
    int o  = word_off(p);
    for (int b = 0; b < sw; b++) c[o + b] = s1[b];
    for (int b = 0; b < sw; b++) c[o + sw + b] = s2[b];
    for (int b = 0; b < 4; b++) c[o + 2*sw + b] = f[b];
    return c;
  endfunction

  class vrc_model;
    int q[NPE];
    logic [CFG_BITS-1:0] cfg;

    function new();
      clear();
    endfunction

    function void clear();
      foreach (q[i]) q[i] = 0;
    endfunction

    function int field(int p, int which);   // 0 sel1, 1 sel2, 2 func
      int sw = (p < 4) ? 2 : 3;
      int o  = word_off(p) + which * sw;
      int w  = (which == 2) ? 4 : sw;
      int v  = 0;
      for (int b = 0; b < w; b++) v |= int'(cfg[o + b]) << b;
      return v;
    endfunction

    function int src(int p, int s, int x0, int x1, int x2);
      int prev;
      if (p < 4) begin
        case (s) 0: return x0; 1: return x1; 2: return x2; default: return 0; endcase
      end
      prev = ((p - 4) / 4) * 4;
      if (s < 4) return q[prev + s];
      case (s) 4: return x0; 5: return x1; 6: return x2; default: return 0; endcase
    endfunction

    // one clock edge with inputs x0..x2 applied
    function void step(int x0, int x1, int x2);
      int n[NPE];
      for (int p = 0; p < NPE; p++)
        n[p] = fu_ref(field(p, 2), src(p, field(p, 0), x0, x1, x2),
                      src(p, field(p, 1), x0, x1, x2));
      q = n;
    endfunction

    function int y();
      return q[NPE-1];
    endfunction
  endclass

endpackage
