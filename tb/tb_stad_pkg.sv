// tb_stad_pkg: reference decoding of digit fields for the testbenches.
//
// Written independently of the design package: each function spells out the value table
// of a digit format directly, so a testbench compares the design against these tables
// rather than against the design's own conversion code.
package tb_stad_pkg;

  // <1^w>: bit set means +1 (w = 0) or -1 (w = 1).
  function automatic int v1(int w, logic b);
    if (!b) return 0;
    return (w == 0) ? 1 : -1;
  endfunction

  // <2^w> format 2. Returns 99 for a pattern the format does not use.
  function automatic int v2(int w, logic [1:0] f);
    case (w)
      0: case (f) 2'b00: return 0; 2'b01: return 1; 2'b10: return 2; default: return 99; endcase
      2: case (f) 2'b00: return 0; 2'b01: return -1; 2'b10: return -2; default: return 99; endcase
      default: case (f) 2'b00: return 0; 2'b01: return 1; 2'b11: return -1; default: return 99; endcase
    endcase
  endfunction

  // Pattern of <2^w> for value v (v must lie in -w .. 2-w).
  function automatic logic [1:0] f2(int w, int v);
    for (int i = 0; i < 4; i++)
      if (v2(w, 2'(i)) == v) return 2'(i);
    return 2'b00;
  endfunction

  // Random legal <2^w> pattern.
  function automatic logic [1:0] rnd2(int w);
    return f2(w, int'($urandom_range(0, 2)) - w);
  endfunction

  // <4^2> digit {h, l[1:0]}: -2h + l.
  function automatic int vsd4(logic [2:0] d);
    return -2 * int'(d[2]) + v2(0, d[1:0]);
  endfunction

  // <20^10> digit {h1, l1[1:0], h0, l0[1:0]}.
  function automatic int vsd16(logic [5:0] d);
    return -8 * int'(d[5]) + 4 * v2(0, d[4:3]) - 2 * int'(d[2]) + v2(0, d[1:0]);
  endfunction

  // <9^0> digit {a, b[1:0], c}.
  function automatic int vdec(logic [3:0] d);
    return 4 * int'(d[3]) + 2 * v2(0, d[2:1]) + int'(d[0]);
  endfunction

  // Random legal digits.
  function automatic logic [2:0] rnd_sd4();
    return {1'($urandom_range(0, 1)), rnd2(0)};
  endfunction

  function automatic logic [5:0] rnd_sd16();
    return {1'($urandom_range(0, 1)), rnd2(0), 1'($urandom_range(0, 1)), rnd2(0)};
  endfunction

  function automatic logic [3:0] rnd_dec();
    return {1'($urandom_range(0, 1)), rnd2(0), 1'($urandom_range(0, 1))};
  endfunction

endpackage
