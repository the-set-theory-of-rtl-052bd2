// stad_pkg: digit-set formats shared by every decomposition operator.
//
// A digit set <d^w> holds the d+1 consecutive integers -w .. d-w. Every operator in
// this library works on the binary <1^w> and ternary <2^w> digit sets, each carried on a
// 2-bit field (a <1^w> digit uses bit 0 only). The mapping of values to bits (the
// "format") makes arithmetic zero the all-zeros pattern:
//   <1^0> : bit 1 = +1            <1^1> : bit 1 = -1
//   <2^0> : {g,e}, value = 2g+e   (11 unused)
//   <2^2> : {g,e}, value = -(2g+e) (11 unused)
//   <2^1> : {g,e}, e is the magnitude and g the sign: 01 = +1, 11 = -1 (10 unused)
// The <2^0>/<2^2> mappings and the single-bit mapping are those of the binary and ternary
// format tables ("format 2" for the ternary sets); the sign/magnitude reading of <2^1> is
// this library's choice.
//
// Internally an operator converts each field to its offset code (value + w, an unsigned
// number 0..d), adds codes, splits the code sum between its outputs, and converts back.
// Because offsets are conserved across an operator, code arithmetic equals value arithmetic.
package stad_pkg;

  typedef logic [1:0] dfield_t;  // one digit of a <1^w> or <2^w> digit set

  // Radix-4 signed digit <4^2> = {-2..2}, held as 2<1^1> + <2^0>.
  typedef struct packed {
    logic       h;  // <1^1> at weight 2: 1 means -2
    logic [1:0] l;  // <2^0> at weight 1, format 2
  } sd4_t;

  // Decimal digit <9^0> = {0..9}, held as 4<1^0> + 2<2^0> + <1^0>.
  typedef struct packed {
    logic       a;  // <1^0> at weight 4
    logic [1:0] b;  // <2^0> at weight 2, format 2
    logic       c;  // <1^0> at weight 1
  } dec_t;

  // Radix-16 signed digit <20^10> = {-10..10}, held as 8<1^1> + 4<2^0> + 2<1^1> + <2^0>.
  typedef struct packed {
    logic       h1;  // <1^1> at weight 8: 1 means -8
    logic [1:0] l1;  // <2^0> at weight 4
    logic       h0;  // <1^1> at weight 2: 1 means -2
    logic [1:0] l0;  // <2^0> at weight 1
  } sd16_t;

  function automatic int sd16_val(sd16_t d);
    return -8 * int'(d.h1) + 4 * (2 * int'(d.l1[1]) + int'(d.l1[0]))
           - 2 * int'(d.h0) + (2 * int'(d.l0[1]) + int'(d.l0[0]));
  endfunction

  function automatic int sd4_val(sd4_t d);
    return 2 * int'(d.l[1]) + int'(d.l[0]) - 2 * int'(d.h);
  endfunction

  function automatic int dec_val(dec_t d);
    return 4 * int'(d.a) + 2 * (2 * int'(d.b[1]) + int'(d.b[0])) + int'(d.c);
  endfunction

  // Field -> offset code (0 .. d).
  function automatic int unsigned to_code(int unsigned d, int unsigned w, dfield_t f);
    int unsigned m;
    m = 2 * int'(f[1]) + int'(f[0]);
    if (d == 1) return (w == 0) ? int'(f[0]) : 1 - int'(f[0]);
    if (w == 0) return m;
    if (w == 2) return 2 - m;
    // <2^1>: sign/magnitude
    if (!f[0]) return 1;
    return f[1] ? 0 : 2;
  endfunction

  // Offset code -> field.
  function automatic dfield_t from_code(int unsigned d, int unsigned w, int unsigned c);
    if (d == 1) return (w == 0) ? dfield_t'(c & 1) : dfield_t'((1 - c) & 1);
    if (w == 0) return dfield_t'(c);
    if (w == 2) return dfield_t'(2 - c);
    case (c)
      0:       return 2'b11;
      2:       return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  // Single-bit shorthands for the <1^w> digit sets.
  function automatic int unsigned code1(int unsigned w, logic b);
    return (w == 0) ? int'(b) : 1 - int'(b);
  endfunction

  function automatic logic bit1(int unsigned w, int unsigned c);
    return (w == 0) ? (c != 0) : (c == 0);
  endfunction

  // Field -> signed value.
  function automatic int to_val(int unsigned d, int unsigned w, dfield_t f);
    return int'(to_code(d, w, f)) - int'(w);
  endfunction

  // Signed value -> field.
  function automatic dfield_t from_val(int unsigned d, int unsigned w, int v);
    return from_code(d, w, int'(v + int'(w)));
  endfunction

  // True when the field is one of the legal patterns of <d^w>.
  function automatic bit legal(int unsigned d, int unsigned w, dfield_t f);
    if (d == 1) return !f[1];
    if (w == 1) return f != 2'b10;
    return f != 2'b11;
  endfunction

endpackage
