// gf_pkg - shared constants and helper functions for the GF(2^M) Koblitz-curve
// ECC core.
//
// The core is written for the five SEC 2 Koblitz curves sect163k1, sect233k1,
// sect283k1, sect409k1 and sect571k1 (field sizes M = 163, 233, 283, 409, 571),
// all in polynomial basis. Everything that depends on the curve is a function
// of the elaboration-time parameter M:
//   * field_poly_low(M)  - the irreducible polynomial F(x) without its x^M term
//   * curve_a(M)         - coefficient a of y^2 + xy = x^3 + a x^2 + 1
//   * gen_x(M), gen_y(M) - affine coordinates of the curve generator G
//   * itoh_*             - the Itoh-Tsujii addition chains used by the
//                          inversion-based divider (one chain per field size)
//   * mul_cycles, use_itoh - cycle estimates that pick the divider architecture
// The polynomials and generator points are the published SEC 2 values. The
// addition chains are the per-field exponent decompositions of the design
// (9 to 12 multiplications per inversion); the divider choice rule is also the
// design's. Packing them as functions of M is this implementation's choice.
package gf_pkg;

  localparam int MMAX = 571;
  typedef logic [MMAX-1:0] felem_max_t;

  // F(x) - x^M, i.e. the low terms of the reduction polynomial.
  function automatic felem_max_t field_poly_low(int m);
    felem_max_t f = '0;
    f[0] = 1'b1;
    case (m)
      163:     begin f[7] = 1'b1; f[6] = 1'b1; f[3] = 1'b1; end
      233:     f[74] = 1'b1;
      283:     begin f[12] = 1'b1; f[7] = 1'b1; f[5] = 1'b1; end
      409:     f[87] = 1'b1;
      571:     begin f[10] = 1'b1; f[5] = 1'b1; f[2] = 1'b1; end
      default: f = '0;
    endcase
    return f;
  endfunction

  // Only sect163k1 has a = 1; the other four Koblitz curves have a = 0. b = 1 for all.
  function automatic logic curve_a(int m);
    return (m == 163);
  endfunction

  function automatic felem_max_t gen_x(int m);
    case (m)
      163: return felem_max_t'(164'h2FE13C0537BBC11ACAA07D793DE4E6D5E5C94EEE8);
      233: return felem_max_t'(236'h17232BA853A7E731AF129F22FF4149563A419C26BF50A4C9D6EEFAD6126);
      283: return felem_max_t'(284'h503213F78CA44883F1A3B8162F188E553CD265F23C1567A16876913B0C2AC2458492836);
      409: return felem_max_t'(412'h060F05F658F49C1AD3AB1890F7184210EFD0987E307C84C27ACCFB8F9F67CC2C460189EB5AAAA62EE222EB1B35540CFE9023746);
      571: return felem_max_t'(572'h26EB7A859923FBC82189631F8103FE4AC9CA2970012D5D46024804801841CA44370958493B205E647DA304DB4CEB08CBBD1BA39494776FB988B47174DCA88C7E2945283A01C8972);
      default: return '0;
    endcase
  endfunction

  function automatic felem_max_t gen_y(int m);
    case (m)
      163: return felem_max_t'(164'h289070FB05D38FF58321F2E800536D538CCDAA3D9);
      233: return felem_max_t'(236'h1DB537DECE819B7F70F555A67C427A8CD9BF18AEB9B56E0C11056FAE6A3);
      283: return felem_max_t'(284'h1CCDA380F1C9E318D90F95D07E5426FE87E45C0E8184698E45962364E34116177DD2259);
      409: return felem_max_t'(412'h1E369050B7C4E42ACBA1DACBF04299C3460782F918EA427E6325165E9EA10E3DA5F6C42E9C55215AA9CA27A5863EC48D8E0286B);
      571: return felem_max_t'(572'h349DC807F4FBF374F4AEADE3BCA95314DD58CEC9F307A54FFC61EFC006D8A2C9D4979C0AC44AEA74FBEBBB9F772AEDCB620B01A7BA7AF1B320430C8591984F601CD4C143EF1C7A3);
      default: return '0;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Itoh-Tsujii addition chains. B_0 = a, and step i (1..itoh_steps) computes
  //   B_i = B_j * (B_l)^(2^s)      giving  B_i = a^(2^e_i - 1), e_i = e_j + e_l
  // (s always equals e_j). The last step reaches a^(2^(M-1) - 1).
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic [8:0] s;   // number of squarings applied to B_l
    logic [3:0] j;   // index of the plain factor
    logic [3:0] l;   // index of the squared factor
  } itoh_step_t;

  function automatic int itoh_steps(int m);
    case (m)
      163: return 9;
      233: return 10;
      283: return 11;
      409: return 10;
      571: return 12;
      default: return 0;
    endcase
  endfunction

  function automatic itoh_step_t mk_step(logic [8:0] s, logic [3:0] j, logic [3:0] l);
    itoh_step_t st;
    st.s = s;
    st.j = j;
    st.l = l;
    return st;
  endfunction

  // Step i, 1-based.
  function automatic itoh_step_t itoh_step(int m, int i);
    itoh_step_t st = mk_step(0, 0, 0);
    case (m)
      163: case (i)
        1: st = mk_step(1, 0, 0);    2: st = mk_step(2, 1, 1);    3: st = mk_step(4, 2, 2);
        4: st = mk_step(8, 3, 3);    5: st = mk_step(16, 4, 4);   6: st = mk_step(32, 5, 5);
        7: st = mk_step(64, 6, 6);   8: st = mk_step(32, 5, 7);   9: st = mk_step(2, 1, 8);
        default: ;
      endcase
      233: case (i)
        1: st = mk_step(1, 0, 0);    2: st = mk_step(2, 1, 1);    3: st = mk_step(4, 2, 2);
        4: st = mk_step(8, 3, 3);    5: st = mk_step(16, 4, 4);   6: st = mk_step(32, 5, 5);
        7: st = mk_step(64, 6, 6);   8: st = mk_step(64, 6, 7);   9: st = mk_step(32, 5, 8);
        10: st = mk_step(8, 3, 9);
        default: ;
      endcase
      283: case (i)
        1: st = mk_step(1, 0, 0);    2: st = mk_step(2, 1, 1);    3: st = mk_step(4, 2, 2);
        4: st = mk_step(8, 3, 3);    5: st = mk_step(16, 4, 4);   6: st = mk_step(32, 5, 5);
        7: st = mk_step(64, 6, 6);   8: st = mk_step(128, 7, 7);  9: st = mk_step(16, 4, 8);
        10: st = mk_step(8, 3, 9);   11: st = mk_step(2, 1, 10);
        default: ;
      endcase
      409: case (i)
        1: st = mk_step(1, 0, 0);    2: st = mk_step(1, 0, 1);    3: st = mk_step(3, 2, 2);
        4: st = mk_step(6, 3, 3);    5: st = mk_step(12, 4, 4);   6: st = mk_step(24, 5, 5);
        7: st = mk_step(3, 2, 6);    8: st = mk_step(51, 7, 7);   9: st = mk_step(102, 8, 8);
        10: st = mk_step(204, 9, 9);
        default: ;
      endcase
      571: case (i)
        1: st = mk_step(1, 0, 0);    2: st = mk_step(1, 0, 1);    3: st = mk_step(2, 1, 2);
        4: st = mk_step(5, 3, 3);    5: st = mk_step(10, 4, 4);   6: st = mk_step(20, 5, 5);
        7: st = mk_step(40, 6, 6);   8: st = mk_step(80, 7, 7);   9: st = mk_step(160, 8, 8);
        10: st = mk_step(160, 8, 9); 11: st = mk_step(80, 7, 10); 12: st = mk_step(10, 4, 11);
        default: ;
      endcase
      default: ;
    endcase
    return st;
  endfunction

  // Cycles of one digit-serial multiplication with D bits per clock.
  function automatic int mul_cycles(int m, int d);
    return (m + d - 1) / d;
  endfunction

  // Divider choice: the inversion chain needs M-1 squarings (one per cycle)
  // and itoh_steps(M) multiplications; the binary algorithm needs up to 2M cycles.
  function automatic bit use_itoh(int m, int d);
    return ((m - 1) + itoh_steps(m) * mul_cycles(m, d)) <= 2 * m;
  endfunction

  // Frame blocks: a 2M-bit block holds a size field of s bits and
  // floor((2M - s) / 8) data bytes. s is the smallest width from 6 up that can
  // count those bytes: 6 bits / 40 bytes for M = 163 (as in the design),
  // 7 bits for M = 283 and 409, 8 bits for M = 571.
  function automatic int blk_size_bits(int m);
    int s = 6;
    while ((2 * m - s) / 8 >= (1 << s)) s++;
    return s;
  endfunction

  function automatic int blk_bytes(int m);
    return (2 * m - blk_size_bits(m)) / 8;
  endfunction

endpackage
