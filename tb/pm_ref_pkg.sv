// Reference model of the addressing scheme, for the testbenches.
//
// Written with plain integer arithmetic straight from the equations of the
// scheme (case selection, the six module assignment functions, the three
// element orders and the access counts), independently of the RTL's bit
// manipulations. Addresses are modelled without wrap-around; the tests keep
// patterns inside the array.
package pm_ref_pkg;

  function automatic int cdiv(int a, int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int log2i(int x);
    int r = 0;
    while ((1 << (r + 1)) <= x) r++;
    return r;
  endfunction

  // s of S = sigma * 2^s
  function automatic int ref_s(int S);
    int s = 0;
    while (S % 2 == 0 && S > 0) begin S = S / 2; s++; end
    return s;
  endfunction

  function automatic bit is_pow2(int x);
    for (int g = 0; g < 31; g++) if (x == (1 << g)) return 1;
    return 0;
  endfunction

  // Case I..VI of one side.
  function automatic int ref_mode(int S, int GL, int BL, int D);
    int  s = ref_s(S);
    int  d = log2i(D);
    bit  lt = cdiv(BL, D) * GL < cdiv(GL, D) * BL;
    if (s == 0) return lt ? 1 : 2;
    if (is_pow2(GL)) return (s >= d) ? 5 : 6;
    if (!lt) return 2;
    return (s >= d) ? 3 : 4;
  endfunction

  // Module assignment functions, eqs. (7), (14), (16), (18), (21).
  function automatic int ref_m(int a, int mode, int S, int GL, int D);
    int s = ref_s(S);
    int d = log2i(D);
    case (mode)
      3: return (a + (a / D) / (2 ** (s - d))) % D;
      4: return (a + (a / D) % (2 ** s)) % D;
      5: return (a + GL * ((a / D) / (2 ** (s - d)))) % D;
      6: return (a + (GL * (a / D)) % (2 ** s)) % D;
      default: return a % D;
    endcase
  endfunction

  // Number of accesses of one side: (9), (12) or (19).
  function automatic int ref_t(int mode, int GL, int BL, int D);
    case (mode)
      1, 3, 4: return cdiv(BL, D) * GL;
      2:       return cdiv(GL, D) * BL;
      default: return cdiv(GL * BL, D);
    endcase
  endfunction

  // Lane addresses of all accesses of one side, D entries per access,
  // -1 for an unused lane.
  function automatic void ref_seq(int b, int S, int GL, int BL, int D, int mode,
                                  ref int q[$]);
    q.delete();
    case (mode)
      1, 3, 4:
        for (int k = 0; k < GL; k++)
          for (int i0 = 0; i0 < BL; i0 += D)
            for (int p = 0; p < D; p++)
              q.push_back((i0 + p < BL) ? b + (i0 + p) * S + k : -1);
      2:
        for (int i = 0; i < BL; i++)
          for (int k0 = 0; k0 < GL; k0 += D)
            for (int p = 0; p < D; p++)
              q.push_back((k0 + p < GL) ? b + i * S + k0 + p : -1);
      default:
        for (int e0 = 0; e0 < GL * BL; e0 += D)
          for (int p = 0; p < D; p++)
            q.push_back((e0 + p < GL * BL) ? b + ((e0 + p) / GL) * S + (e0 + p) % GL : -1);
    endcase
  endfunction

endpackage
