// lop_ref_pkg: reference functions for the testbenches, written from the
// arithmetic definitions rather than from the hardware's equations.
// Words are passed as numbers of up to 64 bits with n significant bits; the
// MSB, bit 0 in the design's numbering, is numeric bit n-1.
package lop_ref_pkg;

  localparam int SYM_Z = 0;
  localparam int SYM_T = 1;
  localparam int SYM_G = 2;

  function automatic longint unsigned mask(input int n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 1);
  endfunction

  // symbol at design bit i (0 = MSB)
  function automatic int sym(input longint unsigned a, input longint unsigned b,
                             input int n, input int i);
    logic x, y;
    x = a[n-1-i];
    y = b[n-1-i];
    return (x & y) ? SYM_G : ((x ^ y) ? SYM_T : SYM_Z);
  endfunction

  // Does the prefix of length len match Z*, T*GZ*, G*, T*ZG* or a prefix of
  // them? Checked by scanning the symbols directly.
  function automatic bit prefix_ok(input longint unsigned a, input longint unsigned b,
                                   input int n, input int len);
    int k;
    int first;
    bit all_same;
    // skip leading T's
    k = 0;
    while (k < len && sym(a, b, n, k) == SYM_T) k++;
    if (k == len) return 1;            // T*
    first = sym(a, b, n, k);
    // after T^k and one non-T symbol, the rest must be Z (after G) or G (after Z)
    all_same = 1;
    for (int m = k + 1; m < len; m++)
      if (sym(a, b, n, m) != ((first == SYM_G) ? SYM_Z : SYM_G)) all_same = 0;
    if (all_same) return 1;            // T*GZ* or T*ZG*
    if (k == 0) begin                  // Z* or G*
      all_same = 1;
      for (int m = 1; m < len; m++)
        if (sym(a, b, n, m) != first) all_same = 0;
      if (all_same) return 1;
    end
    return 0;
  endfunction

  function automatic int match_len(input longint unsigned a, input longint unsigned b,
                                   input int n);
    int len = 0;
    while (len < n && prefix_ok(a, b, n, len + 1)) len++;
    return len;
  endfunction

  // carry into design bit i of a + b + cin
  function automatic bit carry_into(input longint unsigned a, input longint unsigned b,
                                    input bit cin, input int n, input int i);
    int r;
    longint unsigned lo;
    r = n - 1 - i;
    if (r == 0) return cin;
    lo = (a & mask(r)) + (b & mask(r)) + 64'(cin);
    return lo[r];
  endfunction

  // number of leading bits of an n-bit word equal to its first bit
  function automatic int run_len(input longint unsigned v, input int n);
    int k = 0;
    while (k < n && v[n-1-k] == v[n-1]) k++;
    return k;
  endfunction

  // leading zeros of an n-bit word
  function automatic int lzc(input longint unsigned v, input int n);
    int k = 0;
    while (k < n && v[n-1-k] == 1'b0) k++;
    return k;
  endfunction

endpackage
