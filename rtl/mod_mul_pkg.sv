// Shared types and elaboration-time helpers of the radix-8 Booth encoded
// modulo 2^n-1 multiplier.
//
// booth_digit_t is the signed one-hot radix-8 Booth digit passed from a Booth
// encoder to its Booth selector: a sign bit and one select line per magnitude
// 1..4; all magnitude lines low means a zero digit (sign may then be set,
// the "-0" code 1111).
//
// The functions describe the placement of the partially-redundant partial
// products. Every biased multiple B+d*X consists of an n-bit sum word and
// M = n/k sparse carry bits; carry bit j sits at bit position k*j+1. Partial
// product i is that multiple rotated left by 3*i, so its carry bit j lands at
// (k*j + 1 + 3*i) mod n. Carry bits of different partial products that land
// on distinct positions share one row of the CSA tree; where positions
// collide, further rows are opened (q_row, num_qrows). For n=8, k=4 all six
// carry bits fall on different positions and form a single row.
package mod_mul_pkg;

  typedef struct packed {
    logic neg;    // digit is negative: complement the selected multiple
    logic four;   // |d| = 4
    logic three;  // |d| = 3 (hard multiple)
    logic two;    // |d| = 2
    logic one;    // |d| = 1
  } booth_digit_t;

  // Number of radix-8 Booth digits of an n-bit unsigned multiplier.
  function automatic int num_pp(input int n);
    return n / 3 + 1;
  endfunction

  // Bit position of carry bit j of partial product i.
  function automatic int q_pos(input int n, input int k, input int i, input int j);
    return (k * j + 1 + 3 * i) % n;
  endfunction

  // Row taken by carry bit j of partial product i: the number of carry bits
  // ahead of it (in order of i, then j) that land on the same position.
  function automatic int q_row(input int n, input int k, input int i, input int j);
    int r;
    r = 0;
    for (int a = 0; a < num_pp(n); a++)
      for (int b = 0; b < n / k; b++)
        if ((a < i || (a == i && b < j)) && q_pos(n, k, a, b) == q_pos(n, k, i, j))
          r++;
    return r;
  endfunction

  // Number of rows needed to hold all carry bits.
  function automatic int num_qrows(input int n, input int k);
    int r;
    r = 0;
    for (int a = 0; a < num_pp(n); a++)
      for (int b = 0; b < n / k; b++)
        if (q_row(n, k, a, b) + 1 > r)
          r = q_row(n, k, a, b) + 1;
    return r;
  endfunction

  // Number of CSA levels needed to bring `rows` operands down to two when
  // every level packs as many 3:2 compressors as it can.
  function automatic int rows_after(input int rows, input int levels);
    int r;
    r = rows;
    for (int l = 0; l < levels; l++)
      if (r > 2) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int csa_levels(input int rows);
    int l;
    l = 0;
    while (rows_after(rows, l) > 2) l++;
    return l;
  endfunction

endpackage
