// tb_ref_pkg: reference convolution used by the unit-level testbenches.
//
// conv_ref computes, for an n x n block u and a kh x kw filter h, the sum
//   y[r][c] = sum h[ky*kw+kx] * u[r+ky-kh/2][c+kx-kw/2]
// in 64-bit integers, with zero (repl = 0) or replicated (repl = 1) borders,
// then rounds to nearest and shifts right by sh bits and clamps to a signed
// 32-bit word. It is written from the accelerators' specification, not from
// their RTL.
package tb_ref_pkg;
  function automatic void conv_ref(input logic [31:0] u[], input logic [31:0] h[],
                                   input int n, input int kh, input int kw,
                                   input bit repl, input int sh, ref logic [31:0] y[]);
    y = new[n*n];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        longint acc = 0;
        for (int ky = 0; ky < kh; ky++)
          for (int kx = 0; kx < kw; kx++) begin
            int rr = r + ky - kh/2;
            int cc = c + kx - kw/2;
            if (!repl && (rr < 0 || rr >= n || cc < 0 || cc >= n)) continue;
            rr = (rr < 0) ? 0 : (rr > n-1) ? n-1 : rr;
            cc = (cc < 0) ? 0 : (cc > n-1) ? n-1 : cc;
            acc += longint'(signed'(u[rr*n+cc])) * longint'(signed'(h[ky*kw+kx]));
          end
        if (sh > 0) acc = (acc + (longint'(1) << (sh-1))) >>> sh;
        if (acc > 64'sd2147483647)  acc = 64'sd2147483647;
        if (acc < -64'sd2147483648) acc = -64'sd2147483648;
        y[r*n+c] = acc[31:0];
      end
  endfunction
endpackage
