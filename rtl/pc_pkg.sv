// pc_pkg: shared sizing rules of the polyphase convolver.
//
// Every size in the convolver follows from four numbers: the sample length
// n_x, the weight length n_w, the number of convolution terms N and the
// sample separation n_px (idle bit times between the sign bit of one sample
// and the least significant bit of the next). From them:
//   n'    = ceil(log2 N)          headroom bits for accumulating N products
//   n_y   = n_x + n_w + n'        length of one convolved output Y_k
//   n_tx  = n_x + n_px            sampling period in clock cycles
//   p_m   = ceil(n_y / n_tx)      minimum number of phases (output ports)
//   n_pym = p_m*n_tx - n_y        idle bits between outputs of one phase
// For two's-complement operands every product is formed as an array of
// non-negative terms plus the constant C_1 = -2^(n_x+n_w-1) + 2^(n_x-1) +
// 2^(n_w-1); the N constants are added once at the output as C_N = N*C_1.
// The exponent n_x+n_w-1 of the first term is derived here from the term
// complementing rule and checked by simulation.
package pc_pkg;

  function automatic int nprime_f(input int n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  function automatic int ny_f(input int nx, input int nw, input int np);
    return nx + nw + np;
  endfunction

  // ceil(ny / ntx): procedure (A)
  function automatic int pm_f(input int ny, input int ntx);
    return (ny + ntx - 1) / ntx;
  endfunction

  function automatic int npym_f(input int ny, input int ntx);
    return pm_f(ny, ntx) * ntx - ny;
  endfunction

  // number of weights whose gate arrays overlap one stage: ceil(n_w / n_tx)
  function automatic int kov_f(input int nw, input int ntx);
    return (nw + ntx - 1) / ntx;
  endfunction

  // C_N = N * C_1, reduced modulo 2^ny (ny <= 63)
  function automatic logic [63:0] cn_f(input int nx, input int nw, input int n, input int ny);
    longint c1;
    longint cn;
    c1 = -(longint'(1) <<< (nx + nw - 1)) + (longint'(1) <<< (nx - 1)) + (longint'(1) <<< (nw - 1));
    cn = longint'(n) * c1;
    return 64'(cn) & ((64'd1 << ny) - 64'd1);
  endfunction

endpackage
