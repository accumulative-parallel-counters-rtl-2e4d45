// apc_pkg: constants and elaboration-time functions shared by the
// accumulative parallel counter (APC) modules.
//
// cpc_width(n) gives the output width of the recursive full-adder parallel
// counter built by cpc / cpc_pipe: n = 1 is a wire, n = 2 a half adder and
// n >= 3 is split as n = a + b + 1 with a = (n-1)/2, the two sub-counts being
// added by a ripple-carry adder whose carry-in takes the extra input.
// cpc_pipe_base(n) is the latency, in clock cycles, of bit 0 of the bit-level
// pipelined counter cpc_pipe; bit j of its output follows j cycles later.
package apc_pkg;

  function automatic int unsigned cpc_width(input int unsigned n);
    int unsigned a, b, wa, wb;
    if (n <= 1) return 1;
    if (n == 2) return 2;
    a  = (n - 1) / 2;
    b  = n - 1 - a;
    wa = cpc_width(a);
    wb = cpc_width(b);
    return ((wa > wb) ? wa : wb) + 1;
  endfunction

  function automatic int unsigned cpc_pipe_base(input int unsigned n);
    int unsigned a, b, ba, bb;
    if (n <= 1) return 0;
    if (n == 2) return 1;
    a  = (n - 1) / 2;
    b  = n - 1 - a;
    ba = cpc_pipe_base(a);
    bb = cpc_pipe_base(b);
    return ((ba > bb) ? ba : bb) + 1;
  endfunction

  // Number of bits needed to hold the value v (at least 1).
  function automatic int unsigned bits_for(input longint unsigned v);
    int unsigned w;
    w = 1;
    while ((v >> w) != 0) w++;
    return w;
  endfunction

endpackage
