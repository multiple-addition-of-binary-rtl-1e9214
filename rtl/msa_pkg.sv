// msa_pkg -- constants shared by the multiple serial adders.
//
// All adders in this library add m two's-complement numbers that arrive bit
// serially, least significant bit first, one bit of every addend per clock
// ("one column per clock").  The functions below size the parallel counters
// and the carry memories from m:
//
//   cnt_bits(p)   q, the number of outputs of a (p;q) counter, the smallest q
//                 with p < 2^q.
//   fb_carries(n) c, the number of carries of a counter that takes n addends
//                 plus its own fed-back carries: the smallest c with
//                 2^(c+1) - 1 >= n + c.  The counter is then (n+c ; c+1).
//   sum_ext(m)    the number of bits the sum needs beyond the addends' n
//                 bits: the integer part of log2(m), plus one.
//
// The carry condition and the sum length are the ones of the class 1 scheme
// description; the functions themselves are plain constant arithmetic.
package msa_pkg;

  function automatic int cnt_bits(input int p);
    int q;
    q = 1;
    while ((1 << q) <= p) q++;
    return q;
  endfunction

  function automatic int fb_carries(input int n);
    int c;
    c = 0;
    while (((1 << (c + 1)) - 1) < (n + c)) c++;
    return c;
  endfunction

  function automatic int sum_ext(input int m);
    return cnt_bits(m);
  endfunction

endpackage
