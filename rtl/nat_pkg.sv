// nat_pkg: constants and constant functions shared by the (n,d)-NAT codec.
//
// The NAT code forbids two adjacent 1s in a codeword (a 1 means "this bus
// line toggles"). The number of valid n-bit codewords is the Fibonacci number
// Fb(n+2), and code bit C(k) carries the weight Fb(k+1), so a data word is the
// sum of the weights of its set code bits. Everything the encoder and decoder
// need is therefore the Fibonacci sequence, evaluated here at elaboration
// time: no codeword table is stored anywhere.
//
// Fibonacci numbering follows the usual convention Fb(1) = Fb(2) = 1,
// Fb(3) = 2, Fb(4) = 3, Fb(5) = 5, which matches the worked example of a
// 3-bit data word on a 4-bit code (weights 5, 3, 2, 1).
package nat_pkg;

  // Width of the elaboration-time arithmetic. 128 bits covers data words up
  // to 127 bits, well past the widest (72-bit) bus the codec is sized for.
  localparam int unsigned FIB_W = 128;

  typedef logic [FIB_W-1:0] fib_t;

  // k-th Fibonacci number, Fb(0) = 0, Fb(1) = Fb(2) = 1.
  function automatic fib_t fib(input int unsigned k);
    fib_t a, b, t;
    if (k == 0) return '0;
    a = 1;
    b = 1;
    for (int unsigned i = 3; i <= k; i++) begin
      t = a + b;
      a = b;
      b = t;
    end
    return b;
  endfunction

  // Smallest code length n whose codeword count Fb(n+2) reaches 2^d, i.e.
  // the number of bus lines needed to carry d data bits.
  function automatic int unsigned nat_code_bits(input int unsigned d);
    int unsigned n;
    fib_t words;
    words = fib_t'(1) << d;
    n = 1;
    while (fib(n + 2) < words) n++;
    return n;
  endfunction

endpackage
