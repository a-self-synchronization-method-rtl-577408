// sscsc_pkg - constants and code tables shared by the SS-CSC transmitter,
// frame synchronizer and receiver.
//
// Chips are one bit wide throughout: 0 stands for +1 and 1 for -1, so the
// product of two chips is their XOR.  The default sizes are the main
// configuration of the numerical study: K = 3 code-select bits (M = 8 chips
// per sequence), N = 3 polarity bits (constraint length L = N = 3), racing
// counter stages m = 3 and n = 10.
//
// The document only says the codes PN_i are orthogonal and that A(t) is a
// spreading code of period L*M chips.  This design's choices: PN_i are the
// Walsh-Hadamard rows, chip j of code i = parity(i & j), and A(t) is the
// first L*M output bits of the 10-stage maximal LFSR a[k+10] = a[k+3] xor a[k]
// (primitive polynomial x^10 + x^3 + 1) whose first ten bits a[0..9] are the
// bits of A_SEED, least significant first.  B(t) = A(t) * A(t - T) is
// derived from A.
//
// Choice of A_SEED: inside a frame the code PN_i cancels in the
// differential product, so a synchronizer that is off by d chips sees B(t)
// shifted by d.  A seed whose B matches its own shifts closely makes some
// wrong offsets look right almost every frame, and the synchronizer then
// never leaves them.  For K = 3, L = 3 the seed 1 has two offsets that
// pass in three frames of four; A_SEED = 594 was picked by trying all seeds
// because no wrong offset yields a +1 decision in more than about one frame
// in eight with random data.
package sscsc_pkg;

  localparam int unsigned DEF_K  = 3;   // code-select bits, M = 2^K
  localparam int unsigned DEF_N  = 3;   // polarity bits per frame
  localparam int unsigned DEF_M1 = 3;   // stages of racing counter C1 (m)
  localparam int unsigned DEF_N2 = 10;  // stages of racing counter C2 (n)
  localparam int unsigned DEF_SW = 8;   // received sample width (own choice)

  // First ten bits of A(t); see above.
  localparam logic [9:0] A_SEED = 10'd594;

  // Longest frame (L*M chips) the code tables support.
  localparam int unsigned MAX_FRAME = 4096;

  // Constraint length, Eq. (1): L = 1 for N = 0, L = N otherwise.
  function automatic int unsigned constraint_len(int unsigned n);
    return (n == 0) ? 1 : n;
  endfunction

  // Chip j of Walsh-Hadamard code i (0 = +1).
  function automatic logic walsh_chip(int unsigned i, int unsigned j);
    return ^(i & j);
  endfunction

  // A(t): bit p of the result is chip p of the frame (0 = +1).
  function automatic logic [MAX_FRAME-1:0] a_code_bits(int unsigned len);
    logic [MAX_FRAME-1:0] a;
    logic [9:0] s;
    a = '0;
    s = A_SEED;
    for (int unsigned p = 0; p < MAX_FRAME; p++) begin
      if (p < len) a[p] = s[0];
      s = {s[0] ^ s[3], s[9:1]};
    end
    return a;
  endfunction

  // B(t) = A(t) * A(t - T): bit j (j = 0 .. (L-1)M-1) belongs to frame chip
  // j + M and is A[j + M] xor A[j].
  function automatic logic [MAX_FRAME-1:0] b_code_bits(int unsigned len, int unsigned m);
    logic [MAX_FRAME-1:0] a, b;
    a = a_code_bits(len);
    b = '0;
    for (int unsigned j = 0; j + m < MAX_FRAME; j++)
      if (j + m < len) b[j] = a[j + m] ^ a[j];
    return b;
  endfunction

endpackage
