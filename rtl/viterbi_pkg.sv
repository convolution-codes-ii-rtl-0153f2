// viterbi_pkg: types, constants and small functions shared by the rate-1/2,
// constraint-length-3 encoder and Viterbi decoder.
//
// Trellis convention (shared by encoder, ACS array and trace-back): a state
// is the 2-bit content of the encoder shift register, J = {newest, older},
// and a new data bit x enters on the left, so from state {a,b} input x leads
// to state {x,a}.  The predecessors of state {x,a} are {a,0} ("upper") and
// {a,1} ("lower"); the came_from bit stored for a state is 0 for the upper and
// 1 for the lower predecessor, so the previous state is {J[0], p}.
//
// Code generators: z1 = x ^ s1 ^ s0 (111) and z1 is sent first,
// z0 = x ^ s0 (101), where {s1,s0} is the current state.  These were chosen
// because they reproduce every path metric of the worked trellis example in
// the source material; they are the common K=3 code.
//
// Channel sampling positions within one r+w period: the encoder drives z1 on
// counts 1..RW/2 and z0 on the remaining counts; the serial-to-parallel
// samples z1 at max(1, RW/2-1) and z0 at RW/2+1 (2 and 4 for RW = 6).
package viterbi_pkg;

  localparam int unsigned NSTATES = 4;

  typedef logic [1:0] state_t;   // {newest bit, older bit}
  typedef logic [1:0] symbol_t;  // {z1, z0}

  // Encoder output for input bit x leaving state st.
  function automatic symbol_t enc_out(input logic x, input state_t st);
    return {x ^ st[1] ^ st[0], x ^ st[0]};
  endfunction

  // Hamming distance between two 2-bit symbols (branch metric h, 0..2).
  function automatic logic [1:0] hamming2(input symbol_t a, input symbol_t b);
    symbol_t d;
    d = a ^ b;
    return {1'b0, d[1]} + {1'b0, d[0]};
  endfunction

  // Count (within one r+w period) at which z1 is sampled.
  function automatic int unsigned z1_sample(input int unsigned rw);
    return (rw / 2 > 1) ? rw / 2 - 1 : 1;
  endfunction

  // Count at which z0 is sampled.
  function automatic int unsigned z0_sample(input int unsigned rw);
    return rw / 2 + 1;
  endfunction

endpackage
